// Pre: frequency/phase correction, unique-word phase estimation, trial
// exclusion and QPSK demapping.
//
// The unit streams the received burst r(l) from the Sym RAM, one symbol per
// clock, and rotates each symbol by -(f*l + phi) with a pipelined CORDIC
// (Eq. 7 plus the phase correction). It has two commands:
//   * cmd_uw   - reads only the unique-word symbols (the UW_S start-UW
//     symbols and the UW_E end-UW symbols), corrects them with the trial
//     frequency f only (the phase input is ignored), correlates them
//     with the known UW symbols, k = sum r_f(l) * conj(u(l)) (Eq. 8), and
//     returns the phase estimate arg(k) (Eq. 9), the magnitude |k| and
//     accept = |k| >= thresh, the exclusion test of the trial frequency
//     (Eq. 12, applied to the UW correlation).
//   * cmd_corr - reads the code-word symbols, corrects them with f and phi,
//     and demaps every QPSK symbol into two channel LLRs (I then Q),
//     LLR = sat6(corrected component >>> llr_shift), written into the three
//     banks of the LLR-In RAM: code-word bit j goes to bank j mod 3 (order
//     systematic, parity 1, parity 2 per information bit), address j div 3.
// freq and phase are sampled with the command. done pulses one clock when
// the command has finished. The correlation and
// correction follow the published equations; the CORDIC circuit, the widths,
// the LLR scaling by a right shift and the code-word bit order are this
// design's choices. Depuncturing (code rates above 1/3) is not included.
// The low 8 bits of the phase accumulator theta are fractional and are
// deliberately dropped before the 16-bit rotation angle; lint reports them
// as unused.
module pre_unit
  import ts_pkg::*;
#(
  parameter int LMAX  = 7750,            // longest burst, symbols
  parameter int SAW   = $clog2(LMAX),    // symbol address width
  parameter int KMAX  = 5124,            // longest information word
  parameter int AW    = $clog2(KMAX),
  parameter int UW_S  = 40,              // start unique word, symbols
  parameter int UW_E  = 24,              // end unique word, symbols
  parameter int ACC_W = 24               // UW correlator accumulator width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd_uw,
  input  logic                     cmd_corr,
  input  logic signed [FREQ_W-1:0] freq,
  input  logic        [PH_W-1:0]   phase,
  input  logic        [SAW-1:0]    l_len,      // burst length L, symbols
  input  logic        [ACC_W:0]    thresh,     // exclusion threshold C_Tr
  input  logic        [2:0]        llr_shift,
  // Sym RAM read port
  output logic        [SAW-1:0]    sym_raddr,
  input  cplx_t                    sym_rdata,
  // LLR-In RAM write ports
  output logic [2:0]               llr_we,
  output logic [2:0][AW-1:0]       llr_waddr,
  output logic [2:0][LLR_W-1:0]    llr_wdata,
  // results
  output logic                     busy,
  output logic                     done,
  output logic                     accept,
  output logic        [PH_W-1:0]   phase_est,
  output logic        [ACC_W:0]    uw_mag
);
  localparam int RW  = SYM_W + 2;   // rotator output width
  localparam int ROT_N = 14;

  typedef enum logic [2:0] {P_IDLE, P_READ, P_DRAIN, P_VEC, P_DONE} pstate_e;
  pstate_e st;
  logic        mode_uw;           // 1: UW correlation, 0: correction + demap
  logic [SAW-1:0] l_cnt;          // symbol index being read
  logic [SAW-1:0] n_left;         // symbols still to read
  logic [SAW-1:0] n_out;          // rotator outputs still expected
  logic           rd_v;           // read issued last clock
  logic           vec_go;         // start of the vectoring CORDIC
  logic signed [FREQ_W-1:0] freq_q; // offsets latched at the command
  logic        [PH_W-1:0]   phase_q;
  logic [SAW-1:0] l_d;            // index of the arriving symbol

  // ------------------------------------------------------------ sequencing
  logic [SAW-1:0] n_total;
  assign n_total = cmd_uw ? SAW'(UW_S + UW_E) : l_len - SAW'(UW_S + UW_E);

  logic rot_ov;
  logic signed [RW-1:0] rot_x, rot_y;
  logic vec_ov;
  logic [ACC_W:0] vec_mag;
  logic [PH_W-1:0] vec_arg;
  logic signed [ACC_W-1:0] k_re, k_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P_IDLE;
      mode_uw <= 1'b0;
      l_cnt   <= '0;
      n_left  <= '0;
      n_out   <= '0;
      rd_v    <= 1'b0;
      l_d     <= '0;
      done    <= 1'b0;
      vec_go  <= 1'b0;
      freq_q  <= '0;
      phase_q <= '0;
      accept  <= 1'b0;
      phase_est <= '0;
      uw_mag  <= '0;
    end else begin
      done <= 1'b0;
      vec_go <= 1'b0;
      rd_v <= st == P_READ;
      l_d  <= l_cnt;
      if (rot_ov && n_out != 0) n_out <= n_out - 1'b1;
      unique case (st)
        P_IDLE: if (cmd_uw || cmd_corr) begin
          st      <= P_READ;
          mode_uw <= cmd_uw;
          freq_q  <= freq;
          phase_q <= cmd_uw ? '0 : phase;   // UW correlation: frequency only
          l_cnt   <= cmd_uw ? '0 : SAW'(UW_S);
          n_left  <= n_total;
          n_out   <= n_total;
        end
        P_READ: begin
          n_left <= n_left - 1'b1;
          if (n_left == 1) st <= P_DRAIN;
          // jump from the last start-UW symbol to the first end-UW symbol
          if (mode_uw && l_cnt == SAW'(UW_S - 1)) l_cnt <= l_len - SAW'(UW_E);
          else                                    l_cnt <= l_cnt + 1'b1;
        end
        P_DRAIN: if (n_out == 0) begin       // last rotator output taken
          st     <= mode_uw ? P_VEC : P_DONE;
          vec_go <= mode_uw;
        end
        P_VEC: if (vec_ov) begin
          accept    <= vec_mag >= thresh;
          phase_est <= vec_arg;
          uw_mag    <= vec_mag;
          st        <= P_DONE;
        end
        P_DONE: begin
          done <= 1'b1;
          st   <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assign busy      = st != P_IDLE;
  assign sym_raddr = l_cnt;

  // ------------------------------------------- correction angle and rotator
  logic [FREQ_W-1:0] theta;
  logic [PH_W-1:0]   rot_angle;
  assign theta     = FREQ_W'($signed(freq_q) * $signed({1'b0, l_d})) + {phase_q, (FREQ_W-PH_W)'(0)};
  assign rot_angle = -theta[FREQ_W-1 -: PH_W];

  cordic_rotate #(.IN_W(SYM_W), .OUT_W(RW), .PH_W(PH_W), .N_ITER(ROT_N)) u_rot (
    .clk, .rst_n, .in_valid(rd_v), .x_in(sym_rdata.re), .y_in(sym_rdata.im),
    .angle(rot_angle), .out_valid(rot_ov), .x_out(rot_x), .y_out(rot_y)
  );

  // ------------------------------------------------------ UW correlation
  logic [6:0] uw_lfsr;
  logic [1:0] ub;
  assign ub = uw_sym(uw_lfsr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uw_lfsr <= UW_SEED;
      k_re    <= '0;
      k_im    <= '0;
    end else if (st == P_IDLE) begin
      uw_lfsr <= UW_SEED;
      k_re    <= '0;
      k_im    <= '0;
    end else if (rot_ov && mode_uw) begin
      // r * conj(u), u = (+-1) + j(+-1): (x + jy)(ui - j uq)
      k_re    <= k_re + (ub[1] ? -ACC_W'(rot_x) : ACC_W'(rot_x))
                      + (ub[0] ? -ACC_W'(rot_y) : ACC_W'(rot_y));
      k_im    <= k_im + (ub[1] ? -ACC_W'(rot_y) : ACC_W'(rot_y))
                      - (ub[0] ? -ACC_W'(rot_x) : ACC_W'(rot_x));
      uw_lfsr <= uw_next(uw_lfsr);
    end
  end

  cordic_vector #(.IN_W(ACC_W), .PH_W(PH_W), .N_ITER(16)) u_vec (
    .clk, .rst_n, .in_valid(vec_go),
    .x_in(k_re), .y_in(k_im), .out_valid(vec_ov), .mag_out(vec_mag), .arg_out(vec_arg)
  );

  // ------------------------------------------------------------ demapper
  function automatic logic signed [LLR_W-1:0] demap(input logic signed [RW-1:0] v,
                                                    input logic [2:0] sh);
    logic signed [RW-1:0] t;
    t = v >>> sh;
    if (t > RW'(2 ** (LLR_W - 1) - 1)) return LLR_W'(2 ** (LLR_W - 1) - 1);
    if (t < -RW'(2 ** (LLR_W - 1) - 1)) return -LLR_W'(2 ** (LLR_W - 1) - 1);
    return LLR_W'(t);
  endfunction

  // bank / address of code-word bit j (I bit) of the current symbol
  logic [1:0]    jb;
  logic [AW-1:0] ja;
  logic [1:0]    jb1;
  logic [AW-1:0] ja1;
  assign jb1 = (jb == 2'd2) ? 2'd0 : jb + 1'b1;
  assign ja1 = (jb == 2'd2) ? ja + 1'b1 : ja;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jb <= '0;
      ja <= '0;
    end else if (st == P_IDLE) begin
      jb <= '0;
      ja <= '0;
    end else if (rot_ov && !mode_uw) begin
      unique case (jb)
        2'd0: begin jb <= 2'd2; end
        2'd1: begin jb <= 2'd0; ja <= ja + 1'b1; end
        default: begin jb <= 2'd1; ja <= ja + 1'b1; end
      endcase
    end
  end

  always_comb begin
    llr_we    = '0;
    llr_waddr = '0;
    llr_wdata = '0;
    if (rot_ov && !mode_uw && n_out != 0) begin
      llr_we[jb]     = 1'b1;
      llr_waddr[jb]  = ja;
      llr_wdata[jb]  = demap(rot_x, llr_shift);
      llr_we[jb1]    = 1'b1;
      llr_waddr[jb1] = ja1;
      llr_wdata[jb1] = demap(rot_y, llr_shift);
    end
  end
endmodule
