// Post: soft symbol estimates, burst correlation and fine frequency/phase
// estimation.
//
// One command (cmd) streams the whole burst l = 0..L-1 once:
//   * LLR2Sym: for a code-word symbol the APP LLRs of its two code bits are
//     read from the LLR-Out RAM and mapped to the soft symbol
//     s_e = tanh(Lambda_I/2) + j*tanh(Lambda_Q/2) (Eq. 6) through a 32-entry
//     table; on unique-word symbols the known UW symbol is used as s_e.
//   * Corr: r(l) from the Sym RAM is corrected by -(f*l + phi) (the offsets
//     currently applied by Pre) and correlated with the estimate:
//     phi_0 and phi_1 = sum of r_f(l) * conj(s_e(l)) over the first and the
//     second half of the burst (Eq. 3); c = phi_0 + phi_1 is the trial
//     correlation of Eq. (10), reported as its magnitude c_mag.
//   * F/P-Est: the residual frequency and phase of the corrected burst,
//     dfreq = 2*arg(phi_1 * conj(phi_0)) / (2*pi*L) (as a frequency word)
//     and dphase = arg(phi_0 + phi_1) - pi*L*dfreq (Eqs. 4, 5), to be added
//     to f and phi for the next iteration.
// Because the burst is corrected before the correlation, Post measures the
// residual offset rather than the absolute one; that, the CORDIC circuits,
// the table scale (LLR unit = 1/4, tanh(x/8) for table index x) and the
// widths are this design's choices. freq and phase are sampled with cmd;
// done pulses when all results are valid.
// The low 8 bits of the phase accumulator theta are fractional and dropped
// before the rotation angle, the divider's top quotient bits are never
// needed (|Delta * 2**9 / L| < 2**23 for L >= 2) and its busy flag is not needed; lint
// reports these as unused.
module post_unit
  import ts_pkg::*;
#(
  parameter int LMAX  = 7750,
  parameter int SAW   = $clog2(LMAX),
  parameter int KMAX  = 5124,
  parameter int AW    = $clog2(KMAX),
  parameter int UW_S  = 40,
  parameter int UW_E  = 24,
  parameter int ACC_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd,
  input  logic signed [FREQ_W-1:0] freq,
  input  logic        [PH_W-1:0]   phase,
  input  logic        [SAW-1:0]    l_len,
  // Sym RAM read port
  output logic        [SAW-1:0]    sym_raddr,
  input  cplx_t                    sym_rdata,
  // LLR-Out RAM read ports
  output logic [2:0][AW-1:0]       llr_raddr,
  input  logic [2:0][APP_W-1:0]    llr_rdata,
  // results
  output logic                     busy,
  output logic                     done,
  output logic        [ACC_W:0]    c_mag,
  output logic signed [FREQ_W-1:0] dfreq,
  output logic        [PH_W-1:0]   dphase
);
  localparam int RW    = SYM_W + 2;
  localparam int ROT_N = 14;
  localparam int DLY   = ROT_N + 1;     // rotator latency
  localparam int DW    = PH_W + (FREQ_W - PH_W + 1) + 1;
  // SE_TAB[x] = round(127 * tanh(x / 8)): tanh(Lambda/2) with LLR unit 1/4.
  localparam logic [SE_W-1:0] SE_TAB [32] = '{
    0, 16, 31, 46, 59, 70, 81, 89, 97, 103, 108, 112, 115, 118, 120, 121,
    122, 123, 124, 125, 125, 126, 126, 126, 126, 127, 127, 127, 127, 127, 127, 127};

  typedef enum logic [2:0] {Q_IDLE, Q_READ, Q_DRAIN, Q_VEC, Q_DIV, Q_DONE} qstate_e;
  qstate_e st;
  logic [SAW-1:0] l_cnt, n_out, l_d;
  logic           rd_v;
  logic signed [FREQ_W-1:0] freq_q;   // offsets latched at the command
  logic        [PH_W-1:0]   phase_q;
  logic           uw_d, half_d;
  logic [1:0]     jb_d;

  // ------------------------------------------------------------ read side
  logic in_uw;
  assign in_uw = (l_cnt < SAW'(UW_S)) || (l_cnt >= l_len - SAW'(UW_E));

  logic [1:0]    jb, jb1;
  logic [AW-1:0] ja, ja1;
  assign jb1 = (jb == 2'd2) ? 2'd0 : jb + 1'b1;
  assign ja1 = (jb == 2'd2) ? ja + 1'b1 : ja;

  always_comb begin
    llr_raddr      = '0;
    llr_raddr[jb]  = ja;
    llr_raddr[jb1] = ja1;
  end
  assign sym_raddr = l_cnt;

  logic [6:0] uw_lfsr;
  logic [1:0] ub_d;

  // --------------------------------------------------------- rotator path
  logic rot_ov;
  logic signed [RW-1:0] rot_x, rot_y;
  logic [FREQ_W-1:0] theta;
  logic [PH_W-1:0]   rot_angle;
  assign theta     = FREQ_W'($signed(freq_q) * $signed({1'b0, l_d})) + {phase_q, (FREQ_W-PH_W)'(0)};
  assign rot_angle = -theta[FREQ_W-1 -: PH_W];

  cordic_rotate #(.IN_W(SYM_W), .OUT_W(RW), .PH_W(PH_W), .N_ITER(ROT_N)) u_rot (
    .clk, .rst_n, .in_valid(rd_v), .x_in(sym_rdata.re), .y_in(sym_rdata.im),
    .angle(rot_angle), .out_valid(rot_ov), .x_out(rot_x), .y_out(rot_y)
  );

  // soft symbol of the arriving symbol
  function automatic logic signed [SE_W:0] llr2sym(input logic signed [APP_W-1:0] lam);
    logic [APP_W-1:0] a;
    logic [4:0]       idx;
    a   = lam[APP_W-1] ? APP_W'(-lam) : APP_W'(lam);
    idx = (a > 31) ? 5'd31 : a[4:0];
    return lam[APP_W-1] ? -$signed({1'b0, SE_TAB[idx]}) : $signed({1'b0, SE_TAB[idx]});
  endfunction

  logic signed [SE_W:0] se_re, se_im;
  always_comb begin
    if (uw_d) begin
      se_re = ub_d[1] ? -(SE_W+1)'(127) : (SE_W+1)'(127);
      se_im = ub_d[0] ? -(SE_W+1)'(127) : (SE_W+1)'(127);
    end else begin
      se_re = llr2sym(llr_rdata[jb_d]);
      se_im = llr2sym(llr_rdata[(jb_d == 2'd2) ? 2'd0 : jb_d + 1'b1]);
    end
  end

  // delay line aligning s_e and the half flag with the rotator output
  logic signed [SE_W:0] dl_re [DLY];
  logic signed [SE_W:0] dl_im [DLY];
  logic                 dl_h  [DLY];
  always_ff @(posedge clk) begin
    dl_re[0] <= se_re;
    dl_im[0] <= se_im;
    dl_h[0]  <= half_d;
    for (int i = 1; i < DLY; i++) begin
      dl_re[i] <= dl_re[i-1];
      dl_im[i] <= dl_im[i-1];
      dl_h[i]  <= dl_h[i-1];
    end
  end

  // ----------------------------------------------------------- correlation
  logic signed [ACC_W-1:0] ph0_re, ph0_im, ph1_re, ph1_im;
  logic signed [ACC_W-1:0] p_re, p_im;
  logic signed [SE_W:0]    a_re, a_im;
  assign a_re = dl_re[DLY-1];
  assign a_im = dl_im[DLY-1];
  // (x + jy) * (a - jb) = (xa + yb) + j(ya - xb)
  assign p_re = ACC_W'(rot_x * a_re) + ACC_W'(rot_y * a_im);
  assign p_im = ACC_W'(rot_y * a_re) - ACC_W'(rot_x * a_im);

  // ---------------------------------------------------- estimation stage
  logic              vec_v, vec_ov;
  logic signed [ACC_W-1:0] vec_x, vec_y;
  logic [ACC_W:0]    vec_mag;
  logic [PH_W-1:0]   vec_arg;
  logic [1:0]        vec_in_n, vec_out_n;
  logic [PH_W-1:0]   arg0, arg1;
  logic              div_go, div_busy, div_done;
  logic signed [DW-1:0] div_q;
  logic signed [PH_W-1:0] delta;
  assign delta = $signed(arg1 - arg0);

  cordic_vector #(.IN_W(ACC_W), .PH_W(PH_W), .N_ITER(16)) u_vec (
    .clk, .rst_n, .in_valid(vec_v), .x_in(vec_x), .y_in(vec_y),
    .out_valid(vec_ov), .mag_out(vec_mag), .arg_out(vec_arg)
  );

  seq_div #(.DW(DW), .VW(SAW)) u_div (
    .clk, .rst_n, .start(div_go),
    .dividend(DW'(delta) <<< (FREQ_W - PH_W + 1)), .divisor(l_len),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  always_comb begin
    vec_v = st == Q_VEC && vec_in_n != 2'd3;
    unique case (vec_in_n)
      2'd0:    begin vec_x = ph0_re; vec_y = ph0_im; end
      2'd1:    begin vec_x = ph1_re; vec_y = ph1_im; end
      default: begin vec_x = ph0_re + ph1_re; vec_y = ph0_im + ph1_im; end
    endcase
  end

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Q_IDLE;
      freq_q <= '0; phase_q <= '0;
      l_cnt <= '0; n_out <= '0; l_d <= '0; rd_v <= 1'b0;
      uw_d <= 1'b0; half_d <= 1'b0; jb_d <= '0; ub_d <= '0;
      jb <= '0; ja <= '0; uw_lfsr <= UW_SEED;
      ph0_re <= '0; ph0_im <= '0; ph1_re <= '0; ph1_im <= '0;
      vec_in_n <= '0; vec_out_n <= '0; arg0 <= '0; arg1 <= '0;
      div_go <= 1'b0; done <= 1'b0;
      c_mag <= '0; dfreq <= '0; dphase <= '0;
    end else begin
      done   <= 1'b0;
      div_go <= 1'b0;
      rd_v   <= st == Q_READ;
      l_d    <= l_cnt;
      uw_d   <= in_uw;
      half_d <= l_cnt >= (l_len >> 1);
      jb_d   <= jb;
      ub_d   <= uw_sym(uw_lfsr);
      if (rot_ov) begin
        n_out <= n_out - 1'b1;
        if (dl_h[DLY-1]) begin
          ph1_re <= ph1_re + p_re;
          ph1_im <= ph1_im + p_im;
        end else begin
          ph0_re <= ph0_re + p_re;
          ph0_im <= ph0_im + p_im;
        end
      end
      unique case (st)
        Q_IDLE: if (cmd) begin
          st <= Q_READ;
          freq_q <= freq;
          phase_q <= phase;
          l_cnt <= '0;
          n_out <= l_len;
          jb <= '0; ja <= '0; uw_lfsr <= UW_SEED;
          ph0_re <= '0; ph0_im <= '0; ph1_re <= '0; ph1_im <= '0;
        end
        Q_READ: begin
          if (in_uw) uw_lfsr <= uw_next(uw_lfsr);
          else unique case (jb)             // advance two code-word bits
            2'd0:    jb <= 2'd2;
            2'd1:    begin jb <= 2'd0; ja <= ja + 1'b1; end
            default: begin jb <= 2'd1; ja <= ja + 1'b1; end
          endcase
          l_cnt <= l_cnt + 1'b1;
          if (l_cnt == l_len - 1'b1) st <= Q_DRAIN;
        end
        Q_DRAIN: if (n_out == 0) begin
          st <= Q_VEC;
          vec_in_n <= '0;
          vec_out_n <= '0;
        end
        Q_VEC: begin
          if (vec_in_n != 2'd3) vec_in_n <= vec_in_n + 1'b1;
          if (vec_ov) begin
            vec_out_n <= vec_out_n + 1'b1;
            unique case (vec_out_n)
              2'd0: arg0 <= vec_arg;
              2'd1: arg1 <= vec_arg;
              default: begin
                c_mag  <= vec_mag;
                dphase <= vec_arg - (arg1 - arg0);
                div_go <= 1'b1;
                st     <= Q_DIV;
              end
            endcase
          end
        end
        Q_DIV: if (div_done) begin
          dfreq <= FREQ_W'(div_q);
          st    <= Q_DONE;
        end
        Q_DONE: begin
          done <= 1'b1;
          st   <= Q_IDLE;
        end
        default: st <= Q_IDLE;
      endcase
    end
  end

  assign busy = st != Q_IDLE;
endmodule
