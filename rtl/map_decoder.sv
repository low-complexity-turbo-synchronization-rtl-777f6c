// Max-Log-MAP component decoder: one half iteration of turbo decoding.
//
// The decoder of the 16-state rate-1/3 binary turbo code. One run (start ..
// done) is a half iteration: half = 0 runs component decoder 1 on the
// systematic and parity-1 LLRs in natural order, half = 1 runs component
// decoder 2 on the interleaved systematic LLRs and the parity-2 LLRs. The a
// priori input is the extrinsic LLR of the other decoder, held in an internal
// extrinsic memory indexed by natural bit position, so interleaving and
// deinterleaving are both done by addressing it with pi(k). first = 1 forces
// the a priori input to zero (first half iteration of a burst).
//
// Algorithm: Max-Log-MAP, branch metric gamma(u,p) = [u=0]*(ls+la) +
// [p=0]*lp (LLR = log P(0)/P(1)), state metrics normalised to state 0 at every
// step. Besides the extrinsic output, scaled by the extrinsic scaling factor
// 0.75, it produces the APP LLRs of the systematic bits (decoder 2) and of the
// parity bits (both decoders), which turbo synchronization needs to build
// soft symbol estimates. The trellis starts in state 0 and is left open at
// the end (all end states equally likely).
//
// Schedule: a forward recursion over k = 0..K-1 stores the state metrics
// alpha_k in an internal memory; a backward recursion over k = K-1..0 then
// computes beta and the output LLRs, one trellis step per clock each. A run
// takes 2*K + 4 clocks from start to done. This two-pass schedule is this
// design's simplification: the published decoder is a windowed serial MAP
// with three recursion units in parallel (forward, backward acquisition,
// backward) and needs about K clocks per half iteration. The code
// polynomials and the interleaver law are not published either (see
// ts_pkg and qpp_interleaver).
//
// Memory interface: LLR-In RAM read ports in_raddr/in_rdata (data one clock
// after the address), LLR-Out RAM write ports out_we/out_waddr/out_wdata
// (bank 0 systematic APP, bank 1 parity-1 APP, bank 2 parity-2 APP).
module map_decoder
  import ts_pkg::*;
#(
  parameter int KMAX = 5124,
  parameter int AW   = $clog2(KMAX)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    half,
  input  logic                    first,
  input  logic [AW-1:0]           k_size,
  input  logic [AW-1:0]           f1,
  input  logic [AW-1:0]           f2,
  output logic                    busy,
  output logic                    done,
  // LLR-In RAM (bank 0 systematic, 1 parity 1, 2 parity 2)
  output logic [2:0][AW-1:0]      in_raddr,
  input  logic [2:0][LLR_W-1:0]   in_rdata,
  // LLR-Out RAM
  output logic [2:0]              out_we,
  output logic [2:0][AW-1:0]      out_waddr,
  output logic [2:0][APP_W-1:0]   out_wdata
);
  typedef logic signed [MET_W-1:0] met_t;
  typedef met_t [NSTATE-1:0]       metv_t;
  typedef enum logic [2:0] {S_IDLE, S_FWD, S_TURN, S_BWD, S_DONE} state_e;

  state_e        st;
  logic [AW-1:0] cnt;           // trellis step whose address is issued
  logic          iss;           // an address was issued last clock
  logic [AW-1:0] k_d;           // natural index of the data now arriving
  logic [AW-1:0] a_d;           // extrinsic / systematic address of that data
  logic          half_q, first_q;
  logic [AW-1:0] pi_k;
  logic          il_init, il_fwd, il_bwd;

  metv_t alpha_q, beta_q;
  met_t le_raw, le_scaled;
  logic signed [EXT_W-1:0] ext_new;
  metv_t alpha_mem [KMAX];
  metv_t alpha_rd;
  logic signed [EXT_W-1:0] ext_mem [KMAX];
  logic signed [EXT_W-1:0] ext_rd;

  qpp_interleaver #(.AW(AW)) u_il (
    .clk, .rst_n, .k_size, .f1, .f2,
    .init(il_init), .step_fwd(il_fwd), .step_bwd(il_bwd), .pi_out(pi_k)
  );

  // Address of the current step: systematic / extrinsic address is pi(k) in
  // decoder 2, k in decoder 1; the parity address is always k.
  logic [AW-1:0] a_cur;
  assign a_cur = half_q ? pi_k : cnt;

  assign in_raddr[0] = a_cur;
  assign in_raddr[1] = cnt;
  assign in_raddr[2] = cnt;

  // ---------------------------------------------------------------- control
  logic last_step;
  assign last_step = (st == S_FWD) ? (cnt == k_size - 1'b1) : (cnt == '0);
  assign il_init = start && st == S_IDLE;
  assign il_fwd  = st == S_FWD && !last_step;
  assign il_bwd  = st == S_BWD && !last_step;
  assign busy    = st != S_IDLE;

  logic fwd_d;    // data arriving belongs to the forward recursion

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      cnt     <= '0;
      iss     <= 1'b0;
      fwd_d   <= 1'b0;
      k_d     <= '0;
      a_d     <= '0;
      half_q  <= 1'b0;
      first_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      iss  <= st == S_FWD || st == S_BWD;
      fwd_d <= st == S_FWD;
      k_d  <= cnt;
      a_d  <= a_cur;
      unique case (st)
        S_IDLE: if (start) begin
          st      <= S_FWD;
          cnt     <= '0;
          half_q  <= half;
          first_q <= first;
        end
        S_FWD: if (last_step) st <= S_TURN;         // cnt stays at K-1
               else cnt <= cnt + 1'b1;
        S_TURN: st <= S_BWD;      // lets alpha_{K-1} reach the memory
        S_BWD: if (last_step) st <= S_DONE;
               else cnt <= cnt - 1'b1;
        S_DONE: if (!iss) begin                     // last output written
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- memories (sync)
  always_ff @(posedge clk) begin
    ext_rd   <= ext_mem[a_cur];
    alpha_rd <= alpha_mem[cnt];
    if (iss && fwd_d) alpha_mem[k_d] <= alpha_q;
    if (iss && !fwd_d) ext_mem[a_d] <= ext_new;
  end

  // ---------------------------------------------------------- branch metrics
  logic signed [LLR_W-1:0] ls, lp;
  logic signed [EXT_W-1:0] la;
  logic signed [MET_W-1:0] lsa, lpe;
  assign ls  = in_rdata[0];
  assign lp  = half_q ? in_rdata[2] : in_rdata[1];
  assign la  = first_q ? '0 : ext_rd;
  assign lsa = MET_W'(ls) + MET_W'(la);
  assign lpe = MET_W'(lp);

  function automatic met_t gam(input logic u, input logic p, input met_t s_llr, input met_t p_llr);
    return (u ? met_t'(0) : s_llr) + (p ? met_t'(0) : p_llr);
  endfunction

  function automatic met_t mmax(input met_t a, input met_t b);
    return (a > b) ? a : b;
  endfunction

  // Forward ACS: alpha_{k+1}(s) = max over the two predecessors.
  metv_t alpha_nx, beta_nx;
  always_comb begin
    metv_t tmp;
    logic [3:0] sp0, sp1;
    logic       u0, u1;
    for (int s = 0; s < NSTATE; s++) begin
      // predecessors {s2,s3,s4,x}; input bit u = a ^ s3' ^ s4'
      sp0 = {s[2:0], 1'b0};
      sp1 = {s[2:0], 1'b1};
      u0  = s[3] ^ sp0[1] ^ sp0[0];
      u1  = s[3] ^ sp1[1] ^ sp1[0];
      tmp[s] = mmax(alpha_q[sp0] + gam(u0, rsc_parity(sp0, u0), lsa, lpe),
                    alpha_q[sp1] + gam(u1, rsc_parity(sp1, u1), lsa, lpe));
    end
    for (int s = 0; s < NSTATE; s++) alpha_nx[s] = tmp[s] - tmp[0];
  end

  // Backward ACS: beta_k(s') = max over u.
  always_comb begin
    metv_t tmp;
    for (int s = 0; s < NSTATE; s++)
      tmp[s] = mmax(beta_q[rsc_next(4'(s), 1'b0)] + gam(1'b0, rsc_parity(4'(s), 1'b0), lsa, lpe),
                    beta_q[rsc_next(4'(s), 1'b1)] + gam(1'b1, rsc_parity(4'(s), 1'b1), lsa, lpe));
    for (int s = 0; s < NSTATE; s++) beta_nx[s] = tmp[s] - tmp[0];
  end

  // Output LLRs from alpha_k (memory), gamma_k and beta_{k+1} (register).
  localparam met_t NEG = met_t'(-(2 ** (MET_W - 2)));
  met_t lam_u, lam_p;
  always_comb begin
    met_t mu0, mu1, mp0, mp1, m;
    logic p;
    mu0 = NEG; mu1 = NEG; mp0 = NEG; mp1 = NEG;
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        p = rsc_parity(4'(s), u[0]);
        m = alpha_rd[s] + gam(u[0], p, lsa, lpe) + beta_q[rsc_next(4'(s), u[0])];
        if (u == 0) mu0 = mmax(mu0, m); else mu1 = mmax(mu1, m);
        if (!p)     mp0 = mmax(mp0, m); else mp1 = mmax(mp1, m);
      end
    end
    lam_u = mu0 - mu1;
    lam_p = mp0 - mp1;
  end

  function automatic logic signed [EXT_W-1:0] sat_ext(input met_t v);
    if (v > met_t'(2 ** (EXT_W - 1) - 1)) return EXT_W'(2 ** (EXT_W - 1) - 1);
    if (v < met_t'(-(2 ** (EXT_W - 1)) + 1)) return EXT_W'(-(2 ** (EXT_W - 1)) + 1);
    return EXT_W'(v);
  endfunction

  function automatic logic signed [APP_W-1:0] sat_app(input met_t v);
    if (v > met_t'(2 ** (APP_W - 1) - 1)) return APP_W'(2 ** (APP_W - 1) - 1);
    if (v < met_t'(-(2 ** (APP_W - 1)) + 1)) return APP_W'(-(2 ** (APP_W - 1)) + 1);
    return APP_W'(v);
  endfunction

  // Extrinsic = 0.75 * (APP - systematic - a priori).
  assign le_raw    = lam_u - lsa;
  assign le_scaled = (le_raw + (le_raw <<< 1)) >>> 2;
  assign ext_new   = sat_ext(le_scaled);

  // ------------------------------------------------------- recursion regs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q <= '0;
      beta_q  <= '0;
    end else if (il_init) begin
      for (int s = 0; s < NSTATE; s++) alpha_q[s] <= (s == 0) ? met_t'(0) : NEG;
      beta_q <= '0;
    end else if (iss) begin
      if (fwd_d) alpha_q <= alpha_nx;
      else       beta_q  <= beta_nx;
    end
  end

  // ------------------------------------------------------------ APP output
  always_comb begin
    out_we    = '0;
    out_waddr = '0;
    out_wdata = '0;
    if (iss && !fwd_d) begin
      if (half_q) begin
        out_we[0]    = 1'b1;
        out_waddr[0] = a_d;
        out_wdata[0] = sat_app(lam_u);
        out_we[2]    = 1'b1;
        out_waddr[2] = k_d;
        out_wdata[2] = sat_app(lam_p);
      end else begin
        out_we[1]    = 1'b1;
        out_waddr[1] = k_d;
        out_wdata[1] = sat_app(lam_p);
      end
    end
  end
endmodule
