// Turbo-synchronising turbo-decoder receiver without initial carrier
// synchronization (top level).
//
// A QPSK burst (start unique word, turbo code word, end unique word) with an
// unknown frequency and phase offset is written into the double-buffered
// Sym RAM through sym_we/sym_waddr/sym_wdata. start then runs, in order, the
// trial-frequency search (each trial corrected and phase-estimated on the
// unique words by Pre, weak trials excluded by a threshold, the others
// decoded briefly by the MAP decoder and scored by Post) and turbo
// synchronization on the best trial (decoder iterations interleaved with
// fine frequency/phase estimation in Post and re-correction in Pre).
//
//   Sym RAM --> Pre --> LLR-In RAM --> MAP --> LLR-Out RAM --> Post
//      |                                                        ^
//      +--------------------------------------------------------+
//   Control sequences all units and swaps the memory pages.
//
// Configuration inputs (held stable while busy): l_len burst length L in
// symbols (code-word symbols + UW_S + UW_E), k_size information word size K
// (code word = 3K bits, rate 1/3, 3K/2 symbols), il_f1/il_f2 interleaver
// coefficients, the trial grid n_trials/f_start/f_step (frequency words, one
// turn per symbol = 2**24), the exclusion threshold thresh, the LLR scaling
// shift llr_shift and the iteration counts trial_iters and max_iters.
// done pulses at the end; the hard decisions of the decoded information
// bits are then read through dec_raddr, dec_bit following one clock later.
// A new burst may be written into the other Sym RAM page while one is
// processed.
//
// The units' busy flags and Pre's correlation magnitude uw_mag are left
// unconnected on purpose: the controller works from the done pulses and the
// accept decision alone, so lint reports them as unused signals.
//
// What follows the published architecture: the unit split (Pre, MAP, Post,
// Control, double-buffered RAMs) and the algorithm. This design's own
// choices: the sequential schedule (units never overlap on different
// trials), the number formats and the port set.
module turbo_sync_top
  import ts_pkg::*;
#(
  parameter int LMAX = 7750,   // 64 UW symbols + 15372 / 2 code-word symbols
  parameter int KMAX = 5124,   // largest information word
  parameter int UW_S = 40,
  parameter int UW_E = 24,
  parameter int SAW  = $clog2(LMAX),
  parameter int AW   = $clog2(KMAX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // burst input
  input  logic                     sym_we,
  input  logic [SAW-1:0]           sym_waddr,
  input  cplx_t                    sym_wdata,
  // configuration
  input  logic                     start,
  input  logic [SAW-1:0]           l_len,
  input  logic [AW-1:0]            k_size,
  input  logic [AW-1:0]            il_f1,
  input  logic [AW-1:0]            il_f2,
  input  logic [7:0]               n_trials,
  input  logic signed [FREQ_W-1:0] f_start,
  input  logic signed [FREQ_W-1:0] f_step,
  input  logic [24:0]              thresh,
  input  logic [2:0]               llr_shift,
  input  logic [3:0]               trial_iters,
  input  logic [3:0]               max_iters,
  // status and results
  output logic                     busy,
  output logic                     done,
  output logic                     found,
  output logic [7:0]               best_idx,
  output logic signed [FREQ_W-1:0] f_est,
  output logic        [PH_W-1:0]   phi_est,
  output logic [7:0]               n_excluded,
  output logic [7:0]               n_accepted,
  output logic [7:0]               n_best_upd,
  input  logic [AW-1:0]            dec_raddr,
  output logic                     dec_bit
);
  // control
  logic pre_cmd_uw, pre_cmd_corr, pre_done, pre_accept, pre_busy;
  logic signed [FREQ_W-1:0] pre_freq;
  logic [PH_W-1:0] pre_phase, pre_phase_est;
  logic [24:0] pre_uw_mag;
  logic map_start, map_half, map_first, map_done, map_busy;
  logic post_cmd, post_done, post_busy;
  logic [32:0] post_c_mag;
  logic signed [FREQ_W-1:0] post_dfreq;
  logic [PH_W-1:0] post_dphase;
  logic sym_rpage, llrin_rpage, llrout_rpage;

  // memory ports
  logic [SAW-1:0] pre_sym_raddr, post_sym_raddr;
  cplx_t          pre_sym_rdata, post_sym_rdata;
  logic [2:0]             in_we;
  logic [2:0][AW-1:0]     in_waddr, in_raddr;
  logic [2:0][LLR_W-1:0]  in_wdata, in_rdata;
  logic [2:0]             out_we;
  logic [2:0][AW-1:0]     out_waddr, out_raddr, post_llr_raddr;
  logic [2:0][APP_W-1:0]  out_wdata, out_rdata;

  ctrl_unit u_ctrl (
    .clk, .rst_n, .start, .n_trials, .f_start, .f_step, .trial_iters, .max_iters,
    .pre_cmd_uw, .pre_cmd_corr, .pre_freq, .pre_phase, .pre_done, .pre_accept,
    .pre_phase_est, .map_start, .map_half, .map_first, .map_done,
    .post_cmd, .post_done, .post_c_mag, .post_dfreq, .post_dphase,
    .sym_rpage, .llrin_rpage, .llrout_rpage,
    .busy, .done, .found, .best_idx, .f_est, .phi_est,
    .n_excluded, .n_accepted, .n_best_upd
  );

  pingpong_ram #(.DEPTH(LMAX), .W($bits(cplx_t)), .AW(SAW)) u_sym_ram (
    .clk, .we(sym_we), .wpage(~sym_rpage), .waddr(sym_waddr), .wdata(sym_wdata),
    .rpage_a(sym_rpage), .raddr_a(pre_sym_raddr), .rdata_a(pre_sym_rdata),
    .rpage_b(sym_rpage), .raddr_b(post_sym_raddr), .rdata_b(post_sym_rdata)
  );

  pre_unit #(.LMAX(LMAX), .SAW(SAW), .KMAX(KMAX), .AW(AW), .UW_S(UW_S), .UW_E(UW_E)) u_pre (
    .clk, .rst_n, .cmd_uw(pre_cmd_uw), .cmd_corr(pre_cmd_corr),
    .freq(pre_freq), .phase(pre_phase), .l_len, .thresh, .llr_shift,
    .sym_raddr(pre_sym_raddr), .sym_rdata(pre_sym_rdata),
    .llr_we(in_we), .llr_waddr(in_waddr), .llr_wdata(in_wdata),
    .busy(pre_busy), .done(pre_done), .accept(pre_accept),
    .phase_est(pre_phase_est), .uw_mag(pre_uw_mag)
  );

  llr_ram #(.DEPTH(KMAX), .W(LLR_W), .AW(AW)) u_llr_in (
    .clk, .wpage(~llrin_rpage), .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .rpage(llrin_rpage), .raddr(in_raddr), .rdata(in_rdata)
  );

  map_decoder #(.KMAX(KMAX), .AW(AW)) u_map (
    .clk, .rst_n, .start(map_start), .half(map_half), .first(map_first),
    .k_size, .f1(il_f1), .f2(il_f2), .busy(map_busy), .done(map_done),
    .in_raddr, .in_rdata, .out_we, .out_waddr, .out_wdata
  );

  llr_ram #(.DEPTH(KMAX), .W(APP_W), .AW(AW)) u_llr_out (
    .clk, .wpage(~llrout_rpage), .we(out_we), .waddr(out_waddr), .wdata(out_wdata),
    .rpage(llrout_rpage), .raddr(out_raddr), .rdata(out_rdata)
  );

  post_unit #(.LMAX(LMAX), .SAW(SAW), .KMAX(KMAX), .AW(AW), .UW_S(UW_S), .UW_E(UW_E)) u_post (
    .clk, .rst_n, .cmd(post_cmd), .freq(pre_freq), .phase(pre_phase), .l_len,
    .sym_raddr(post_sym_raddr), .sym_rdata(post_sym_rdata),
    .llr_raddr(post_llr_raddr), .llr_rdata(out_rdata),
    .busy(post_busy), .done(post_done), .c_mag(post_c_mag),
    .dfreq(post_dfreq), .dphase(post_dphase)
  );

  // The decoded word is read from the systematic APP bank once idle.
  always_comb begin
    out_raddr = post_llr_raddr;
    if (!busy) out_raddr[0] = dec_raddr;
  end
  assign dec_bit = out_rdata[0][APP_W-1];
endmodule
