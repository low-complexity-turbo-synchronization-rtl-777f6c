// End-to-end testbench of turbo_sync_top at its default sizes.
//
// A behavioural transmitter built here encodes a random information word
// with the rate-1/3 turbo code (two 16-state RSC encoders, QPP interleaver),
// maps it to QPSK, frames it with the start and end unique words, applies a
// carrier frequency offset f0 and phase offset, adds noise and quantises
// the burst to 8-bit samples. The receiver searches the 61-trial grid
// covering +-6e-3 cycles per symbol and then runs 8 turbo-synchronization
// iterations. Checked: a trial was found, the selected trial lies next to
// f0, the final frequency estimate is closer to f0 than half a grid step,
// and every decoded bit is right. A second burst, written into the other
// Sym RAM page while the first one is being processed, is decoded as well.
// The mechanisms of the design are counted and each must occur: threshold
// exclusion of a trial, acceptance of a trial, a change of the best trial,
// turbo-synchronization iterations and swaps of all three memory pages.
module tb_turbo_sync_top;
  import ts_pkg::*;

  localparam int K   = 832;            // information bits
  localparam int NCW = 3 * K / 2;      // code-word symbols (1248)
  localparam int L   = 40 + NCW + 24;  // burst length (1312)
  localparam int F1 = 25, F2 = 52;     // QPP interleaver of K = 832
  localparam int NTR = 61;
  localparam real FSTEP = 2.0e-4;      // cycles per symbol
  localparam real TWO24 = 16777216.0;
  localparam int AMP = 40;             // QPSK component amplitude

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sym_we = 0;
  logic [12:0] sym_waddr = '0;
  cplx_t sym_wdata = '0;
  logic start = 0;
  logic busy, done, found, dec_bit;
  logic [7:0] best_idx, n_excluded, n_accepted, n_best_upd;
  logic signed [23:0] f_est;
  logic [15:0] phi_est;
  logic [12:0] dec_raddr = '0;

  turbo_sync_top dut (
    .clk, .rst_n, .sym_we, .sym_waddr, .sym_wdata, .start,
    .l_len(13'(L)), .k_size(13'(K)), .il_f1(13'(F1)), .il_f2(13'(F2)),
    .n_trials(8'(NTR)), .f_start(-24'(int'(30.0 * FSTEP * TWO24))),
    .f_step(24'(int'(FSTEP * TWO24))), .thresh(25'(9000)), .llr_shift(3'd3),
    .trial_iters(4'd2), .max_iters(4'd8),
    .busy, .done, .found, .best_idx, .f_est, .phi_est,
    .n_excluded, .n_accepted, .n_best_upd, .dec_raddr, .dec_bit
  );

  int checks = 0, failures = 0;
  int info[K], info1[K], info2[K];
  int ts_iters = 0, swaps_sym = 0, swaps_in = 0, swaps_out = 0;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic p_sym, p_in, p_out;
  bit verbose;
  initial verbose = $test$plusargs("verbose");
  always @(posedge clk) begin
    p_sym <= dut.sym_rpage; p_in <= dut.llrin_rpage; p_out <= dut.llrout_rpage;
    if (rst_n && p_sym != dut.sym_rpage) swaps_sym++;
    if (rst_n && p_in != dut.llrin_rpage) swaps_in++;
    if (rst_n && p_out != dut.llrout_rpage) swaps_out++;
    if (rst_n && dut.u_ctrl.ts && dut.post_done) ts_iters++;
    if (verbose && dut.pre_done && dut.u_ctrl.st == dut.u_ctrl.C_UW_W)
      $display("trial %0d: |k| = %0d accept = %0d", dut.u_ctrl.idx, dut.pre_uw_mag, dut.pre_accept);
    if (verbose && dut.post_done)
      $display("trial %0d ts=%0d: |c| = %0d", dut.u_ctrl.idx, dut.u_ctrl.ts, dut.post_c_mag);
  end

  function automatic void rsc(input int u[K], output int p[K]);
    int r1, r2, r3, r4, a;
    r1 = 0; r2 = 0; r3 = 0; r4 = 0;
    for (int k = 0; k < K; k++) begin
      a = u[k] ^ r3 ^ r4;
      p[k] = a ^ r1 ^ r3 ^ r4;
      r4 = r3; r3 = r2; r2 = r1; r1 = a;
    end
  endfunction

  function automatic int noise(int r);
    int n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(0, 2 * r)) - r;
    return n;
  endfunction

  function automatic logic signed [7:0] q8(real v);
    int i;
    i = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (i > 127) i = 127;
    if (i < -127) i = -127;
    return 8'(i);
  endfunction

  // Build and write one burst with offset f0 (cycles/symbol) and phase ph0.
  task automatic send_burst(input real f0, input real ph0);
    int ui[K], p1[K], p2[K], pil[K], c[3*K];
    bit seen[K];
    logic [6:0] lf;
    for (int k = 0; k < K; k++) begin
      info[k] = $urandom_range(0, 1);
      pil[k] = int'((longint'(F1) * k + longint'(F2) * k * k) % K);
      seen[pil[k]] = 1;
    end
    checks++;
    foreach (seen[k]) if (!seen[k]) begin failures++; $display("QPP is no permutation"); break; end
    for (int k = 0; k < K; k++) ui[k] = info[pil[k]];
    rsc(info, p1);
    rsc(ui, p2);
    for (int k = 0; k < K; k++) begin
      c[3*k] = info[k]; c[3*k+1] = p1[k]; c[3*k+2] = p2[k];
    end
    lf = UW_SEED;
    for (int l = 0; l < L; l++) begin
      real si, sq, th, ri, rq;
      if (l < 40 || l >= L - 24) begin
        logic [1:0] b;
        b = uw_sym(lf);
        lf = uw_next(lf);
        si = b[1] ? -AMP : AMP;
        sq = b[0] ? -AMP : AMP;
      end else begin
        int m;
        m = l - 40;
        si = c[2*m] ? -AMP : AMP;
        sq = c[2*m+1] ? -AMP : AMP;
      end
      th = 2.0 * 3.141592653589793 * (f0 * l + ph0);
      ri = si * $cos(th) - sq * $sin(th) + noise(37);
      rq = si * $sin(th) + sq * $cos(th) + noise(37);
      @(negedge clk);
      sym_we = 1; sym_waddr = 13'(l); sym_wdata.re = q8(ri); sym_wdata.im = q8(rq);
    end
    @(negedge clk);
    sym_we = 0;
  endtask

  task automatic check_result(input real f0, input int exp_idx);
    int err, ferr;
    checks++;
    if (!found) begin failures++; $display("no trial accepted"); end
    checks++;
    if (int'(best_idx) < exp_idx - 1 || int'(best_idx) > exp_idx + 1) begin
      failures++; $display("best trial %0d, expected %0d +-1", best_idx, exp_idx);
    end
    ferr = int'(f_est) - int'(f0 * TWO24);
    if (ferr < 0) ferr = -ferr;
    checks++;
    if (ferr > int'(FSTEP * TWO24 / 4)) begin
      failures++; $display("f_est error %0d units", ferr);
    end
    err = 0;
    for (int k = 0; k < K; k++) begin
      @(negedge clk); dec_raddr = 13'(k);
      @(negedge clk);
      checks++;
      if (dec_bit != info[k][0]) err++;
    end
    failures += err;
    $display("f0=%f f_est=%f best=%0d excluded=%0d accepted=%0d best-upd=%0d bit errors=%0d",
             f0, real'(f_est) / TWO24, best_idx, n_excluded, n_accepted, n_best_upd, err);
  endtask

  initial begin
    real f0a, f0b;
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    f0a = 2.37e-3;
    f0b = -4.11e-3;
    send_burst(f0a, 0.3);
    info1 = info;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = $time;
    // load the next burst into the other page while the first is processed
    send_burst(f0b, -0.2);
    info2 = info;
    info = info1;
    while (!done) @(negedge clk);
    $display("burst 1 took %0d clocks", ($time - t0) / 10);
    check_result(f0a, 42);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    info = info2;
    check_result(f0b, 9);
    // every mechanism must have happened
    checks++; if (n_excluded == 0) begin failures++; $display("no trial excluded"); end
    checks++; if (n_accepted == 0) begin failures++; $display("no trial accepted"); end
    checks++; if (n_best_upd == 0) begin failures++; $display("best trial never changed"); end
    checks++; if (ts_iters != 16) begin failures++; $display("%0d turbo sync iterations", ts_iters); end
    checks++; if (swaps_sym != 2 || swaps_in == 0 || swaps_out == 0) begin
      failures++; $display("page swaps sym=%0d in=%0d out=%0d", swaps_sym, swaps_in, swaps_out);
    end
    $display("mechanisms: excluded=%0d accepted=%0d best-updates=%0d ts-iterations=%0d swaps sym/in/out=%0d/%0d/%0d",
             n_excluded, n_accepted, n_best_upd, ts_iters, swaps_sym, swaps_in, swaps_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
