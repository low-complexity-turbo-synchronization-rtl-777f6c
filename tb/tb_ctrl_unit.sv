// Testbench of ctrl_unit with behavioural stand-ins for Pre, the MAP
// decoder and Post that answer each command after a random delay.
//
// Trial i is accepted by the stand-in Pre when (i mod 3) != 1 and its Post
// score is a pseudo-random number; in turbo synchronization the stand-in
// Post returns fixed frequency and phase corrections. Checked against values
// worked out here: the numbers of UW, correction, MAP and Post commands, the
// first flag and half order of the MAP runs, the selected trial (largest
// score among the accepted ones), f_est and phi_est after all corrections,
// the exclusion / acceptance / best-change counters and the page swaps.
module tb_ctrl_unit;
  import ts_pkg::*;
  localparam int NT = 13, TI = 2, MI = 3;
  localparam int FSTART = -6000, FSTEP = 1000, DF = 7, DPH = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic pre_cmd_uw, pre_cmd_corr, pre_done = 0, pre_accept = 0;
  logic signed [23:0] pre_freq;
  logic [15:0] pre_phase, pre_phase_est = '0;
  logic map_start, map_half, map_first, map_done = 0;
  logic post_cmd, post_done = 0;
  logic [32:0] post_c_mag = '0;
  logic signed [23:0] post_dfreq = '0;
  logic [15:0] post_dphase = '0;
  logic sym_rpage, llrin_rpage, llrout_rpage;
  logic busy, done, found;
  logic [7:0] best_idx, n_excluded, n_accepted, n_best_upd;
  logic signed [23:0] f_est;
  logic [15:0] phi_est;

  ctrl_unit dut (
    .clk, .rst_n, .start, .n_trials(8'(NT)), .f_start(24'(FSTART)), .f_step(24'(FSTEP)),
    .trial_iters(4'(TI)), .max_iters(4'(MI)),
    .pre_cmd_uw, .pre_cmd_corr, .pre_freq, .pre_phase, .pre_done, .pre_accept, .pre_phase_est,
    .map_start, .map_half, .map_first, .map_done,
    .post_cmd, .post_done, .post_c_mag, .post_dfreq, .post_dphase,
    .sym_rpage, .llrin_rpage, .llrout_rpage,
    .busy, .done, .found, .best_idx, .f_est, .phi_est,
    .n_excluded, .n_accepted, .n_best_upd
  );

  int checks = 0, failures = 0;
  int n_uw = 0, n_corr = 0, n_map = 0, n_post = 0, n_first = 0, bad_half = 0;
  int score [NT];
  int sw_in = 0, sw_out = 0;
  logic exp_half = 0;
  logic p_in = 0, p_out = 0;

  function automatic int trial_of(logic signed [23:0] f);
    return (int'(f) - FSTART) / FSTEP;
  endfunction

  // stand-in units
  always @(posedge clk) begin
    if (rst_n) begin
      if (p_in != llrin_rpage) sw_in++;
      if (p_out != llrout_rpage) sw_out++;
    end
    p_in <= llrin_rpage; p_out <= llrout_rpage;
    // commands are only sampled out of reset: before the first clock the
    // controller's registers hold arbitrary power-up values
    if (rst_n && pre_cmd_uw) begin
      int i;
      n_uw++;
      i = trial_of(pre_freq);
      fork begin
        repeat ($urandom_range(2, 9)) @(posedge clk);
        pre_accept <= (i % 3) != 1;
        pre_phase_est <= 16'(i * 100);
        pre_done <= 1; @(posedge clk); pre_done <= 0;
      end join_none
    end
    if (rst_n && pre_cmd_corr) begin
      n_corr++;
      fork begin
        repeat ($urandom_range(2, 9)) @(posedge clk);
        pre_done <= 1; @(posedge clk); pre_done <= 0;
      end join_none
    end
    if (rst_n && map_start) begin
      n_map++;
      if (map_first) n_first++;
      if (map_half != exp_half) bad_half++;
      exp_half = ~exp_half;
      fork begin
        repeat ($urandom_range(2, 9)) @(posedge clk);
        map_done <= 1; @(posedge clk); map_done <= 0;
      end join_none
    end
    if (rst_n && post_cmd) begin
      int i;
      n_post++;
      i = trial_of(pre_freq);
      fork begin
        repeat ($urandom_range(2, 9)) @(posedge clk);
        post_c_mag <= 33'(score[i < 0 || i >= NT ? 0 : i]);
        post_dfreq <= 24'(DF);
        post_dphase <= 16'(DPH);
        post_done <= 1; @(posedge clk); post_done <= 0;
      end join_none
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    int acc, best, nupd, bmax;
    acc = 0; best = -1; nupd = 0; bmax = 0;
    for (int i = 0; i < NT; i++) begin
      score[i] = $urandom_range(1000, 100000);
      if (i % 3 != 1) begin
        acc++;
        if (score[i] > bmax) begin bmax = score[i]; best = i; nupd++; end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    expect_eq("UW commands", n_uw, NT);
    expect_eq("correction commands", n_corr, acc + MI);
    expect_eq("MAP runs", n_map, 2 * (TI * acc + MI));
    expect_eq("MAP runs with first", n_first, acc + 1);
    expect_eq("half order errors", bad_half, 0);
    expect_eq("Post runs", n_post, acc + MI);
    expect_eq("found", int'(found), 1);
    expect_eq("best trial", int'(best_idx), best);
    expect_eq("f_est", int'(f_est), FSTART + best * FSTEP + MI * DF);
    expect_eq("phi_est", int'(phi_est), (best * 100 + MI * DPH) % 65536);
    expect_eq("excluded", int'(n_excluded), NT - acc);
    expect_eq("accepted", int'(n_accepted), acc);
    expect_eq("best changes", int'(n_best_upd), nupd);
    expect_eq("LLR-In swaps", sw_in, acc + MI);
    expect_eq("LLR-Out swaps", sw_out, acc + MI);
    expect_eq("Sym page", int'(sym_rpage), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
