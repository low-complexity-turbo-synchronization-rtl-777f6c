// Testbench of pre_unit with a short burst (16 code-word symbols between
// the 40-symbol start UW and the 24-symbol end UW, no noise).
//
// The burst carries a frequency offset f0 and a phase offset ph0. Checks:
//   * cmd_uw at the true frequency: the phase estimate equals ph0 plus the
//     phase advance f0 * (mean UW position) within 1 degree, |k| equals the
//     expected coherent sum (64 * |symbol| * sqrt2 times the two CORDIC gains)
//     within 2 %, and the trial is accepted against a threshold of 60 % of it;
//   * cmd_uw at a frequency half a turn per burst away: the trial is excluded;
//   * cmd_corr with the estimated offsets: every code-word bit produces one
//     LLR, written to bank j mod 3 at address j div 3, with the sign of the
//     transmitted bit and the magnitude of the corrected amplitude >> shift;
//   * one symbol per clock: cmd_corr takes at most the number of symbols
//     plus the rotator latency plus 4 clocks.
module tb_pre_unit;
  import ts_pkg::*;
  localparam int NCW = 16, L = 40 + NCW + 24;
  localparam int AMP = 50;
  localparam real TWO24 = 16777216.0;
  localparam real PI2 = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_uw = 0, cmd_corr = 0;
  logic signed [23:0] freq = '0;
  logic [15:0] phase = '0;
  logic [24:0] thresh = '0;
  logic [12:0] sym_raddr;
  cplx_t sym_rdata;
  logic [2:0] llr_we;
  logic [2:0][12:0] llr_waddr;
  logic [2:0][5:0] llr_wdata;
  logic busy, done, accept;
  logic [15:0] phase_est;
  logic [24:0] uw_mag;

  pre_unit dut (
    .clk, .rst_n, .cmd_uw, .cmd_corr, .freq, .phase, .l_len(13'(L)), .thresh,
    .llr_shift(3'd2), .sym_raddr, .sym_rdata, .llr_we, .llr_waddr, .llr_wdata,
    .busy, .done, .accept, .phase_est, .uw_mag
  );

  cplx_t burst [L];
  int bits [2*NCW];
  int got [3][2*NCW];
  int nwr = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) sym_rdata <= burst[sym_raddr];
  always @(posedge clk)
    for (int b = 0; b < 3; b++)
      if (llr_we[b]) begin
        got[b][llr_waddr[b]] = int'($signed(llr_wdata[b]));
        nwr++;
      end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic c);
    @(negedge clk); c = 1; @(negedge clk); c = 0;
  endtask

  function automatic int wrap16(int v);
    v = v % 65536;
    if (v > 32767) v -= 65536;
    if (v < -32768) v += 65536;
    return v;
  endfunction

  initial begin
    real f0, ph0, mean_uw, exp_mag, ph_exp;
    logic [6:0] lf;
    int t0, cyc, e;
    f0 = 7.5e-4; ph0 = 0.137;
    lf = UW_SEED;
    for (int l = 0; l < L; l++) begin
      int bi, bq;
      real th;
      if (l < 40 || l >= L - 24) begin
        logic [1:0] b;
        b = uw_sym(lf); lf = uw_next(lf);
        bi = b[1]; bq = b[0];
      end else begin
        bi = $urandom_range(0, 1); bq = $urandom_range(0, 1);
        bits[2*(l-40)] = bi; bits[2*(l-40)+1] = bq;
      end
      th = PI2 * (f0 * l + ph0);
      burst[l].re = 8'($rtoi((bi ? -AMP : AMP) * $cos(th) - (bq ? -AMP : AMP) * $sin(th)));
      burst[l].im = 8'($rtoi((bi ? -AMP : AMP) * $sin(th) + (bq ? -AMP : AMP) * $cos(th)));
    end
    exp_mag = 64.0 * AMP * 2.0 * 1.6468 * 1.6468;
    mean_uw = 0;
    for (int l = 0; l < 40; l++) mean_uw += l;
    for (int l = L - 24; l < L; l++) mean_uw += l;
    mean_uw /= 64.0;
    ph_exp = ph0;     // corrected by the exact frequency: the phase is ph0
    repeat (2) @(negedge clk);
    rst_n = 1;

    // UW correlation at the true frequency
    freq = 24'($rtoi(f0 * TWO24)); phase = 16'h1234;   // phase must be ignored
    thresh = 25'($rtoi(0.6 * exp_mag));
    pulse(cmd_uw);
    while (!done) @(negedge clk);
    e = wrap16(int'(phase_est) - $rtoi(ph_exp * 65536.0));
    checks++;
    if (e > 182 || e < -182) begin failures++; $display("phase estimate %0d, error %0d", phase_est, e); end
    checks++;
    if (real'(uw_mag) < 0.98 * exp_mag || real'(uw_mag) > 1.02 * exp_mag) begin
      failures++; $display("|k| = %0d, expected %f", uw_mag, exp_mag);
    end
    checks++;
    if (!accept) begin failures++; $display("true frequency excluded"); end

    // a trial frequency half a turn per burst off is excluded
    freq = 24'($rtoi((f0 + 0.5 / L) * TWO24));
    pulse(cmd_uw);
    while (!done) @(negedge clk);
    checks++;
    if (accept) begin failures++; $display("wrong trial accepted, |k| = %0d", uw_mag); end

    // correction and demapping with the true offsets
    freq = 24'($rtoi(f0 * TWO24)); phase = 16'($rtoi(ph0 * 65536.0));
    nwr = 0;
    pulse(cmd_corr);
    t0 = $time;
    while (!done) @(negedge clk);
    cyc = ($time - t0) / 10;
    checks++;
    if (cyc > NCW + 15 + 4 + 4) begin failures++; $display("cmd_corr took %0d clocks", cyc); end
    checks++;
    if (nwr != 2 * NCW) begin failures++; $display("%0d LLRs written", nwr); end
    for (int j = 0; j < 2 * NCW; j++) begin
      int v, m;
      v = got[j % 3][j / 3];
      m = $rtoi(AMP * 1.6468) >>> 2;
      checks++;
      if ((v < 0) != (bits[j] == 1) || (v < 0 ? -v : v) < m - 1 || (v < 0 ? -v : v) > m + 1) begin
        failures++; $display("bit %0d: LLR %0d, bit %0d, expected magnitude %0d", j, v, bits[j], m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
