// Testbench of post_unit with a noiseless burst (664 symbols: 40 start
// UW, 600 code-word, 24 end UW symbols) carrying a frequency offset f0 and a
// phase offset ph0, and APP LLRs of the code-word bits placed in three
// banks as the decoder writes them (bit j: bank j mod 3, address j div 3).
// Checks:
//   * uncorrected (freq = phase = 0) and APP LLRs of +-100: the residual
//     estimate dfreq equals f0 within 1 % and dphase equals ph0 within
//     1.5 degrees;
//   * corrected with f0 and ph0: dfreq and dphase near zero and |c| equal to
//     the coherent sum L * 2 * G * A * 127 * G (G = CORDIC gain) within 2 %;
//   * corrected, with APP LLRs of +-8 (tanh(1) = 0.762 soft symbols on the
//     code-word symbols): |c| drops by the expected amount within 2 %;
//   * done arrives within L + 80 clocks of the command.
module tb_post_unit;
  import ts_pkg::*;
  localparam int NCW = 600, L = 40 + NCW + 24;
  localparam int AMP = 50;
  localparam real TWO24 = 16777216.0;
  localparam real PI2 = 6.283185307179586;
  localparam real G = 1.6468;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd = 0;
  logic signed [23:0] freq = '0;
  logic [15:0] phase = '0;
  logic [12:0] sym_raddr;
  cplx_t sym_rdata;
  logic [2:0][12:0] llr_raddr;
  logic [2:0][7:0] llr_rdata;
  logic busy, done;
  logic [32:0] c_mag;
  logic signed [23:0] dfreq;
  logic [15:0] dphase;

  post_unit dut (
    .clk, .rst_n, .cmd, .freq, .phase, .l_len(13'(L)), .sym_raddr, .sym_rdata,
    .llr_raddr, .llr_rdata, .busy, .done, .c_mag, .dfreq, .dphase
  );

  cplx_t burst [L];
  int bits [2*NCW];
  int app [3][NCW];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    sym_rdata <= burst[sym_raddr];
    for (int b = 0; b < 3; b++) llr_rdata[b] <= 8'(app[b][llr_raddr[b] % NCW]);
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(int v);
    v = v % 65536;
    if (v > 32767) v -= 65536;
    if (v < -32768) v += 65536;
    return v;
  endfunction

  task automatic run(input real f, input real ph, output int cyc);
    int t0;
    freq = 24'($rtoi(f * TWO24)); phase = 16'($rtoi(ph * 65536.0));
    @(negedge clk); cmd = 1; @(negedge clk); cmd = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    cyc = ($time - t0) / 10;
    checks++;
    if (cyc > L + 80) begin failures++; $display("took %0d clocks", cyc); end
  endtask

  task automatic set_app(input int mag);
    for (int j = 0; j < 2 * NCW; j++) app[j % 3][j / 3] = bits[j] ? -mag : mag;
  endtask

  initial begin
    real f0, ph0, c_full, c_soft;
    logic [6:0] lf;
    int cyc, e, ef;
    f0 = 1.0e-3; ph0 = -0.08;
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
    set_app(100);
    repeat (2) @(negedge clk);
    rst_n = 1;

    run(0.0, 0.0, cyc);
    ef = int'(dfreq) - $rtoi(f0 * TWO24);
    checks++;
    if (ef > 168 || ef < -168) begin failures++; $display("dfreq %0d, error %0d", dfreq, ef); end
    e = wrap16(int'(dphase) - $rtoi(ph0 * 65536.0));
    checks++;
    if (e > 273 || e < -273) begin failures++; $display("dphase %0d, error %0d", dphase, e); end

    run(f0, ph0, cyc);
    checks++;
    if (dfreq > 60 || dfreq < -60) begin failures++; $display("residual dfreq %0d", dfreq); end
    e = wrap16(int'(dphase));
    checks++;
    if (e > 182 || e < -182) begin failures++; $display("residual dphase %0d", e); end
    c_full = L * 2.0 * G * AMP * 127.0 * G;
    checks++;
    if (real'(c_mag) < 0.98 * c_full || real'(c_mag) > 1.02 * c_full) begin
      failures++; $display("|c| = %0d expected %f", c_mag, c_full);
    end

    set_app(8);
    run(f0, ph0, cyc);
    c_soft = (64.0 * 127.0 + NCW * 97.0) * 2.0 * G * AMP * G;
    checks++;
    if (real'(c_mag) < 0.98 * c_soft || real'(c_mag) > 1.02 * c_soft) begin
      failures++; $display("soft |c| = %0d expected %f", c_mag, c_soft);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
