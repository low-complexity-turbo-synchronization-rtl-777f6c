// Self-checking testbench of map_decoder.
//
// A random information word of K bits is encoded by a behavioural RSC/turbo
// encoder (shift-register model written here, independent of the package
// trellis functions), sent through a noisy BPSK channel and quantised to
// 6-bit LLRs. The decoder runs three half iterations (decoder 1 first, then
// decoder 2, then decoder 1 again); after each one every extrinsic and APP
// LLR it wrote is compared with an integer Max-Log-MAP reference computed
// here, and the run time is checked against 2*K + 5 clocks. At the end the
// hard decisions of the systematic APP LLRs must equal the information bits.
module tb_map_decoder;
  localparam int K  = 64;
  localparam int AW = 7;
  localparam int F1 = 7, F2 = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, half, first, busy, done;
  logic [2:0][AW-1:0] in_raddr;
  logic [2:0][5:0]    in_rdata;
  logic [2:0]         out_we;
  logic [2:0][AW-1:0] out_waddr;
  logic [2:0][7:0]    out_wdata;

  map_decoder #(.KMAX(100), .AW(AW)) dut (
    .clk, .rst_n, .start, .half, .first,
    .k_size(AW'(K)), .f1(AW'(F1)), .f2(AW'(F2)),
    .busy, .done, .in_raddr, .in_rdata, .out_we, .out_waddr, .out_wdata
  );

  int checks = 0, failures = 0;

  // channel LLR banks and written outputs
  int lin [3][K];
  int lout[3][K];
  int ref_ext[K];
  int info[K], pil[K];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 3; b++) in_rdata[b] <= 6'(lin[b][in_raddr[b][5:0]]);
    for (int b = 0; b < 3; b++)
      if (out_we[b]) lout[b][out_waddr[b][5:0]] = int'($signed(out_wdata[b]));
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- independent behavioural encoder: feedback 1+D^3+D^4, fwd 1+D+D^3+D^4
  function automatic void encode(input int u[K], output int p[K]);
    int r[5];   // r[1..4] = D^1..D^4
    for (int i = 1; i < 5; i++) r[i] = 0;
    for (int k = 0; k < K; k++) begin
      int a;
      a = u[k] ^ r[3] ^ r[4];
      p[k] = a ^ r[1] ^ r[3] ^ r[4];
      r[4] = r[3]; r[3] = r[2]; r[2] = r[1]; r[1] = a;
    end
  endfunction

  // trellis from the same shift-register description, state = r1 r2 r3 r4
  function automatic int nxt(int s, int u);
    int r1, r2, r3, r4, a;
    r1 = (s >> 3) & 1; r2 = (s >> 2) & 1; r3 = (s >> 1) & 1; r4 = s & 1;
    a = u ^ r3 ^ r4;
    return (a << 3) | (r1 << 2) | (r2 << 1) | r3;
  endfunction
  function automatic int par(int s, int u);
    int r1, r3, r4, a;
    r1 = (s >> 3) & 1; r3 = (s >> 1) & 1; r4 = s & 1;
    a = u ^ r3 ^ r4;
    return a ^ r1 ^ r3 ^ r4;
  endfunction
  function automatic int sat(int v, int w);
    int m;
    m = (1 << (w - 1)) - 1;
    return v > m ? m : (v < -m ? -m : v);
  endfunction

  // Reference half iteration. sys/pp/la in decoding order.
  function automatic void ref_half(input int sys[K], input int pp[K], input int la[K],
                                   output int app_u[K], output int app_p[K], output int ext[K]);
    int al[K+1][16];
    int be[16], bn[16];
    for (int s = 0; s < 16; s++) al[0][s] = (s == 0) ? 0 : -16384;
    for (int k = 0; k < K; k++) begin
      int t[16];
      for (int s = 0; s < 16; s++) t[s] = -100000;
      for (int s = 0; s < 16; s++)
        for (int u = 0; u < 2; u++) begin
          int g, n;
          g = (u == 0 ? sys[k] + la[k] : 0) + (par(s, u) == 0 ? pp[k] : 0);
          n = nxt(s, u);
          if (al[k][s] + g > t[n]) t[n] = al[k][s] + g;
        end
      for (int s = 0; s < 16; s++) al[k+1][s] = t[s] - t[0];
    end
    for (int s = 0; s < 16; s++) be[s] = 0;
    for (int k = K - 1; k >= 0; k--) begin
      int mu0, mu1, mp0, mp1, lu, le;
      mu0 = -100000; mu1 = -100000; mp0 = -100000; mp1 = -100000;
      for (int s = 0; s < 16; s++) begin
        bn[s] = -100000;
        for (int u = 0; u < 2; u++) begin
          int g, m;
          g = (u == 0 ? sys[k] + la[k] : 0) + (par(s, u) == 0 ? pp[k] : 0);
          m = al[k][s] + g + be[nxt(s, u)];
          if (u == 0 && m > mu0) mu0 = m;
          if (u == 1 && m > mu1) mu1 = m;
          if (par(s, u) == 0 && m > mp0) mp0 = m;
          if (par(s, u) == 1 && m > mp1) mp1 = m;
          if (g + be[nxt(s, u)] > bn[s]) bn[s] = g + be[nxt(s, u)];
        end
      end
      for (int s = 0; s < 16; s++) be[s] = bn[s] - bn[0];
      lu = mu0 - mu1;
      app_u[k] = sat(lu, 8);
      app_p[k] = sat(mp0 - mp1, 8);
      le = lu - sys[k] - la[k];
      ext[k] = sat((3 * le) >>> 2, 8);
    end
  endfunction

  task automatic run_half(input logic h, input logic f);
    int sys[K], pp[K], la[K], au[K], ap[K], ex[K], t0, cyc;
    for (int k = 0; k < K; k++) begin
      int a;
      a = h ? pil[k] : k;
      sys[k] = lin[0][a];
      pp[k]  = lin[h ? 2 : 1][k];
      la[k]  = f ? 0 : ref_ext[a];
    end
    ref_half(sys, pp, la, au, ap, ex);
    @(negedge clk); start = 1; half = h; first = f;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * K + 4) begin
      failures++; $display("half %0d: %0d clocks, expected %0d", h, cyc, 2 * K + 4);
    end
    for (int k = 0; k < K; k++) begin
      int a;
      a = h ? pil[k] : k;
      ref_ext[a] = ex[k];
      checks++;
      if (dut.ext_mem[a] != 8'(ex[k])) begin
        failures++; if (failures < 10) $display("ext k=%0d dut=%0d ref=%0d", k, $signed(dut.ext_mem[a]), ex[k]);
      end
      checks++;
      if (lout[h ? 2 : 1][k] != ap[k]) begin
        failures++; if (failures < 10) $display("app_p k=%0d dut=%0d ref=%0d", k, lout[h ? 2 : 1][k], ap[k]);
      end
      if (h) begin
        checks++;
        if (lout[0][a] != au[k]) begin
          failures++; if (failures < 10) $display("app_u k=%0d dut=%0d ref=%0d", k, lout[0][a], au[k]);
        end
      end
    end
  endtask

  initial begin
    int p1[K], p2[K], ui[K];
    start = 0; half = 0; first = 0;
    for (int k = 0; k < K; k++) begin
      info[k] = $urandom_range(0, 1);
      pil[k]  = (F1 * k + F2 * k * k) % K;
    end
    for (int k = 0; k < K; k++) ui[k] = info[pil[k]];
    encode(info, p1);
    encode(ui, p2);
    for (int k = 0; k < K; k++) begin
      int bits[3];
      bits[0] = info[k]; bits[1] = p1[k]; bits[2] = p2[k];
      for (int b = 0; b < 3; b++) begin
        int n;
        n = int'($urandom_range(0, 16)) - 8 + int'($urandom_range(0, 16)) - 8;
        lin[b][k] = sat((bits[b] ? -10 : 10) + n, 6);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_half(0, 1);
    run_half(1, 0);
    run_half(0, 0);
    run_half(1, 0);
    for (int k = 0; k < K; k++) begin
      checks++;
      if ((lout[0][k] < 0) != (info[k] == 1)) begin
        failures++; $display("decision k=%0d wrong", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
