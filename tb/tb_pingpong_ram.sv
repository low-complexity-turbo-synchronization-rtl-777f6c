// Testbench of pingpong_ram: writes both pages with random words, then
// reads them through both read ports at once, each port on its own page and
// address, and compares with a model kept here (read latency one clock).
module tb_pingpong_ram;
  localparam int D = 200, W = 16, AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, wpage = 0, rpage_a = 0, rpage_b = 0;
  logic [AW-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [W-1:0] wdata = '0, rdata_a, rdata_b;
  int checks = 0, failures = 0;
  logic [W-1:0] model [2][D];

  pingpong_ram #(.DEPTH(D), .W(W), .AW(AW)) dut (
    .clk, .we, .wpage, .waddr, .wdata,
    .rpage_a, .raddr_a, .rdata_a, .rpage_b, .raddr_b, .rdata_b
  );

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        we = 1; wpage = p[0]; waddr = AW'(a); wdata = W'($urandom);
        model[p][a] = wdata;
      end
    @(negedge clk); we = 0;
    for (int a = 0; a < D; a++) begin
      int ab;
      ab = D - 1 - a;
      @(negedge clk);
      rpage_a = a[0]; raddr_a = AW'(a);
      rpage_b = ~a[0]; raddr_b = AW'(ab);
      @(negedge clk);
      checks += 2;
      if (rdata_a != model[a & 1][a]) failures++;
      if (rdata_b != model[1 - (a & 1)][ab]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
