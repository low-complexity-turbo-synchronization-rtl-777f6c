// Testbench of llr_ram: fills both pages of all three banks with random
// words, writing two banks per clock at different addresses, then reads
// every word back (three banks per clock, read data one clock after the
// address) and compares it with a model kept here. Page isolation is
// checked by writing the two pages with different data.
module tb_llr_ram;
  localparam int D = 100, W = 8, AW = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wpage = 0, rpage = 0;
  logic [2:0] we = '0;
  logic [2:0][AW-1:0] waddr = '0, raddr = '0;
  logic [2:0][W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [2][3][D];

  llr_ram #(.DEPTH(D), .W(W), .AW(AW)) dut (.clk, .wpage, .we, .waddr, .wdata, .rpage, .raddr, .rdata);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < D; a++)
        for (int b = 0; b < 3; b++) begin
          // two banks per clock: bank b at address a, bank (b+1)%3 at D-1-a
          int b2, a2;
          b2 = (b + 1) % 3; a2 = D - 1 - a;
          @(negedge clk);
          wpage = p[0];
          we = '0; we[b] = 1; we[b2] = 1;
          waddr[b] = AW'(a); waddr[b2] = AW'(a2);
          wdata[b] = W'($urandom); wdata[b2] = W'($urandom);
          model[p][b][a] = wdata[b];
          model[p][b2][a2] = wdata[b2];
        end
    @(negedge clk); we = '0;
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        rpage = p[0];
        for (int b = 0; b < 3; b++) raddr[b] = AW'((a + 17 * b) % D);
        @(negedge clk);
        for (int b = 0; b < 3; b++) begin
          checks++;
          if (rdata[b] != model[p][b][(a + 17 * b) % D]) begin
            failures++;
            if (failures < 5) $display("page %0d bank %0d addr %0d: %h vs %h", p, b, (a + 17 * b) % D, rdata[b], model[p][b][(a + 17 * b) % D]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
