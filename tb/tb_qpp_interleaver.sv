// Testbench of qpp_interleaver: walks the K = 832 interleaver forward from
// i = 0 to K-1 and back to 0, comparing every address with
// (f1*i + f2*i^2) mod K computed here, and checks that the forward walk
// visits every address exactly once.
module tb_qpp_interleaver;
  localparam int K = 832, F1 = 25, F2 = 52;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, step_fwd = 0, step_bwd = 0;
  logic [12:0] pi_out;
  int checks = 0, failures = 0;
  bit seen[K];

  qpp_interleaver #(.AW(13)) dut (
    .clk, .rst_n, .k_size(13'(K)), .f1(13'(F1)), .f2(13'(F2)),
    .init, .step_fwd, .step_bwd, .pi_out
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pi(int i);
    return int'((longint'(F1) * i + longint'(F2) * i * i) % K);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < K; i++) begin
      checks++;
      if (int'(pi_out) != ref_pi(i)) begin
        failures++; if (failures < 5) $display("fwd i=%0d got %0d exp %0d", i, pi_out, ref_pi(i));
      end
      seen[pi_out] = 1;
      if (i < K - 1) begin step_fwd = 1; @(negedge clk); step_fwd = 0; end
    end
    checks++;
    foreach (seen[a]) if (!seen[a]) begin failures++; break; end
    for (int i = K - 1; i >= 0; i--) begin
      checks++;
      if (int'(pi_out) != ref_pi(i)) begin
        failures++; if (failures < 5) $display("bwd i=%0d got %0d exp %0d", i, pi_out, ref_pi(i));
      end
      if (i > 0) begin step_bwd = 1; @(negedge clk); step_bwd = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
