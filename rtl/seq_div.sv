// Sequential signed-by-unsigned divider (restoring, one quotient bit per
// clock), quotient truncated toward zero.
//
// Post uses it once per fine-synchronization step to turn the measured phase
// advance between the two burst halves into a frequency (division by the
// burst length L). start loads dividend and divisor; done pulses with the
// quotient DW+1 clocks later. Divisor 0 gives an all-ones magnitude.
module seq_div #(
  parameter int DW = 26,   // dividend width (signed)
  parameter int VW = 13    // divisor width (unsigned)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] dividend,
  input  logic        [VW-1:0] divisor,
  output logic                 busy,
  output logic                 done,
  output logic signed [DW-1:0] quotient
);
  logic [DW-1:0]   q;       // magnitude of the dividend, shifted into quotient
  logic [VW:0]     rem;
  logic [VW-1:0]   dv;
  logic            neg;
  logic [$clog2(DW+1)-1:0] n;

  logic [VW+1:0] trial;
  assign trial = {rem, q[DW-1]} - {2'b0, dv};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dv <= '0; neg <= 1'b0; n <= '0;
      busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= dividend[DW-1] ? DW'(-dividend) : DW'(dividend);
        neg  <= dividend[DW-1];
        dv   <= divisor;
        rem  <= '0;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[VW+1]) begin
          rem <= trial[VW:0];
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= {rem[VW-1:0], q[DW-1]};
          q   <= {q[DW-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($clog2(DW+1))'(DW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (busy && n == ($clog2(DW+1))'(DW - 1))
        quotient <= neg ? -$signed(trial[VW+1] ? {q[DW-2:0], 1'b0} : {q[DW-2:0], 1'b1})
                        :  $signed(trial[VW+1] ? {q[DW-2:0], 1'b0} : {q[DW-2:0], 1'b1});
    end
  end
endmodule
