// Pipelined CORDIC rotator: (x + j*y) * exp(j*angle) * G, G ~ 1.6468.
//
// Used by Pre and Post to remove a frequency and phase offset from the
// received symbols (they pass the negated correction phase). A first stage
// folds the angle into [-90, +90) degrees by negating the input when the angle
// lies in the left half plane; N_ITER micro-rotation stages follow, one per
// clock. The CORDIC gain G is not compensated: the following LLR scaling and
// correlations only see a constant factor.
// Interface: in_valid/x_in/y_in/angle (PH_W-bit phase, one turn = 2**PH_W)
// enter each clock; out_valid/x_out/y_out leave N_ITER+1 clocks later. The
// rotation itself is this design's choice of circuit for the frequency and
// phase correction.
module cordic_rotate #(
  parameter int IN_W   = 8,
  parameter int OUT_W  = IN_W + 2,
  parameter int PH_W   = 16,
  parameter int N_ITER = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [IN_W-1:0]  y_in,
  input  logic        [PH_W-1:0]  angle,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x_out,
  output logic signed [OUT_W-1:0] y_out
);
  // atan(2^-i) in units of 2^-16 turn; rescaled to PH_W below.
  localparam int ATAN16 [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81,
                                 41, 20, 10, 5, 3, 1, 1, 0};
  localparam int IW = OUT_W + 2;   // internal width with guard bits

  logic signed [IW-1:0]   xs [N_ITER+1];
  logic signed [IW-1:0]   ys [N_ITER+1];
  logic signed [PH_W:0]   zs [N_ITER+1];
  logic [N_ITER:0]        vs;

  function automatic logic signed [PH_W:0] atan_tab(input int i);
    int v;
    v = (i < 16) ? ATAN16[i] : 0;
    if (PH_W >= 16) return (PH_W+1)'(v <<< (PH_W - 16));
    else            return (PH_W+1)'(v >>> (16 - PH_W));
  endfunction

  // Stage 0: fold the angle into the right half plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (angle[PH_W-1] ^ angle[PH_W-2]) begin
        xs[0] <= -IW'(x_in);
        ys[0] <= -IW'(y_in);
        zs[0] <= $signed({1'b0, angle}) - $signed((PH_W+1)'(1) <<< (PH_W-1));
      end else begin
        xs[0] <= IW'(x_in);
        ys[0] <= IW'(y_in);
        zs[0] <= $signed({angle[PH_W-1], angle});
      end
    end
  end

  for (genvar i = 0; i < N_ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_tab(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_tab(i);
        end
      end
    end
  end

  assign out_valid = vs[N_ITER];
  assign x_out     = OUT_W'(xs[N_ITER]);
  assign y_out     = OUT_W'(ys[N_ITER]);
endmodule
