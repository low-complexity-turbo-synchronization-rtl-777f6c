// Pipelined CORDIC in vectoring mode: magnitude and argument of x + j*y.
//
// Pre uses it for the phase estimate arg(k) of the unique-word correlation
// (Eq. 9) and the magnitude |k| compared with the exclusion threshold
// (Eq. 12); Post uses it for the arguments in the frequency and phase fine
// estimate (Eqs. 4, 5) and the magnitude of the trial correlation (Eq. 10).
// Stage 0 maps the vector into the right half plane (adding half a turn to
// the angle when x < 0); N_ITER stages then rotate it onto the x axis.
// mag_out = G * |x + j*y| with the uncompensated CORDIC gain G ~ 1.6468,
// arg_out is a PH_W-bit phase word (one turn = 2**PH_W). Latency N_ITER+1
// clocks, one input per clock. This circuit is this design's choice.
module cordic_vector #(
  parameter int IN_W   = 32,
  parameter int PH_W   = 16,
  parameter int N_ITER = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x_in,
  input  logic signed [IN_W-1:0] y_in,
  output logic                   out_valid,
  output logic        [IN_W:0]   mag_out,
  output logic        [PH_W-1:0] arg_out
);
  localparam int ATAN16 [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81,
                                 41, 20, 10, 5, 3, 1, 1, 0};
  localparam int IW = IN_W + 3;

  logic signed [IW-1:0]   xs [N_ITER+1];
  logic signed [IW-1:0]   ys [N_ITER+1];
  logic        [PH_W-1:0] zs [N_ITER+1];
  logic [N_ITER:0]        vs;

  function automatic logic [PH_W-1:0] atan_tab(input int i);
    int v;
    v = (i < 16) ? ATAN16[i] : 0;
    if (PH_W >= 16) return PH_W'(v <<< (PH_W - 16));
    else            return PH_W'(v >>> (16 - PH_W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (x_in < 0) begin
        xs[0] <= -IW'(x_in);
        ys[0] <= -IW'(y_in);
        zs[0] <= PH_W'(1) << (PH_W - 1);
      end else begin
        xs[0] <= IW'(x_in);
        ys[0] <= IW'(y_in);
        zs[0] <= '0;
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
        if (ys[i] < 0) begin
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
  assign mag_out   = (IN_W+1)'(xs[N_ITER]);
  assign arg_out   = zs[N_ITER];
endmodule
