// Turbo interleaver address generator, pi(i) = (f1*i + f2*i^2) mod K.
//
// The interleaver law is not published; a quadratic permutation polynomial
// (QPP) is used because it is contention-free, needs no table and can be
// stepped in both directions with additions only, which is what the MAP
// decoder needs: its forward recursion walks i = 0..K-1, its backward
// recursion walks back from K-1. The generator keeps pi(i) and the increment
// g(i) = pi(i+1) - pi(i) = (f1 + f2*(2i+1)) mod K:
//   forward : pi <- pi + g,           g <- g + 2*f2
//   backward: g  <- g - 2*f2,         pi <- pi - g
// all modulo K. f1 and f2 must be below K and form a valid QPP for K
// (f1 coprime with K, f2 containing every prime factor of K).
// init loads i = 0 (pi = 0); step_fwd / step_bwd move one position per clock;
// pi_out is the registered pi(i) of the current position.
module qpp_interleaver #(
  parameter int AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] k_size,
  input  logic [AW-1:0] f1,
  input  logic [AW-1:0] f2,
  input  logic          init,
  input  logic          step_fwd,
  input  logic          step_bwd,
  output logic [AW-1:0] pi_out
);
  logic [AW-1:0] g_q, f2x2_q;

  function automatic logic [AW-1:0] add_mod(input logic [AW-1:0] a, b, m);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[AW-1:0];
  endfunction

  function automatic logic [AW-1:0] sub_mod(input logic [AW-1:0] a, b, m);
    logic [AW:0] d;
    d = {1'b0, a} - {1'b0, b};
    if (a < b) d = d + {1'b0, m};
    return d[AW-1:0];
  endfunction

  logic [AW-1:0] g_back;
  assign g_back = sub_mod(g_q, f2x2_q, k_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_out <= '0;
      g_q    <= '0;
      f2x2_q <= '0;
    end else if (init) begin
      pi_out <= '0;
      g_q    <= add_mod(f1, f2, k_size);
      f2x2_q <= add_mod(f2, f2, k_size);
    end else if (step_fwd) begin
      pi_out <= add_mod(pi_out, g_q, k_size);
      g_q    <= add_mod(g_q, f2x2_q, k_size);
    end else if (step_bwd) begin
      pi_out <= sub_mod(pi_out, g_back, k_size);
      g_q    <= g_back;
    end
  end
endmodule
