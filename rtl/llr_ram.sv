// Double-buffered three-bank LLR memory: LLR-In RAM and LLR-Out RAM.
//
// Bank 0 holds the LLRs of the systematic bits, bank 1 those of the parity
// bits of encoder 1, bank 2 those of encoder 2, each indexed by the
// information bit position k (0..DEPTH-1). Every bank has its own write port
// and its own synchronous read port (data one clock after the address), so a
// producer can write two banks at different addresses in one clock (Pre
// writes the I and Q LLR of a symbol; the MAP decoder writes the APP LLRs of
// a systematic bit at an interleaved address and of a parity bit at a
// natural one) and a consumer can read all three. Each bank has two pages;
// wpage selects the page written and rpage the page read, so the producer
// can fill one page while the consumer reads the other (double buffering as
// in the architecture; the bank and port organisation is this design's).
module llr_ram #(
  parameter int DEPTH = 5124,          // information word size, bits
  parameter int W     = 6,             // LLR width
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                wpage,
  input  logic [2:0]          we,
  input  logic [2:0][AW-1:0]  waddr,
  input  logic [2:0][W-1:0]   wdata,
  input  logic                rpage,
  input  logic [2:0][AW-1:0]  raddr,
  output logic [2:0][W-1:0]   rdata
);
  for (genvar b = 0; b < 3; b++) begin : g_bank
    logic [W-1:0] mem [2][DEPTH];
    always_ff @(posedge clk) begin
      if (we[b]) mem[wpage][waddr[b]] <= wdata[b];
      rdata[b] <= mem[rpage][raddr[b]];
    end
  end
endmodule
