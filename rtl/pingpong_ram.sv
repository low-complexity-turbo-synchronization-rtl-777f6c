// Double-buffered (ping-pong) RAM, used as the Sym RAM of the receiver.
//
// Two pages of DEPTH words each. The writer fills one page while the readers
// work on the other, so a new burst can be loaded while the current one is
// processed; the controller swaps the pages. One write port and two
// independent synchronous read ports (Pre and Post both read the received
// burst); each port names its page. Read data appears one clock after the
// address. Memory contents are not reset. That all RAMs are double buffered
// follows the architecture; the port set is this design's choice.
module pingpong_ram #(
  parameter int DEPTH = 7750,        // symbols per burst page
  parameter int W     = 16,          // word width (complex sample)
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wpage,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rpage_a,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic          rpage_b,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wpage][waddr] <= wdata;
    rdata_a <= mem[rpage_a][raddr_a];
    rdata_b <= mem[rpage_b][raddr_b];
  end
endmodule
