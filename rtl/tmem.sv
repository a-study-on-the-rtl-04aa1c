// tmem: transposition memory between the row unit and the column unit.
//
// Two banks of 64 words (one 8x8 block each). The row unit writes its
// result for row r, coefficient k at address {k, r}; the column unit then
// reads column k as the eight consecutive addresses {k, 0..7}. With two
// banks the row unit can fill one block while the column unit drains the
// other (ping-pong), which lets the two 1D units work at the same time.
// Interface: one write port and one read port, both synchronous; rdata is
// the word addressed in the previous cycle with re = 1. A write and a read
// of the same word in one cycle return the old word.
module tmem #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     wbank,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [DW-1:0]     wdata,
  input  logic                     re,
  input  logic                     rbank,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic signed [DW-1:0]     rdata
);
  logic signed [DW-1:0] mem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    if (re) rdata <= mem[{rbank, raddr}];
  end
endmodule
