// in_reg8: input register of a 1D unit: eight DW-bit words written one at a
// time, read all at once.
//
// The word stream arriving from a bus (or from the transposition memory) is
// collected here so that the 1D unit can take a whole row or column in one
// cycle and the next row can be loaded while the unit is still computing.
// Interface: when we = 1, word waddr takes wdata on the clock edge; q shows
// all eight words. Reset clears the words.
module in_reg8 #(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [2:0]           waddr,
  input  logic signed [DW-1:0] wdata,
  output logic signed [DW-1:0] q [8]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) q[i] <= '0;
    end else if (we) begin
      q[waddr] <= wdata;
    end
endmodule
