// ci_adder: adder/subtractor made of NBLK ripple-carry blocks of BW bits
// followed by NBLK-1 half-adder incrementers (a carry-increment adder).
//
// Every block adds its slice of the operands at once, block 0 with the real
// carry-in and the others with carry-in 0, so the ripple delay is that of
// one BW-bit block. In the second step each upper block's partial sum passes
// through a row of half adders that adds 1 when the carry arriving from the
// block below is 1. The carry into block i+1 is the block's own carry-out
// OR the incrementer's carry-out (both cannot be 1). This trades the extra
// area of the incrementers for a shorter carry path than one long ripple
// chain, without duplicating whole adders as a carry-select adder does.
//
// The eight 4-bit blocks and seven half-adder stages follow the published
// adder; the subtract input (b inverted, carry-in 1) is this design's way of
// turning it into the adder/subtractor used by the accumulators.
// Interface: sum = a + b (sub = 0) or a - b (sub = 1), modulo 2^(NBLK*BW).
// Combinational, no clock.
module ci_adder #(
  parameter int unsigned NBLK = 8,
  parameter int unsigned BW   = 4,
  localparam int unsigned W   = NBLK * BW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0]    bx;
  logic [W-1:0]    praw;   // block sums before the increment step
  logic [NBLK-1:0] gcy;    // block carry-outs

  assign bx = b ^ {W{sub}};

  for (genvar i = 0; i < NBLK; i++) begin : g_blk
    rca_block #(.BW(BW)) u_rca (
      .a   (a[i*BW +: BW]),
      .b   (bx[i*BW +: BW]),
      .cin ((i == 0) ? sub : 1'b0),
      .s   (praw[i*BW +: BW]),
      .cout(gcy[i])
    );
  end

  // Increment step: half-adder rows for blocks 1..NBLK-1.
  // cy is the carry arriving at block i; hc ripples through its half adders.
  always_comb begin
    logic cy, hc;
    sum[BW-1:0] = praw[BW-1:0];
    cy = gcy[0];
    for (int i = 1; i < NBLK; i++) begin
      hc = cy;
      for (int j = 0; j < BW; j++) begin
        sum[i*BW + j] = praw[i*BW + j] ^ hc;
        hc            = praw[i*BW + j] & hc;
      end
      cy = gcy[i] | hc;
    end
    cout = cy;
  end
endmodule
