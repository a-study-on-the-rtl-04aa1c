// da_unit: distributed-arithmetic inner product of four B-bit two's
// complement words with four fixed coefficients (one ROM table).
//
// The words are presented one bit plane per cycle, least significant bit
// first, as a 4-bit ROM address. Each cycle the ROM word is shifted left by
// the bit position and added to the accumulator; in the sign-bit cycle
// (msb = 1) it is subtracted instead, which accounts for the negative weight
// of the two's complement sign bit without doubling the ROM. After B cycles
// acc = sum_j c_j * x_j exactly. This is the scheme of the published DA
// figure (ROM feeding an ADD/SUB with a select input and feedback); the
// add/subtract is the carry-increment adder ci_adder.
// Interface: first = 1 clears the accumulator before adding (accumulator
// reset folded into the first bit cycle); en = 1 performs one bit step;
// bitpos is the weight 2^bitpos of the present bit plane.
// Timing: acc is registered; it holds the result in the cycle after the
// sign-bit step and keeps it until the next first step.
module da_unit #(
  parameter int unsigned K      = 0,
  parameter bit          IS_ODD = 1'b0,
  parameter int unsigned B      = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dct,
  input  logic                          en,
  input  logic                          first,
  input  logic                          msb,
  input  logic [$clog2(B)-1:0]          bitpos,
  input  logic [3:0]                    addr,
  output logic signed [dct_pkg::AW-1:0] acc
);
  import dct_pkg::AW;

  logic signed [15:0]   rom_q;
  logic signed [AW-1:0] shifted;
  logic        [AW-1:0] opa, nxt;
  logic                 unused_cout;

  da_rom #(.K(K), .IS_ODD(IS_ODD)) u_rom (.dct(dct), .addr(addr), .q(rom_q));

  // "Shifter": ROM word weighted by the present bit position.
  assign shifted = AW'(rom_q) <<< bitpos;
  assign opa     = first ? '0 : acc;

  ci_adder u_add (.a(opa), .b(shifted), .sub(msb), .sum(nxt), .cout(unused_cout));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  acc <= '0;
    else if (en) acc <= nxt;
endmodule
