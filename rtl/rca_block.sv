// rca_block: BW-bit ripple-carry adder, the building block of ci_adder.
//
// A chain of BW full adders; the carry ripples from bit 0 upwards.
// Purely combinational.
module rca_block #(
  parameter int unsigned BW = 4
) (
  input  logic [BW-1:0] a,
  input  logic [BW-1:0] b,
  input  logic          cin,
  output logic [BW-1:0] s,
  output logic          cout
);
  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < BW; i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end
endmodule
