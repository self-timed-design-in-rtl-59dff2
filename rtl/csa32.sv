// csa32: a row of W (3,2) counters (full adders), the carry-save adder.
//
// Three W-bit operands are reduced to a sum vector and a carry vector with
// a + b + d == s + c (mod 2**W); the carry vector is already shifted one place
// left, its bit 0 is 0. Purely combinational: one counter delay, no carry
// propagation. The counter itself is the original design's basic cell; the row form
// is how this design uses it.
module csa32 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;   // the carry out of the top bit leaves the W-bit window (mod 2**W)

  always_comb begin
    s   = a ^ b ^ d;
    maj = (a & b) | (a & d) | (b & d);
    c   = {maj[W-2:0], 1'b0};
  end
endmodule
