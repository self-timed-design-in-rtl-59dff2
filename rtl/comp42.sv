// comp42: a row of W (4,2) cells, the reduction unit of the PAA main stages and
// of the accumulator.
//
// Four W-bit operands become one carry-save pair: a + b + d + e == s + c
// (mod 2**W). Each (4,2) cell is built from two (3,2) counters with the
// intermediate carry passed to the next bit position, so the delay is two
// counter delays and there is no carry ripple. The original design names the (4,2)
// cell and its two-counter delay; the two-counter construction is the usual
// one and is this implementation's choice. Combinational.
module comp42 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] s1, c1;

  // First counter level: a, b, d. Its shifted carries feed the second level.
  csa32 #(.W(W)) u_lvl1 (.a(a), .b(b), .d(d), .s(s1), .c(c1));
  // Second counter level: partial sum, the fourth operand and the
  // intermediate carries.
  csa32 #(.W(W)) u_lvl2 (.a(s1), .b(e), .d(c1), .s(s), .c(c));
endmodule
