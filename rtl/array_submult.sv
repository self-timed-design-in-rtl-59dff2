// array_submult: array-type sub-multiplier of the array-of-array scheme.
//
// Multiplies the NX-bit multiplicand x by an L-bit group y of multiplier bits
// and leaves the result x*y in carry-save form (s + c, NX+L bits). The L
// partial products x*y[j]*2**j are summed the way an array multiplier does
// it: the first two rows form the initial pair and every further row passes
// through one more row of (3,2) counters, so the delay is L-2 counter delays.
// The sub-arrays used in the slice have L = 2 (no counters at all) and L = 4
// (two counter rows). Combinational. The original design gives the sub-array's role
// and its row counts; the ripple-free row-by-row arrangement is this design's.
module array_submult #(
  parameter int unsigned NX = 24,
  parameter int unsigned L  = 4
) (
  input  logic [NX-1:0]   x,
  input  logic [L-1:0]    y,
  output logic [NX+L-1:0] s,
  output logic [NX+L-1:0] c
);
  localparam int unsigned W = NX + L;

  // Partial product rows, already placed at their weights.
  logic [W-1:0] pp [L];
  always_comb begin
    for (int j = 0; j < L; j++)
      pp[j] = W'({{L{1'b0}}, x & {NX{y[j]}}}) << j;
  end

  // Row chain: rs/rc hold the running carry-save pair after each row.
  logic [W-1:0] rs [L];
  logic [W-1:0] rc [L];
  assign rs[1] = pp[0];
  assign rc[1] = pp[1];
  assign rs[0] = '0;
  assign rc[0] = '0;

  for (genvar j = 2; j < L; j++) begin : g_row
    csa32 #(.W(W)) u_row (.a(rs[j-1]), .b(rc[j-1]), .d(pp[j]), .s(rs[j]), .c(rc[j]));
  end

  assign s = rs[L-1];
  assign c = rc[L-1];
endmodule
