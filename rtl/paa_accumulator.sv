// paa_accumulator: the (4,2)-based accumulator that closes the PAA iteration.
//
// Each pass delivers the carry-save pair (ps, pc) of x times one 8-bit slice
// of the multiplier. Slices arrive most significant first, so the running
// total is shifted left by SHIFT bits (pure wiring) and added to the new pair
// in one row of (4,2) cells: acc' = (acc << SHIFT) + ps + pc, all in
// carry-save form, W bits wide. On the first pass of a multiply (first = 1)
// the old total is replaced by zero. After the last pass the pair holds the
// full product, still in carry-save form, for the final adder.
//
// Storage is a pair of transition latches. The output latch q is the stage
// latch: it captures on an event of `cap` (the stage's C-element) and opens
// on the following event of `pass` (the next stage's acknowledge). A feedback
// latch, open exactly while q is closed, copies the captured total and holds
// it while q is open again, so the loop from output back to input never runs
// through two open latches. A tag (pass index) rides along with the data.
// A lint tool that does not follow latch enables reports the loop
// output latch -> feedback latch -> (4,2) row -> output latch as circular
// combinational logic. The two latches are never open together (one is open
// while cap == pass, the other while cap != pass), so the loop is always
// broken by a closed latch; the warning stands for that reason.
// The accumulator and its feedback path are drawn in the design; the
// most-significant-slice-first order and the feedback latch are this
// design's choices.
module paa_accumulator #(
  parameter int unsigned W     = 48,
  parameter int unsigned PW    = 32,
  parameter int unsigned SHIFT = 8,
  parameter int unsigned TW    = 2
) (
  input  logic          rst_n,
  input  logic          cap,      // capture event (stage C-element output)
  input  logic          pass,     // pass event (acknowledge of the next stage)
  input  logic          first,    // first pass of a multiply: start from zero
  input  logic [PW-1:0] ps,
  input  logic [PW-1:0] pc,
  input  logic [TW-1:0] tag_in,
  output logic [W-1:0]  s,
  output logic [W-1:0]  c,
  output logic [TW-1:0] tag
);
  logic [W-1:0]  fb_s, fb_c;     // feedback latch contents: previous total
  logic [W-1:0]  old_s, old_c;
  logic [W-1:0]  nx_s, nx_c;

  always_comb begin
    old_s = first ? '0 : (fb_s << SHIFT);
    old_c = first ? '0 : (fb_c << SHIFT);
  end

  comp42 #(.W(W)) u_acc42 (
    .a(old_s), .b(old_c), .d(W'(ps)), .e(W'(pc)),
    .s(nx_s), .c(nx_c)
  );

  // Stage (output) latch.
  mp_latch #(.W(2*W+TW)) u_q (
    .rst_n(rst_n), .c(cap), .p(pass),
    .d({nx_s, nx_c, tag_in}), .q({s, c, tag})
  );

  // Feedback latch: transparent while the output latch holds (cap != pass).
  mp_latch #(.W(2*W)) u_fb (
    .rst_n(rst_n), .c(cap), .p(~pass),
    .d({s, c}), .q({fb_s, fb_c})
  );
endmodule
