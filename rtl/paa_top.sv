// paa_top: self-timed 24 x 24 partial-array-of-array (PAA) multiplier, the
// mantissa multiplier of an IEEE single-precision floating-point multiplier.
//
// Architecture. The multiplier operand is consumed in three 8-bit slices,
// most significant slice first. For each slice the array reduces the eight
// partial products x * y[j] in a two-stage pipeline: stage 1 has two 2-row
// sub-arrays (y[1:0], y[3:2]) merged by a row of (4,2) cells, and in parallel
// a 4-row sub-array (y[7:4]); stage 2 merges the two carry-save pairs with a
// second row of (4,2) cells into x * slice. Stage 3 is the (4,2)-based
// accumulator that adds each slice product into the running total, and
// stage 4 the final carry-completion-sensing adder (cpa_stage).
//
// Timing. There is no clock. Each of stages 1 to 3 is a micropipeline stage:
// a Muller C-element takes the request of the previous stage (through a
// variable delay matched to the stage's logic, the bundling delay) and the
// inverted acknowledge of the next stage, and its output captures the
// stage's latch and serves as the acknowledge backwards. All handshakes are
// two-phase (every edge is an event). The final adder is delay-insensitive
// and runs its own four-phase cycle.
//
// Interface. For each slice the environment sets x and y (the slice) and
// toggles `start`; when `start_ack` has made the same transition the slice is
// captured and x and y may change. A multiply is three slices, y[23:16],
// y[15:8], y[7:0] in that order. The product appears on `prod` with a toggle
// of `prod_req`, and the environment answers by toggling `prod_ack`.
// `dly_sel` is the common setting of all variable delay elements. The
// parameters set the delay model: DLY_BASE_PS + dly_sel * DLY_STEP_PS per
// bundling delay (3.2 ns at dly_sel = 4: about 10.2 ns per multiply and
// 16.6 ns from the first slice to the last pass in the accumulator),
// PASS_PS for a latch to pass data, and CPA_CELL_PS for one carry cell of the
// final adder (simulation only). Reset is
// asynchronous and active low; `start` and `prod_ack` must be low during
// reset.
//
// The pass-index counter of stage 1 (stage latch plus a second latch that is
// open only while the stage latch holds) and the accumulator's feedback path
// are loops through pairs of latches that are never open at the same time;
// lint reports them as circular combinational logic, and the report stands
// for that reason.
//
// The stage structure, the slice width, the iteration count and the control
// (C-elements, variable delays, transition latches) follow the design as
// published. The slice order, the pass-index tag that travels with the data,
// the feedback latch of the accumulator and the handshake of the final stage
// are this implementation's own. The rounding logic that would follow the
// final adder is not part of this RTL.
module paa_top
  import paa_pkg::*;
#(
  parameter int unsigned DLY_BASE_PS = 2200,  // variable delay: base value
  parameter int unsigned DLY_STEP_PS = 250,   // variable delay: step per dly_sel count
  parameter int unsigned PASS_PS     = 200,   // latch pass time (pass-done delay)
  parameter int unsigned CPA_CELL_PS = 100    // carry cell delay of the final adders (simulation only)
) (
  input  logic                 rst_n,
  input  logic [N_BITS-1:0]    x,          // multiplicand
  input  logic [SLICE_BITS-1:0] y,         // current multiplier slice
  input  logic                 start,      // two-phase request: slice valid
  output logic                 start_ack,  // two-phase acknowledge: slice captured
  input  logic [3:0]           dly_sel,    // variable delay line setting
  output logic [PROD_BITS-1:0] prod,       // 48-bit product
  output logic                 prod_req,   // two-phase: new product
  input  logic                 prod_ack    // two-phase: product taken
);
  localparam int unsigned WA = N_BITS + 4;        // 28: x times 4 multiplier bits
  localparam int unsigned TW = 2;                 // pass index width

  // ---------------- control: C-elements and variable delays ----------------
  logic r1, r2, r3;        // delayed requests into stages 1..3
  logic c1, c2, c3;        // C-element outputs: capture events of stages 1..3
  logic a4;                // acknowledge of the final adder stage

  var_delay #(.BASE_PS(DLY_BASE_PS), .STEP_PS(DLY_STEP_PS)) u_vd1 (.in(start), .sel(dly_sel), .out(r1));
  var_delay #(.BASE_PS(DLY_BASE_PS), .STEP_PS(DLY_STEP_PS)) u_vd2 (.in(c1),    .sel(dly_sel), .out(r2));
  var_delay #(.BASE_PS(DLY_BASE_PS), .STEP_PS(DLY_STEP_PS)) u_vd3 (.in(c2),    .sel(dly_sel), .out(r3));

  // Pass-done: the acknowledge of the next stage reopens a stage's latch; the
  // C-element sees it only after the latch has had time to pass new data.
  logic pd1, pd2, pd3;
  var_delay #(.BASE_PS(PASS_PS), .STEP_PS(0)) u_pd1 (.in(c2), .sel(4'd0), .out(pd1));
  var_delay #(.BASE_PS(PASS_PS), .STEP_PS(0)) u_pd2 (.in(c3), .sel(4'd0), .out(pd2));
  var_delay #(.BASE_PS(PASS_PS), .STEP_PS(0)) u_pd3 (.in(a4), .sel(4'd0), .out(pd3));

  muller_c u_c1 (.rst_n(rst_n), .a(r1), .b(~pd1), .c(c1));
  muller_c u_c2 (.rst_n(rst_n), .a(r2), .b(~pd2), .c(c2));
  muller_c u_c3 (.rst_n(rst_n), .a(r3), .b(~pd3), .c(c3));

  assign start_ack = c1;

  // ---------------- stage 1: sub-arrays and first (4,2) row ----------------
  logic [N_BITS+1:0] sa0_s, sa0_c, sa1_s, sa1_c;   // 26-bit pairs
  logic [WA-1:0]     m1_s, m1_c;                   // x * y[3:0]
  logic [WA-1:0]     sa2_s, sa2_c;                 // x * y[7:4]
  logic [TW-1:0]     tag_prev, tag_next;           // pass index
  logic [WA-1:0]     l1_m_s, l1_m_c, l1_b_s, l1_b_c;
  logic [TW-1:0]     l1_tag;

  array_submult #(.NX(N_BITS), .L(2)) u_sa0 (.x(x), .y(y[1:0]), .s(sa0_s), .c(sa0_c));
  array_submult #(.NX(N_BITS), .L(2)) u_sa1 (.x(x), .y(y[3:2]), .s(sa1_s), .c(sa1_c));
  array_submult #(.NX(N_BITS), .L(4)) u_sa2 (.x(x), .y(y[7:4]), .s(sa2_s), .c(sa2_c));

  comp42 #(.W(WA)) u_main1 (
    .a(WA'(sa0_s)), .b(WA'(sa0_c)), .d(WA'(sa1_s) << 2), .e(WA'(sa1_c) << 2),
    .s(m1_s), .c(m1_c)
  );

  // Pass index: one more than the index last captured, modulo N_ITER. A
  // second latch, open while the stage latch holds, remembers the last one.
  assign tag_next = (tag_prev == TW'(N_ITER - 1)) ? '0 : tag_prev + 1'b1;

  mp_latch #(.W(4*WA+TW)) u_l1 (
    .rst_n(rst_n), .c(c1), .p(c2),
    .d({m1_s, m1_c, sa2_s, sa2_c, tag_next}),
    .q({l1_m_s, l1_m_c, l1_b_s, l1_b_c, l1_tag})
  );
  mp_latch #(.W(TW), .RST(TW'(N_ITER - 1))) u_l1_tag (
    .rst_n(rst_n), .c(c1), .p(~c2), .d(l1_tag), .q(tag_prev)
  );

  // ---------------- stage 2: second (4,2) row ----------------
  logic [SLICE_PROD-1:0] m2_s, m2_c;
  cs32_t                 l2;
  logic [TW-1:0]         l2_tag;

  comp42 #(.W(SLICE_PROD)) u_main2 (
    .a(SLICE_PROD'(l1_m_s)), .b(SLICE_PROD'(l1_m_c)),
    .d(SLICE_PROD'(l1_b_s) << 4), .e(SLICE_PROD'(l1_b_c) << 4),
    .s(m2_s), .c(m2_c)
  );

  mp_latch #(.W(2*SLICE_PROD+TW)) u_l2 (
    .rst_n(rst_n), .c(c2), .p(c3),
    .d({m2_s, m2_c, l1_tag}), .q({l2, l2_tag})
  );

  // ---------------- stage 3: accumulator ----------------
  cs48_t         acc;
  logic [TW-1:0] acc_tag;

  paa_accumulator #(.W(PROD_BITS), .PW(SLICE_PROD), .SHIFT(SLICE_BITS), .TW(TW)) u_acc (
    .rst_n(rst_n), .cap(c3), .pass(a4), .first(l2_tag == '0),
    .ps(l2.s), .pc(l2.c), .tag_in(l2_tag),
    .s(acc.s), .c(acc.c), .tag(acc_tag)
  );

  // ---------------- stage 4: final carry-completion-sensing adder ----------------
  cpa_stage #(.W(PROD_BITS), .HI(CPA_HI), .BLK(5), .CELL_PS(CPA_CELL_PS)) u_cpa (
    .rst_n(rst_n), .req(c3), .ack(a4), .last(acc_tag == TW'(N_ITER - 1)),
    .in_s(acc.s), .in_c(acc.c),
    .prod(prod), .prod_req(prod_req), .prod_ack(prod_ack),
    .eval(), .done()
  );
endmodule
