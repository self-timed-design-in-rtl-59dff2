// cpa_stage: final carry-propagate stage of the multiplier. It turns the
// accumulator's carry-save pair into the binary 48-bit product and hands it
// to the environment.
//
// Datapath: two carry-completion-sensing adders in a chain, the high-order
// HI bits (25, the width the final adder is sized for) fed by the dual-rail
// carry-out of a LO-bit adder for the remaining low-order bits. The stage is
// done when both adders report done.
//
// Control: the stage is entered with a two-phase request `req` (an event
// means the accumulator latch holds a new pair) and answered with the
// two-phase acknowledge `ack`, which also opens the accumulator latch again.
// Inside, the precharged adders run a four-phase cycle: eval rises, done
// rises, eval falls, done falls. On the rising edge of done the sum of a
// pass tagged `last` is stored in `prod` and the two-phase output request
// `prod_req` toggles; the falling edge of done (adders precharged again)
// toggles `ack`. A `last` pass does not start while the previous product is
// still unacknowledged (prod_req != prod_ack): that is the stage's
// back-pressure. Passes that are not the last of a multiply run the same
// cycle and their sum is dropped. Reset (active-low) leaves everything
// precharged and idle.
//
// The original design gives the adder type and its width and sends its result on to
// rounding; the two-to-four-phase control, the low-order adder and the output
// handshake are this implementation's choices. `eval` is produced by gates from
// flip-flops that are clocked by `done`: this closed loop is the intended
// self-timed control, not a combinational loop through logic alone.
module cpa_stage #(
  parameter int unsigned W   = 48,
  parameter int unsigned HI  = 25,
  parameter int unsigned BLK = 5,
  parameter int unsigned CELL_PS = 0     // carry cell delay of the adders (simulation only)
) (
  input  logic         rst_n,
  input  logic         req,       // two-phase request from the accumulator stage
  output logic         ack,       // two-phase acknowledge to the accumulator stage
  input  logic         last,      // this pass completes a multiply
  input  logic [W-1:0] in_s,
  input  logic [W-1:0] in_c,
  output logic [W-1:0] prod,
  output logic         prod_req,  // two-phase: new product in prod
  input  logic         prod_ack,  // two-phase: product taken
  output logic         eval,      // adder evaluate (high) / precharge (low)
  output logic         done
);
  localparam int unsigned LO = W - HI;

  logic [W-1:0] sum_t, sum_f;
  logic         lo_c1, lo_c0, hi_c1, hi_c0;
  logic         done_lo, done_hi;
  logic         e_pos, e_neg;       // toggled by rising / falling edges of done
  logic         evaluated;          // a rising edge of done has been seen this cycle
  logic         pending, out_free;

  ccs_adder #(.W(LO), .BLK(BLK), .CELL_PS(CELL_PS)) u_lo (
    .eval(eval), .a(in_s[LO-1:0]), .b(in_c[LO-1:0]),
    .cin1(1'b0), .cin0(eval),
    .sum_t(sum_t[LO-1:0]), .sum_f(sum_f[LO-1:0]),
    .cout1(lo_c1), .cout0(lo_c0), .done(done_lo)
  );

  ccs_adder #(.W(HI), .BLK(BLK), .CELL_PS(CELL_PS)) u_hi (
    .eval(eval), .a(in_s[W-1:LO]), .b(in_c[W-1:LO]),
    .cin1(lo_c1), .cin0(lo_c0),
    .sum_t(sum_t[W-1:LO]), .sum_f(sum_f[W-1:LO]),
    .cout1(hi_c1), .cout0(hi_c0), .done(done_hi)
  );

  always_comb begin
    done      = done_lo & done_hi;
    evaluated = e_pos ^ e_neg;
    pending   = req ^ ack;
    out_free  = (prod_req == prod_ack);
    eval      = pending & ~evaluated & (~last | out_free);
  end

  // Four-phase rule: the adders complete only while evaluating.
  always @(posedge done) begin
    assert (eval) else $error("cpa_stage: done rose while precharging");
  end

  always_ff @(posedge done or negedge rst_n) begin
    if (!rst_n) begin
      e_pos    <= 1'b0;
      prod     <= '0;
      prod_req <= 1'b0;
    end else begin
      e_pos <= ~e_pos;
      if (last) begin
        prod     <= sum_t;
        prod_req <= ~prod_req;
      end
    end
  end

  always_ff @(negedge done or negedge rst_n) begin
    if (!rst_n) begin
      e_neg <= 1'b0;
      ack   <= 1'b0;
    end else begin
      e_neg <= ~e_neg;
      ack   <= req;
    end
  end
endmodule
