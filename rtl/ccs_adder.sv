// ccs_adder: precharged, dual-rail, carry-skip carry-completion-sensing adder.
//
// Adds the single-rail operands a and b (W bits) and a dual-rail carry-in.
// Every carry is carried on two rails, c1 ("carry is 1") and c0 ("carry is
// 0"); both are low while eval is low (precharge). When eval rises, a bit
// with a == b settles its carry-out at once (generate or kill) and a bit with
// a != b passes on its carry-in, so the time to settle is set by the longest
// propagate chain in the operands, not by W: this is the source of the
// adder's average-case speed. Carries also skip over a block of BLK bits that
// all propagate. Sum rails are formed from the propagate signal and the
// carry rails, so each sum bit also goes high on exactly one rail once it is
// settled, and done_detect turns the sum rails into `done`.
//
// Protocol (four-phase): raise eval with a, b and cin stable; wait for done;
// read sum; lower eval; done falls once the rails have precharged. The
// original design gives the adder's kind (carry completion sensing, precharged,
// carry-skip, dual-rail) and its completion detector; the rail equations and
// the block size are this implementation's choices.
//
// Timing model: CELL_PS is the delay of one carry cell. Every carry rail,
// including the carry-in stage, is gated by eval and delayed by CELL_PS, so a
// simulation shows the data-dependent evaluation time (about CELL_PS times
// the longest carry chain, shortened by the skip paths) and a precharge that
// clears all carry rails at once. Synthesis ignores the delay; the default 0
// gives a zero-delay model.
module ccs_adder #(
  parameter int unsigned W       = 25,
  parameter int unsigned BLK     = 5,
  parameter int unsigned CELL_PS = 0
) (
  input  logic         eval,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin1,    // carry-in is 1
  input  logic         cin0,    // carry-in is 0
  output logic [W-1:0] sum_t,
  output logic [W-1:0] sum_f,
  output logic         cout1,
  output logic         cout0,
  output logic         done
);
  logic [W-1:0] p, g, k;
  logic         c1 [W+1];       // carry rails into each bit position
  logic         c0 [W+1];

  assign p = a ^ b;
  assign g = a & b;
  assign k = ~a & ~b;

  // Carry-in stage.
  cell_delay #(.D_PS(CELL_PS)) u_ci1 (.in(eval & cin1), .out(c1[0]));
  cell_delay #(.D_PS(CELL_PS)) u_ci0 (.in(eval & cin0), .out(c0[0]));

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic f1, f0;               // this cell's carry-out rails before the cell delay
    if ((i % BLK) == (BLK - 1) || i == W - 1) begin : g_skip
      // Last bit of a skip block: the block's carry-in may bypass the ripple
      // path when every bit of the block propagates.
      localparam int unsigned LO = (i / BLK) * BLK;
      logic blk_p;
      assign blk_p = &p[i:LO];
      assign f1    = eval & (g[i] | (p[i] & c1[i]) | (blk_p & c1[LO]));
      assign f0    = eval & (k[i] | (p[i] & c0[i]) | (blk_p & c0[LO]));
    end else begin : g_ripple
      assign f1    = eval & (g[i] | (p[i] & c1[i]));
      assign f0    = eval & (k[i] | (p[i] & c0[i]));
    end
    cell_delay #(.D_PS(CELL_PS)) u_d1 (.in(f1), .out(c1[i+1]));
    cell_delay #(.D_PS(CELL_PS)) u_d0 (.in(f0), .out(c0[i+1]));
    assign sum_t[i] = (p[i] & c0[i]) | (~p[i] & c1[i]);
    assign sum_f[i] = (p[i] & c1[i]) | (~p[i] & c0[i]);
  end

  assign cout1 = c1[W];
  assign cout0 = c0[W];

  // Dual-rail rule: a bit never reports both values.
  always_comb begin
    assert (!(|(sum_t & sum_f)))
      else $error("ccs_adder: sum bit high on both rails");
  end

  done_detect #(.N(W)) u_done (.sum_t(sum_t), .sum_f(sum_f), .done(done));
endmodule
