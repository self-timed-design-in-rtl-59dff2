// tb_ccs_adder: checks the precharged dual-rail carry-skip adder (25 bits,
// skip blocks of 5) through its four-phase cycle. While eval is low every
// sum rail and both carry-out rails must be low and done low. With eval high
// the true rails must give a + b + cin, the false rails their complement,
// exactly one carry-out rail must be high and done must be high. Operands
// include long propagate chains that exercise the skip paths.
//
// A second adder with a 100 ps carry-cell delay is timed: for a full-length
// propagate chain it must finish in fewer than W cell delays (the skip paths
// at work), random operands must finish faster on average than that worst
// case (the average-case behaviour of completion sensing), and precharge must
// clear every rail within one cell delay.
module tb_ccs_adder;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 25;
  logic         eval, cin1, cin0;
  logic [W-1:0] a, b, sum_t, sum_f;
  logic         cout1, cout0, done;
  int checks = 0, failures = 0;

  ccs_adder #(.W(W), .BLK(5)) dut (.*);

  // Timed instance.
  localparam int CELL = 100;
  logic         t_eval, t_cin1, t_cin0, t_c1, t_c0, t_done;
  logic [W-1:0] t_a, t_b, t_st, t_sf;
  ccs_adder #(.W(W), .BLK(5), .CELL_PS(CELL)) dut_t (
    .eval(t_eval), .a(t_a), .b(t_b), .cin1(t_cin1), .cin0(t_cin0),
    .sum_t(t_st), .sum_f(t_sf), .cout1(t_c1), .cout0(t_c0), .done(t_done)
  );

  // One timed four-phase cycle; returns the evaluation time in ps.
  task automatic timed(input logic [W-1:0] aa, input logic [W-1:0] bb, input logic ci,
                       output longint t_eval_ps);
    longint t0;
    logic [W:0] e;
    t_a = aa; t_b = bb; t_cin1 = ci; t_cin0 = ~ci;
    #1000;
    t0 = $time;
    t_eval = 1'b1;
    wait (t_done === 1'b1);
    t_eval_ps = $time - t0;
    e = (W+1)'(aa) + (W+1)'(bb) + (W+1)'(ci);
    checks++;
    if (t_st !== e[W-1:0] || t_sf !== ~e[W-1:0]) begin
      failures++; $display("ERROR: timed sum %h expected %h", t_st, e[W-1:0]);
    end
    t_eval = 1'b0;
    #(CELL + 1);
    checks++;
    if (t_done !== 1'b0 || t_st !== '0 || t_sf !== '0 || t_c1 || t_c0) begin
      failures++; $display("ERROR: not precharged one cell after eval fell");
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic [W-1:0] aa, input logic [W-1:0] bb, input logic ci);
    logic [W:0] e;
    eval = 1'b0; a = aa; b = bb; cin1 = ci; cin0 = ~ci;
    #1;
    checks++;
    if (done !== 1'b0 || sum_t !== '0 || sum_f !== '0 || cout1 || cout0) begin
      failures++; $display("ERROR: not precharged");
    end
    eval = 1'b1;
    #1;
    e = (W+1)'(aa) + (W+1)'(bb) + (W+1)'(ci);
    checks++;
    if (done !== 1'b1 || sum_t !== e[W-1:0] || sum_f !== ~e[W-1:0] ||
        cout1 !== e[W] || cout0 !== ~e[W]) begin
      failures++;
      $display("ERROR: %h + %h + %b: sum_t=%h sum_f=%h c=%b%b done=%b", aa, bb, ci,
               sum_t, sum_f, cout1, cout0, done);
    end
    eval = 1'b0;
    #1;
  endtask

  initial begin
    cycle('1, '0, 1'b1);          // full-length propagate chain, carry in 1
    cycle('1, '0, 1'b0);
    cycle('1, 25'd1, 1'b0);       // generate at bit 0, ripples everywhere
    cycle(25'h0AAAAA, 25'h155555, 1'b1);
    for (int i = 0; i < W; i++) cycle(W'(1) << i, '1 >> (W - i), 1'b1);
    repeat (3000) cycle(W'($urandom), W'($urandom), 1'($urandom));

    // Timed part.
    begin
      longint t, worst, sum, chain;
      t_eval = 1'b0;
      timed('1, '0, 1'b1, chain);             // carry-in propagates through every bit
      worst = chain;
      sum = 0;
      for (int i = 0; i < 500; i++) begin
        timed(W'($urandom), W'($urandom), 1'($urandom), t);
        sum += t;
        if (t > worst) worst = t;
      end
      $display("full chain %0d ps, random average %0d ps, worst seen %0d ps (cell %0d ps, %0d bits)",
               chain, sum / 500, worst, CELL, W);
      checks++;
      if (worst >= longint'(W * CELL)) begin
        failures++; $display("ERROR: worst case %0d ps is no better than a ripple chain", worst);
      end
      checks++;
      if (sum / 500 >= worst) begin
        failures++; $display("ERROR: average not below worst case");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
