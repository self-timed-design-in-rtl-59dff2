// tb_paa_top: end-to-end test of the self-timed PAA multiplier at its default
// parameters.
//
// The environment feeds 24-bit operand pairs as three 8-bit multiplier
// slices, most significant first, with the two-phase start/start_ack
// handshake, and takes each product with the prod_req/prod_ack handshake.
// Every product is compared with x * y computed here. Phase 1 streams
// multiplies back to back with a prompt environment and checks, at delay
// setting 4, the rate (at most 13 ns per multiply), the array latency (at
// most 17 ns from the first slice to the capture of the last pass in the
// accumulator) and the product latency including the final adder (at most
// 24 ns). Phase 2 adds random gaps and a slow consumer so
// that the final stage's back-pressure and the C-elements' stalls happen.
// It counts how often each mechanism occurred and fails if one never did.
module tb_paa_top;
  timeunit 1ps; timeprecision 1ps;
  import paa_pkg::*;

  logic                  rst_n;
  logic [N_BITS-1:0]     x;
  logic [SLICE_BITS-1:0] y;
  logic                  start, start_ack;
  logic [3:0]            dly_sel;
  logic [PROD_BITS-1:0]  prod;
  logic                  prod_req, prod_ack;

  int checks = 0, failures = 0;

  paa_top dut (.*);

  // ---------------- expected products (FIFO) ----------------
  logic [PROD_BITS-1:0] exp_q[$];
  int   n_done = 0;
  bit   slow_consumer = 0;
  longint t_first_slice[$];
  longint max_lat = 0;
  longint t_first_arr[$];
  longint max_arr_lat = 0;

  // Array latency: the accumulator captures the last pass of a multiply.
  always @(dut.c3) begin
    if (counting && dut.acc_tag == 2'(N_ITER - 1) && t_first_arr.size() > 0) begin
      longint l;
      l = $time - t_first_arr.pop_front();
      if (l > max_arr_lat) max_arr_lat = l;
    end
  end

  // Consumer: take every product, compare, acknowledge.
  initial begin
    prod_ack = 1'b0;
    forever begin
      @(prod_req);
      if (slow_consumer) #($urandom_range(20000, 2000));
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected product %h", prod);
      end else begin
        logic [PROD_BITS-1:0] e;
        longint lat;
        e = exp_q.pop_front();
        lat = $time - t_first_slice.pop_front();
        if (lat > max_lat) max_lat = lat;
        if (prod !== e) begin
          failures++;
          $display("ERROR: product %h expected %h", prod, e);
        end
      end
      n_done++;
      prod_ack = ~prod_ack;
    end
  end

  // ---------------- mechanism counters ----------------
  bit counting = 0;                      // set once reset is over
  int n_pass = 0, n_first = 0, n_backpressure = 0, n_stall_c1 = 0, n_stall_c3 = 0;
  always @(dut.c1) if (counting) n_pass++;
  always @(dut.c3) if (counting && dut.acc_tag == 2'd0) n_first++;
  // Final stage holds a last pass because the previous product is not taken.
  always @(dut.u_cpa.pending or dut.u_cpa.out_free)
    if (counting && dut.u_cpa.pending && dut.u_cpa.last && !dut.u_cpa.out_free) n_backpressure++;
  // A request has arrived at a C-element but the next stage has not acknowledged.
  always @(dut.r1) if (counting && dut.r1 != dut.c1 && dut.c2 != dut.c1) n_stall_c1++;
  always @(dut.r3) if (counting && dut.r3 != dut.c3 && dut.a4 != dut.c3) n_stall_c3++;

  // ---------------- producer ----------------
  task automatic send_slice(input logic [SLICE_BITS-1:0] ys);
    y = ys;
    start = ~start;
    wait (start_ack == start);
  endtask

  task automatic multiply(input logic [N_BITS-1:0] xa, input logic [N_BITS-1:0] ya, input bit gaps);
    x = xa;
    exp_q.push_back(PROD_BITS'(xa) * PROD_BITS'(ya));
    t_first_slice.push_back($time);
    t_first_arr.push_back($time);
    for (int k = N_ITER - 1; k >= 0; k--) begin
      send_slice(ya[k*SLICE_BITS +: SLICE_BITS]);
      if (gaps && $urandom_range(3, 0) == 0) #($urandom_range(9000, 100));
    end
  endtask

  // Watchdog.
  initial begin
    #50ms;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_STREAM = 200;
  localparam int N_RANDOM = 400;

  initial begin
    longint t0, t1;
    rst_n = 1'b1; #1 rst_n = 1'b0; start = 1'b0; x = '0; y = '0; dly_sel = 4'd4;
    #1000 rst_n = 1'b1;
    #1000;
    counting = 1;

    // Corner operands first.
    multiply('0, '0, 0);
    multiply('1, '1, 0);
    multiply(24'h800000, 24'h800000, 0);
    multiply('1, 24'h000001, 0);
    wait (n_done == 4);

    // Phase 1: back-to-back stream, prompt consumer: rate and latency.
    max_lat = 0;
    max_arr_lat = 0;
    t0 = $time;
    for (int i = 0; i < N_STREAM; i++)
      multiply(24'($urandom), 24'($urandom), 0);
    wait (n_done == 4 + N_STREAM);
    t1 = $time;
    checks++;
    if ((t1 - t0) > longint'(N_STREAM) * 13000) begin
      failures++;
      $display("ERROR: %0d multiplies took %0d ps, more than 13 ns each", N_STREAM, t1 - t0);
    end
    checks++;
    if (max_arr_lat > 17000 || max_arr_lat == 0) begin
      failures++;
      $display("ERROR: array latency %0d ps exceeds 17 ns", max_arr_lat);
    end
    checks++;
    if (max_lat > 24000) begin
      failures++;
      $display("ERROR: product latency %0d ps exceeds 24 ns", max_lat);
    end
    $display("stream: %0d ps per multiply, worst array latency %0d ps, worst product latency %0d ps",
             (t1 - t0) / longint'(N_STREAM), max_arr_lat, max_lat);

    // Phase 2: random gaps, slow consumer, random delay settings.
    slow_consumer = 1;
    for (int i = 0; i < N_RANDOM; i++) begin
      if (i % 50 == 0) begin
        wait (n_done == 4 + N_STREAM + i);
        dly_sel = 4'($urandom_range(15, 0));
      end
      multiply(24'($urandom), 24'($urandom), 1);
    end
    wait (n_done == 4 + N_STREAM + N_RANDOM);
    #20000;

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("ERROR: %0d products missing", exp_q.size()); end
    checks++;
    if (n_pass != N_ITER * (4 + N_STREAM + N_RANDOM)) begin
      failures++; $display("ERROR: %0d passes", n_pass);
    end
    $display("mechanisms: passes=%0d first-pass clears=%0d back-pressure=%0d stage1 stalls=%0d stage3 stalls=%0d",
             n_pass, n_first, n_backpressure, n_stall_c1, n_stall_c3);
    checks++; if (n_first == 0)        begin failures++; $display("ERROR: no first-pass clear"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("ERROR: no back-pressure"); end
    checks++; if (n_stall_c1 == 0)     begin failures++; $display("ERROR: no stage-1 stall"); end
    checks++; if (n_stall_c3 == 0)     begin failures++; $display("ERROR: no stage-3 stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
