// tb_cpa_stage: checks the final adder stage on its own. A model of the
// accumulator presents carry-save pairs with a two-phase request, tagged as
// the last pass of a multiply or not. The stage must acknowledge every
// request, run one evaluate/precharge cycle per request, deliver a + b
// (mod 2**48) with a prod_req toggle for last passes only, and hold a last
// pass while the previous product has not been acknowledged.
module tb_cpa_stage;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 48;
  logic         rst_n, req, ack, last, prod_req, prod_ack, eval, done;
  logic [W-1:0] in_s, in_c, prod;
  int checks = 0, failures = 0;
  int n_eval = 0, n_held = 0;

  cpa_stage #(.W(W), .HI(25), .BLK(5)) dut (.*);

  always @(posedge eval) n_eval++;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input logic [W-1:0] s, input logic [W-1:0] c, input logic l);
    logic pr;
    pr = prod_req;
    in_s = s; in_c = c; last = l;
    #10 req = ~req;
    #10;
    if (ack != req) begin
      // Held: must only happen for a last pass with the product not taken.
      n_held++;
      checks++;
      if (!(l && prod_req != prod_ack)) begin failures++; $display("ERROR: stalled without cause"); end
      #50 prod_ack = prod_req;
      #10;
    end
    checks++;
    if (ack !== req) begin failures++; $display("ERROR: no acknowledge"); end
    checks++;
    if (l) begin
      if (prod_req === pr || prod !== W'(s + c)) begin
        failures++; $display("ERROR: product %h expected %h", prod, W'(s + c));
      end
    end else if (prod_req !== pr) begin
      failures++; $display("ERROR: output for a non-last pass");
    end
  endtask

  initial begin
    int n;
    rst_n = 1'b1; #1 rst_n = 1'b0; req = 1'b0; prod_ack = 1'b0; last = 1'b0; in_s = '0; in_c = '0;
    #10 rst_n = 1'b1;
    #10;
    checks++;
    if (done !== 1'b0 || eval !== 1'b0 || ack !== 1'b0) begin failures++; $display("ERROR: reset state"); end
    n = 0;
    repeat (1500) begin
      pass({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom_range(2, 0) == 2));
      n++;
      // Sometimes take the product, sometimes leave it pending.
      if ($urandom_range(1, 0) == 0) prod_ack = prod_req;
    end
    pass('1, 48'd1, 1'b1);
    n++;
    checks++;
    if (n_eval != n) begin failures++; $display("ERROR: %0d evaluations for %0d passes", n_eval, n); end
    checks++;
    if (n_held == 0) begin failures++; $display("ERROR: back-pressure never happened"); end
    $display("passes=%0d held=%0d", n, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
