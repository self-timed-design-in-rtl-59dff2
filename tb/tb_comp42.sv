// tb_comp42: checks a 32-bit row of (4,2) cells: s + c must equal
// a + b + d + e modulo 2**32 for random and all-ones operands.
module tb_comp42;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 32;
  logic [W-1:0] a, b, d, e, s, c;
  int checks = 0, failures = 0;

  comp42 #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (W'(s + c) !== W'(a + b + d + e)) begin
      failures++;
      $display("ERROR: %h+%h+%h+%h -> s=%h c=%h", a, b, d, e, s, c);
    end
  endtask

  initial begin
    a = '1; b = '1; d = '1; e = '1; check();
    a = '0; b = '0; d = '0; e = '0; check();
    repeat (2000) begin
      a = $urandom; b = $urandom; d = $urandom; e = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
