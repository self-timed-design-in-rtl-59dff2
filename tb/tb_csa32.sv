// tb_csa32: checks a 24-bit row of (3,2) counters with random and corner
// operands: s must be the bitwise parity and s + c must equal a + b + d
// modulo 2**24, with bit 0 of c zero.
module tb_csa32;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 24;
  logic [W-1:0] a, b, d, s, c;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (W'(s + c) !== W'(a + b + d) || s !== (a ^ b ^ d) || c[0] !== 1'b0) begin
      failures++;
      $display("ERROR: a=%h b=%h d=%h -> s=%h c=%h", a, b, d, s, c);
    end
  endtask

  initial begin
    a = '1; b = '1; d = '1; check();
    a = '0; b = '0; d = '0; check();
    a = '1; b = '0; d = '1; check();
    repeat (2000) begin
      a = W'($urandom); b = W'($urandom); d = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
