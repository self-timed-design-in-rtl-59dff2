// tb_array_submult: checks the 2-row and 4-row sub-multipliers used in the
// PAA slice (24-bit multiplicand): s + c must equal x * y exactly, at the
// full output width, for corner and random operands.
module tb_array_submult;
  timeunit 1ps; timeprecision 1ps;
  localparam int NX = 24;
  logic [NX-1:0]   x;
  logic [1:0]      y2;
  logic [3:0]      y4;
  logic [NX+1:0]   s2, c2;
  logic [NX+3:0]   s4, c4;
  int checks = 0, failures = 0;

  array_submult #(.NX(NX), .L(2)) dut2 (.x(x), .y(y2), .s(s2), .c(c2));
  array_submult #(.NX(NX), .L(4)) dut4 (.x(x), .y(y4), .s(s4), .c(c4));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if ((NX+2)'(s2 + c2) !== (NX+2)'(x) * (NX+2)'(y2)) begin
      failures++; $display("ERROR L=2: x=%h y=%h s=%h c=%h", x, y2, s2, c2);
    end
    checks++;
    if ((NX+4)'(s4 + c4) !== (NX+4)'(x) * (NX+4)'(y4)) begin
      failures++; $display("ERROR L=4: x=%h y=%h s=%h c=%h", x, y4, s4, c4);
    end
  endtask

  initial begin
    x = '1;
    for (int i = 0; i < 16; i++) begin y2 = 2'(i); y4 = 4'(i); check(); end
    repeat (2000) begin
      x = NX'($urandom); y2 = 2'($urandom); y4 = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
