// tb_muller_c: drives the C-element with random input sequences and checks
// it against a reference: the output takes the common value when both
// inputs agree and otherwise keeps its previous value. Reset clears it.
module tb_muller_c;
  timeunit 1ps; timeprecision 1ps;
  logic rst_n, a, b, c;
  logic ref_c;
  int checks = 0, failures = 0;

  muller_c dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b1; b = 1'b1; rst_n = 1'b0;
    #1;
    checks++;
    if (c !== 1'b0) begin failures++; $display("ERROR: reset"); end
    rst_n = 1'b1; a = 1'b0; b = 1'b0; ref_c = 1'b0;
    #1;
    repeat (2000) begin
      a = 1'($urandom); b = 1'($urandom);
      if (a == b) ref_c = a;
      #1;
      checks++;
      if (c !== ref_c) begin
        failures++;
        $display("ERROR: a=%b b=%b c=%b expected %b", a, b, c, ref_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
