// tb_var_delay: checks the variable delay element model. Every rising and
// falling input edge must reappear at the output after BASE_PS + sel*STEP_PS,
// and not earlier, for every setting of sel.
module tb_var_delay;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned BASE = 2200, STEP = 250;
  logic       in, out;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  var_delay #(.BASE_PS(BASE), .STEP_PS(STEP)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    in = 1'b0; sel = 4'd0;
    #10000;
    for (int s = 0; s < 16; s++) begin
      sel = 4'(s);
      #100;
      repeat (2) begin
        in = ~in;
        t0 = $time;
        #1;
        checks++;
        if (out === in) begin failures++; $display("ERROR: edge passed at once, sel=%0d", s); end
        wait (out === in);
        t1 = $time;
        checks++;
        if (t1 - t0 != longint'(BASE + STEP * s)) begin
          failures++;
          $display("ERROR: sel=%0d delay %0d ps", s, t1 - t0);
        end
        #100;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
