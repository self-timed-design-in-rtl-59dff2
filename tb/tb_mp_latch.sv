// tb_mp_latch: checks the capture/pass latch. After reset it is transparent;
// an event on c captures the data (input changes no longer pass), the next
// event on p makes it transparent again, and so on through many random
// capture/pass cycles with either edge direction.
module tb_mp_latch;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 16;
  logic         rst_n, c, p;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  mp_latch #(.W(W), .RST(16'h5A5A)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [W-1:0] e, input string what);
    #1;
    checks++;
    if (q !== e) begin failures++; $display("ERROR %s: q=%h expected %h", what, q, e); end
  endtask

  initial begin
    logic [W-1:0] held;
    rst_n = 1'b0; c = 1'b0; p = 1'b0; d = 16'h1234;
    expect_q(16'h5A5A, "reset");
    rst_n = 1'b1;
    expect_q(16'h1234, "transparent after reset");
    repeat (500) begin
      d = W'($urandom);
      expect_q(d, "transparent");
      held = d;
      c = ~c;                      // capture
      expect_q(held, "captured");
      d = W'($urandom);
      expect_q(held, "holding");
      p = ~p;                      // pass
      expect_q(d, "passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
