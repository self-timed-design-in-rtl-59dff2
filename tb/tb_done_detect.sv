// tb_done_detect: checks the completion detector for 32 bit positions:
// done is high exactly when every bit has at least one rail high. Covers the
// all-precharged state, every single unsettled bit, and random rail sets.
module tb_done_detect;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32;
  logic [N-1:0] sum_t, sum_f;
  logic         done;
  int checks = 0, failures = 0;

  done_detect #(.N(N)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic e;
    #1;
    e = 1'b1;
    for (int i = 0; i < N; i++) if (!sum_t[i] && !sum_f[i]) e = 1'b0;
    checks++;
    if (done !== e) begin failures++; $display("ERROR: t=%h f=%h done=%b", sum_t, sum_f, done); end
  endtask

  initial begin
    sum_t = '0; sum_f = '0; check();
    for (int i = 0; i < N; i++) begin
      sum_t = $urandom; sum_f = ~sum_t; check();
      sum_t[i] = 1'b0; sum_f[i] = 1'b0; check();
    end
    repeat (1000) begin
      sum_t = $urandom | $urandom; sum_f = $urandom | $urandom; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
