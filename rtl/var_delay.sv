// var_delay: behavioural model of the variable (tunable) delay element that
// sets the bundling delay of each micropipeline stage.
//
// This is a behavioural model, not synthesizable logic: a real part is an
// analog delay line whose setting is adjusted after fabrication so that each
// request edge arrives after the data it travels with, much as one would
// lower a clock frequency. Every edge of `in` (rising or falling, since the
// control uses transition signalling) reappears on `out` after
// BASE_PS + sel * STEP_PS picoseconds (transport delay). `sel` is the shared
// delay-line setting that reaches every element. The port list and the idea
// of a common setting follow the design's stage control; the linear delay
// law and the default numbers are this model's choice.
module var_delay #(
  parameter int unsigned BASE_PS = 2200,
  parameter int unsigned STEP_PS = 250
) (
  input  logic       in,
  input  logic [3:0] sel,
  output logic       out
);
  timeunit 1ps; timeprecision 1ps;

  int unsigned dly_ps;
  assign dly_ps = BASE_PS + STEP_PS * 32'(sel);

  initial out = 1'b0;

  always @(in) begin
    out <= #(dly_ps) in;
  end
endmodule
