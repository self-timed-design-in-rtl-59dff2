// muller_c: two-input Muller C-element, the rendezvous gate of the
// micropipeline control.
//
// The output copies the inputs when they agree and holds its value while they
// differ, so it makes a transition only after both inputs have made one. In a
// stage controller one input is the request from the previous stage and the
// other the inverted acknowledge of the next stage (the inversion is done by
// the instantiating logic). The state-holding behaviour is written as a
// latch that is open while a == b: that latch is the element's memory and is
// intended. Active-low rst_n clears the output. The original design draws the
// C-elements of the stage controls; this gate-level form is the standard one.
module muller_c (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);
  always_latch begin
    if (!rst_n)
      c = 1'b0;
    else if (a == b)
      c = a;
  end
endmodule
