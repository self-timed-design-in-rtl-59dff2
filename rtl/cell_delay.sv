// cell_delay: the propagation delay of one carry cell of the precharged
// adder, for simulation.
//
// out follows in after D_PS picoseconds (transport delay). With D_PS = 0 it
// is a plain wire, which is also what synthesis makes of it for any D_PS, as
// delays are not synthesized. It lets a simulation show how long the
// completion-sensing adder takes for given operands; it has no logic function
// of its own.
module cell_delay #(
  parameter int unsigned D_PS = 0
) (
  input  logic in,
  output logic out
);
  timeunit 1ps; timeprecision 1ps;

  if (D_PS == 0) begin : g_wire
    assign out = in;
  end else begin : g_delay
    assign #(D_PS) out = in;
  end
endmodule
