// done_detect: completion detector of the dual-rail precharged adder.
//
// Every sum bit is delivered on two rails, sum_t (true) and sum_f (false).
// While the adder is precharged both rails are low; during evaluation exactly
// one of them rises once that bit is settled. The detector reports done only
// when every bit has one rail high. In the circuit each bit's pair drives a
// NOR gate, the N NOR outputs drive transistors in parallel on a common node,
// and that node, through a diode level shifter, gives `done`; here the same
// function is written as done = AND over bits of (sum_t | sum_f).
// Combinational. The circuit drawn has 32 bit positions (sum0..sum31); N is a
// parameter because the adders here are 25 and 23 bits wide.
module done_detect #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] sum_t,
  input  logic [N-1:0] sum_f,
  output logic         done
);
  logic [N-1:0] pending;   // NOR of each rail pair: 1 while the bit is unsettled

  always_comb begin
    pending = ~(sum_t | sum_f);
    done    = ~|pending;
  end
endmodule
