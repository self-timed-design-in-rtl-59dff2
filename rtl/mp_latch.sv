// mp_latch: transition-controlled capture/pass data latch of a micropipeline
// stage.
//
// W bits wide. The latch is transparent while its capture input c and its
// pass input p are at the same level, and holds while they differ. An event
// (either edge) on c therefore captures the data, and the following event on
// p, normally the next stage's acknowledge, opens the latch again. This is
// the level-free behaviour a two-phase (transition) signalling environment
// needs from a latch. Active-low rst_n loads RST. The latch is the intended
// storage element. The original design merges each latch with the logic in front of
// it (Earle latch); here the logic and the latch are separate.
module mp_latch #(
  parameter int unsigned     W   = 8,
  parameter logic [W-1:0]    RST = '0
) (
  input  logic         rst_n,
  input  logic         c,
  input  logic         p,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_latch begin
    if (!rst_n)
      q = RST;
    else if (c == p)
      q = d;
  end
endmodule
