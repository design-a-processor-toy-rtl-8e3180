// sr_latch: the SR flip-flop of the sequential-circuit recap.
//
// S = 1, R = 0 sets Q; S = 0, R = 1 clears it; S = R = 0 keeps it; S = R = 1
// is not allowed. The recap builds it from a feedback loop in which Q is fed
// back and held while S and R are both low, so it is level sensitive: a
// latch, written here with always_latch. It has no clock. The latch that the
// tools report for this module is the storage element itself and is
// intended. An assertion flags the forbidden S = R = 1 input.
module sr_latch (
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);

  always_latch begin
    if (s || r) q = s;
  end

  assign q_n = ~q;

  always_comb begin
    assert (!(s && r)) else $error("sr_latch: S and R both high");
  end

endmodule
