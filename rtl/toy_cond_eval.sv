// toy_cond_eval: condition evaluation for the TOY branches.
//
// From a 16-bit two's-complement word it derives y0 (=0: every bit is zero)
// and y1 (>0). Combinational. The condition drawing derives the zero test
// from all 16 bits and the other output from the sign bit x15 alone; the
// reference card defines branch positive as R[d] > 0, so this design makes
// y1 = "sign bit clear and not zero", which differs from the sign-only test
// for the word 0000.
module toy_cond_eval #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  output logic         eq0,
  output logic         gt0
);

  assign eq0 = ~|x;
  assign gt0 = ~x[W-1] & ~eq0;

endmodule
