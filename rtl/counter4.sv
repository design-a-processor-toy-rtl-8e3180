// counter4: a 4-bit binary counter (the practice counter).
//
// Counts up by one at each rising clock edge while `en` is high and wraps
// from 15 to 0. Synchronous reset to 0. The enable and the reset are this
// design's own choices; the counter is only named as an exercise.
module counter4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= q + 1'b1;
  end

endmodule
