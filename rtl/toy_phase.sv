// toy_phase: fetch/execute phase generator of the two-cycle TOY.
//
// A 1-bit counter clocked by the machine clock: its output Q is `execute`
// and its complement is `fetch`, so the machine alternates one fetch cycle
// and one execute cycle. Own additions: a synchronous reset to fetch, and an
// enable `en`; while `en` is low the phase holds (used while the machine is
// stopped and while an instruction waits for input/output).
module toy_phase (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic fetch,
  output logic execute
);

  logic q;

  always_ff @(posedge clk) begin
    if (rst)     q <= 1'b0;
    else if (en) q <= ~q;
  end

  assign execute = q;
  assign fetch   = ~q;

endmodule
