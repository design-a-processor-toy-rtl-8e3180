// toy_alu: the 16-bit TOY arithmetic logic unit.
//
// All five functions (add/subtract, and, xor, shift, copy input 2) are
// computed in parallel and a 3-bit select picks the result, as the ALU recap
// describes. Two more control wires refine the choice: `sub` turns the adder
// into a subtracter and `right` turns the left shift into a right shift, so
// the ALU takes 5 control bits in all. Purely combinational.
//
// Own choices: the shift amount is the whole 16-bit input 2 (amounts of 16
// or more shift every bit out), and the right shift is arithmetic, since TOY
// words are two's complement. Unused select codes give 0.
module toy_alu
  import toy_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  alu_sel_e     sel,
  input  logic         sub,
  input  logic         right,
  output logic [W-1:0] out
);

  logic [W-1:0] sum, andv, xorv, shl, shr;

  always_comb begin
    sum  = sub ? in1 - in2 : in1 + in2;
    andv = in1 & in2;
    xorv = in1 ^ in2;
    shl  = in1 << in2;
    shr  = W'($signed(in1) >>> in2);
  end

  always_comb begin
    unique case (sel)
      ALU_ADDSUB: out = sum;
      ALU_AND:    out = andv;
      ALU_XOR:    out = xorv;
      ALU_SHIFT:  out = right ? shr : shl;
      ALU_PASS2:  out = in2;
      default:    out = '0;
    endcase
  end

endmodule
