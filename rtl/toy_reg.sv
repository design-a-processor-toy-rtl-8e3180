// toy_reg: a stand-alone K-bit register.
//
// Stores K bits, its contents are always on `q`, and when the write enable
// is high at a rising clock edge the K input bits are copied in. It is a row
// of K D flip-flops sharing one write clock, as in the register drawing; here
// the gated write clock becomes a clock enable on the one system clock (own
// choice, for a synchronous design). Synchronous reset to RESET_VAL (own
// choice; the register drawing has no reset). Used for the PC and the IR.
module toy_reg #(
  parameter int unsigned K = 16,
  parameter logic [K-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end

endmodule
