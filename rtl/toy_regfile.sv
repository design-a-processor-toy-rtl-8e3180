// toy_regfile: the 16 x 16-bit TOY register file.
//
// Two read ports (A and B) and one write port, so that an instruction such
// as R1 <- R2 + R3 reads two registers and writes a third in one instruction.
// Reads are combinational; a write happens at the rising clock edge when
// `we` is high (in the datapath: execute AND clock, and the W control line).
// Register 0 always reads 0 and writes to it are ignored, as the TOY
// reference card requires. A synchronous reset clears all registers (own
// choice, so that a program starts from a known state).
module toy_regfile
  import toy_pkg::*;
#(
  parameter int unsigned N  = NREGS,
  parameter int unsigned W  = WORD_W,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] a_addr,
  input  logic [AW-1:0] b_addr,
  input  logic [AW-1:0] w_addr,
  input  logic          we,
  input  logic [W-1:0]  w_data,
  output logic [W-1:0]  a_data,
  output logic [W-1:0]  b_data
);

  logic [W-1:0] r [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (we && w_addr != '0) begin
      r[w_addr] <= w_data;
    end
  end

  assign a_data = (a_addr == '0) ? '0 : r[a_addr];
  assign b_data = (b_addr == '0) ? '0 : r[b_addr];

endmodule
