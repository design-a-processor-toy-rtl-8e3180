// toy_memory: TOY main memory, 256 words of 16 bits.
//
// One address serves both reading and writing. The word at `addr` is always
// on `rdata` (combinational read, like a register file), and when `we` is
// high at a rising clock edge `wdata` is written to it. In the datapath the
// write is qualified by the execute phase (memory clock = execute AND clock)
// and by the W control line; here that qualification arrives as the single
// enable `we`. No reset: contents are loaded before a program runs.
module toy_memory
  import toy_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned W     = WORD_W,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
