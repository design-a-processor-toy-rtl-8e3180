// toy_pkg: types and constants shared by the TOY machine.
//
// The TOY is a 16-bit machine with 256 words of memory, 16 registers and an
// 8-bit program counter. An instruction is one word: a 4-bit opcode in bits
// 15:12, the destination register d in 11:8 and either two source registers
// s (7:4) and t (3:0) (format 1) or an 8-bit address in 7:0 (format 2).
// Opcode numbering, field positions and sizes follow the TOY reference card.
// The 17-bit control word groups the control lines of the datapath; the
// field names and encodings of the multiplexer selects follow the datapath
// drawing (register write-data select 10/01/00, ALU select 3 bits plus
// subtract and shift direction). The order of the fields in the struct is
// this design's own.
package toy_pkg;

  localparam int unsigned WORD_W  = 16;   // word width
  localparam int unsigned ADDR_W  = 8;    // memory address / PC width
  localparam int unsigned MEM_WORDS = 256;
  localparam int unsigned NREGS   = 16;
  localparam int unsigned RADDR_W = 4;
  localparam logic [ADDR_W-1:0] IO_ADDR = 8'hFF;  // mem[FF] is standard input/output

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [RADDR_W-1:0] reg_addr_t;

  typedef enum logic [3:0] {
    OP_HALT = 4'h0, OP_ADD  = 4'h1, OP_SUB  = 4'h2, OP_AND  = 4'h3,
    OP_XOR  = 4'h4, OP_SHL  = 4'h5, OP_SHR  = 4'h6, OP_LDA  = 4'h7,
    OP_LD   = 4'h8, OP_ST   = 4'h9, OP_LDI  = 4'hA, OP_STI  = 4'hB,
    OP_BZ   = 4'hC, OP_BP   = 4'hD, OP_JR   = 4'hE, OP_JL   = 4'hF
  } opcode_e;

  // ALU select, 3 bits, as in the ALU control table.
  typedef enum logic [2:0] {
    ALU_ADDSUB = 3'b000,
    ALU_AND    = 3'b001,
    ALU_XOR    = 3'b010,
    ALU_SHIFT  = 3'b011,
    ALU_PASS2  = 3'b100
  } alu_sel_e;

  // Register write-data multiplexer inputs as numbered in the datapath.
  typedef enum logic [1:0] {
    WD_MEM = 2'b00,   // memory read data
    WD_PC  = 2'b01,   // program counter (jump and link)
    WD_BUS = 2'b10    // ALU / address bus
  } wd_sel_e;

  // The 17 control signals.
  typedef struct packed {
    logic     pc_sel;     // PC mux: 0 = pc+1, 1 = bus (jump/branch)
    logic     pc_clk;     // PC is loaded at this clock edge
    logic     addr_sel;   // memory address mux: 0 = PC, 1 = bus
    logic     mem_clk;    // memory clock qualifier (execute)
    logic     mem_w;      // memory write
    logic     ir_clk;     // IR is loaded at this clock edge (fetch)
    wd_sel_e  wd_sel;     // register write-data mux (2 bits)
    logic     a_sel;      // register A address mux: 0 = s, 1 = d
    logic     reg_clk;    // register file clock qualifier (execute)
    logic     reg_w;      // register file write
    alu_sel_e alu_sel;    // ALU select (3 bits)
    logic     alu_sub;    // ALU subtract
    logic     alu_right;  // ALU shift direction: 1 = right
    logic     bus_sel;    // bus mux: 0 = ALU output, 1 = addr field
  } ctrl_t;

  typedef struct packed {
    opcode_e   op;
    reg_addr_t d;
    reg_addr_t s;
    reg_addr_t t;
  } instr_t;

endpackage
