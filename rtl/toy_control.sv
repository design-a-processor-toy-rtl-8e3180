// toy_control: hard-wired control of the TOY datapath.
//
// Inputs are the opcode from the IR, the two phase lines (fetch, execute)
// and the =0 / >0 flags of register A; the output is the 17-bit control word
// (toy_pkg::ctrl_t). Combinational: the clock is not an input here, because
// each "clock" qualifier of the datapath (PC, IR, memory and register clocks)
// is delivered as an enable that takes effect at the next rising edge.
//
// Fetch: memory address = PC, IR is loaded, PC <- PC + 1.
// Execute: memory address = bus, PC mux takes the bus, memory and register
// clocks are enabled and the opcode sets the rest:
//   1-6  R[d] <- R[s] ALU R[t]     (A = s, bus = ALU, write bus)
//   7    R[d] <- addr              (bus = addr, write bus)
//   8    R[d] <- mem[addr]         (bus = addr, write memory data)
//   9    mem[addr] <- R[d]         (A = d, bus = addr, memory write)
//   A    R[d] <- mem[R[t]]         (ALU copies input 2, write memory data)
//   B    mem[R[t]] <- R[d]         (A = d, ALU copies input 2, memory write)
//   C/D  pc <- addr if R[d] =0 / >0 (A = d, bus = addr)
//   E    pc <- R[t]                (ALU copies input 2)
//   F    R[d] <- pc; pc <- addr    (bus = addr, write PC)
// The PC load condition is fetch OR jump-link OR jump-register OR
// (>0 AND branch-positive) OR (=0 AND branch-zero), as drawn for the PC.
// Halt (0) drives no writes; stopping the machine is done in toy_cpu.
// Five lines are the phase lines themselves (PC mux select, address mux
// select, memory and register clock qualifiers follow `execute`, the IR
// clock follows `fetch`), as in the drawings; they stay separate lines so the
// control word keeps its 17 signals.
// Which signal settings an instruction leaves unused ("don't care") is this
// design's choice: they are held at 0.
module toy_control
  import toy_pkg::*;
(
  input  opcode_e op,
  input  logic    fetch,
  input  logic    execute,
  input  logic    eq0,
  input  logic    gt0,
  output ctrl_t   ctrl
);

  logic is_bz, is_bp, is_jr, is_jl;

  always_comb begin
    is_bz = (op == OP_BZ);
    is_bp = (op == OP_BP);
    is_jr = (op == OP_JR);
    is_jl = (op == OP_JL);

    ctrl = '0;
    ctrl.alu_sel = ALU_ADDSUB;
    ctrl.wd_sel  = WD_MEM;

    // PC path
    ctrl.pc_sel   = execute;
    ctrl.pc_clk   = fetch | (execute & (is_jl | is_jr | (gt0 & is_bp) | (eq0 & is_bz)));
    // memory address and clocks
    ctrl.addr_sel = execute;
    ctrl.ir_clk   = fetch;
    ctrl.mem_clk  = execute;
    ctrl.reg_clk  = execute;

    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SHL, OP_SHR: begin
        ctrl.a_sel   = 1'b0;
        ctrl.bus_sel = 1'b0;
        ctrl.wd_sel  = WD_BUS;
        ctrl.reg_w   = 1'b1;
        unique case (op)
          OP_ADD:  ctrl.alu_sel = ALU_ADDSUB;
          OP_SUB:  begin ctrl.alu_sel = ALU_ADDSUB; ctrl.alu_sub = 1'b1; end
          OP_AND:  ctrl.alu_sel = ALU_AND;
          OP_XOR:  ctrl.alu_sel = ALU_XOR;
          OP_SHL:  ctrl.alu_sel = ALU_SHIFT;
          default: begin ctrl.alu_sel = ALU_SHIFT; ctrl.alu_right = 1'b1; end
        endcase
      end
      OP_LDA: begin
        ctrl.bus_sel = 1'b1;
        ctrl.wd_sel  = WD_BUS;
        ctrl.reg_w   = 1'b1;
      end
      OP_LD: begin
        ctrl.bus_sel = 1'b1;
        ctrl.wd_sel  = WD_MEM;
        ctrl.reg_w   = 1'b1;
      end
      OP_ST: begin
        ctrl.bus_sel = 1'b1;
        ctrl.a_sel   = 1'b1;
        ctrl.mem_w   = 1'b1;
      end
      OP_LDI: begin
        ctrl.alu_sel = ALU_PASS2;
        ctrl.bus_sel = 1'b0;
        ctrl.wd_sel  = WD_MEM;
        ctrl.reg_w   = 1'b1;
      end
      OP_STI: begin
        ctrl.alu_sel = ALU_PASS2;
        ctrl.bus_sel = 1'b0;
        ctrl.a_sel   = 1'b1;
        ctrl.mem_w   = 1'b1;
      end
      OP_BZ, OP_BP: begin
        ctrl.a_sel   = 1'b1;
        ctrl.bus_sel = 1'b1;
      end
      OP_JR: begin
        ctrl.alu_sel = ALU_PASS2;
        ctrl.bus_sel = 1'b0;
      end
      OP_JL: begin
        ctrl.bus_sel = 1'b1;
        ctrl.wd_sel  = WD_PC;
        ctrl.reg_w   = 1'b1;
      end
      default: ;  // OP_HALT
    endcase
  end

endmodule
