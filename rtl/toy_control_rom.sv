// toy_control_rom: micro-programmed control of the TOY datapath.
//
// The same job as toy_control, done with a memory instead of gates: a
// 512-word by 17-bit ROM whose 9-bit address is made of the control inputs
// {opcode[3:0], execute, fetch, clock, >0, =0} and whose word is the 17
// control lines (toy_pkg::ctrl_t). The ROM size, address width and word
// width follow the micro-programming description; the order of the address
// bits and the contents are this design's own, filled at elaboration by
// build_rom() from the instruction table below.
//
// Clock bit: in the gated-clock drawings the clock-qualified lines (PC, IR,
// memory and register clocks) are high only while the clock pulse is on. In
// this synchronous design they are clock enables sampled at the rising edge,
// so toy_cpu drives the clock address bit with 1; the clock = 0 half of the
// ROM holds the same words with those enables cleared. Words whose address
// has fetch = execute (impossible phases) are all zero. Combinational read.
module toy_control_rom
  import toy_pkg::*;
(
  input  opcode_e op,
  input  logic    fetch,
  input  logic    execute,
  input  logic    clock,
  input  logic    eq0,
  input  logic    gt0,
  output ctrl_t   ctrl
);

  localparam int unsigned ROM_WORDS = 512;
  localparam int unsigned CTRL_W = $bits(ctrl_t);  // 17
  typedef logic [CTRL_W-1:0] rom_t [ROM_WORDS];

  // one microword for the address {o, ex, fe, ck, gt, eq}
  function automatic ctrl_t microword(logic [3:0] o, logic ex, logic fe, logic ck, logic gt, logic eq);
    ctrl_t w;
    w = '0;
    w.alu_sel = ALU_ADDSUB;
    w.wd_sel  = WD_MEM;
    if (ex == fe) return w;
    if (fe) begin
      // fetch: IR <- mem[PC], PC <- PC + 1
      w.ir_clk = ck;
      w.pc_clk = ck;
      return w;
    end
    w.pc_sel   = 1'b1;
    w.addr_sel = 1'b1;
    w.mem_clk  = ck;
    w.reg_clk  = ck;
    case (o)
      4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h6: begin
        w.wd_sel = WD_BUS;
        w.reg_w  = 1'b1;
        case (o)
          4'h1: w.alu_sel = ALU_ADDSUB;
          4'h2: begin w.alu_sel = ALU_ADDSUB; w.alu_sub = 1'b1; end
          4'h3: w.alu_sel = ALU_AND;
          4'h4: w.alu_sel = ALU_XOR;
          4'h5: w.alu_sel = ALU_SHIFT;
          default: begin w.alu_sel = ALU_SHIFT; w.alu_right = 1'b1; end
        endcase
      end
      4'h7: begin w.bus_sel = 1'b1; w.wd_sel = WD_BUS; w.reg_w = 1'b1; end
      4'h8: begin w.bus_sel = 1'b1; w.reg_w = 1'b1; end
      4'h9: begin w.bus_sel = 1'b1; w.a_sel = 1'b1; w.mem_w = 1'b1; end
      4'hA: begin w.alu_sel = ALU_PASS2; w.reg_w = 1'b1; end
      4'hB: begin w.alu_sel = ALU_PASS2; w.a_sel = 1'b1; w.mem_w = 1'b1; end
      4'hC: begin w.a_sel = 1'b1; w.bus_sel = 1'b1; w.pc_clk = ck & eq; end
      4'hD: begin w.a_sel = 1'b1; w.bus_sel = 1'b1; w.pc_clk = ck & gt; end
      4'hE: begin w.alu_sel = ALU_PASS2; w.pc_clk = ck; end
      4'hF: begin w.bus_sel = 1'b1; w.wd_sel = WD_PC; w.reg_w = 1'b1; w.pc_clk = ck; end
      default: ;  // halt
    endcase
    return w;
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < ROM_WORDS; a++) begin
      logic [8:0] ad;
      ad = 9'(a);
      r[a] = CTRL_W'(microword(ad[8:5], ad[4], ad[3], ad[2], ad[1], ad[0]));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [8:0] addr;
  assign addr = {op, execute, fetch, clock, gt0, eq0};
  assign ctrl = ctrl_t'(ROM[addr]);

endmodule
