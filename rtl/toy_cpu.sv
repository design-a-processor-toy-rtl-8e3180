// toy_cpu: the TOY machine, a 16-bit two-cycle processor.
//
// Datapath (as drawn for the TOY): an 8-bit PC with a +1 incrementer and a
// PC multiplexer (pc+1 or the bus); a memory-address multiplexer (PC or the
// bus); 256 x 16 memory whose read data feeds the IR and the register
// write-data multiplexer; the IR splits into op, d, s, t; a 16 x 16 register
// file with A address = s or d, B address = t and write address = d; the ALU
// takes A and B; the bus multiplexer picks the ALU output or the 8-bit addr
// field (s,t). The bus feeds the PC multiplexer, the address multiplexer and
// the register write-data multiplexer (bus / PC / memory). Register A feeds
// the memory write data and the condition evaluator. toy_control turns op,
// phase and flags into the 17 control lines; with MICROCODE = 1 the
// micro-programmed control (toy_control_rom, a 512 x 17 ROM) does it
// instead. Hard-wired control is the default.
//
// Timing: every instruction takes two clock cycles, a fetch cycle (IR <-
// mem[PC], PC <- PC+1 at its closing edge) followed by an execute cycle
// (register, memory and PC writes at its closing edge). The gated clocks of
// the drawings (e.g. IR clock = fetch AND clock) are clock enables on one
// rising-edge clock here.
//
// Input/output: memory address FF is standard input and output, as the
// reference card says. A load (8 or A) from FF takes the word from the
// in_valid/in_ready/in_data stream and a store (9 or B) to FF offers R[d] on
// the out_valid/out_ready/out_data stream instead of writing memory. The
// handshake and the rule that the execute cycle is stretched until the
// transfer happens are this design's own.
//
// Run control (own choice, the drawings show none): after reset the machine
// is stopped. While stopped, the prog_* port reads and writes memory. A
// one-cycle `start` pulse loads PC from start_pc and starts in fetch. Opcode
// 0 (halt) stops the machine at the end of its execute cycle; `halted` is
// then high and PC holds the address after the halt.
module toy_cpu
  import toy_pkg::*;
#(
  parameter bit MICROCODE = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  // run control
  input  logic  start,
  input  addr_t start_pc,
  output logic  halted,
  // memory access while stopped
  input  logic  prog_we,
  input  addr_t prog_addr,
  input  word_t prog_wdata,
  output word_t prog_rdata,
  // standard input (loads from mem[FF])
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  // standard output (stores to mem[FF])
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  // observation
  output addr_t pc_o,
  output word_t ir_o,
  output logic  fetch_o
);

  logic   running;
  logic   fetch, execute;
  ctrl_t  ctrl;
  addr_t  pc, pc_inc, pc_next, pc_d, addr_mux, mem_addr;
  word_t  ir_q, mem_rdata, mem_wdata, rd_data, a_data, b_data, alu_out, bus, wd;
  instr_t ir;
  logic   eq0, gt0, io_access, io_load, io_store, io_wait, adv, mem_we;
  logic [RADDR_W-1:0] a_addr;

  assign ir = instr_t'(ir_q);

  // ---------------- phase and run state ----------------
  always_ff @(posedge clk) begin
    if (rst)                                          running <= 1'b0;
    else if (start && !running)                       running <= 1'b1;
    else if (running && execute && ir.op == OP_HALT)  running <= 1'b0;
  end
  assign halted = ~running;

  // a cycle advances unless it is an execute cycle waiting for I/O
  assign adv = running & ~io_wait;

  toy_phase u_phase (
    .clk(clk), .rst(rst || (start && !running)), .en(adv),
    .fetch(fetch), .execute(execute)
  );

  if (MICROCODE) begin : g_rom_ctrl
    toy_control_rom u_ctrl (
      .op(ir.op), .fetch(fetch), .execute(execute), .clock(1'b1),
      .eq0(eq0), .gt0(gt0), .ctrl(ctrl)
    );
  end else begin : g_hw_ctrl
    toy_control u_ctrl (
      .op(ir.op), .fetch(fetch), .execute(execute), .eq0(eq0), .gt0(gt0), .ctrl(ctrl)
    );
  end

  // ---------------- PC ----------------
  assign pc_inc = pc + 8'd1;

  toy_mux #(.K(ADDR_W), .N(2)) u_pc_mux (
    .in({bus[ADDR_W-1:0], pc_inc}), .sel(ctrl.pc_sel), .out(pc_next)
  );

  assign pc_d = running ? pc_next : start_pc;

  toy_reg #(.K(ADDR_W)) u_pc (
    .clk(clk), .rst(rst),
    .we((adv && ctrl.pc_clk) || (start && !running)),
    .d(pc_d), .q(pc)
  );

  // ---------------- memory ----------------
  toy_mux #(.K(ADDR_W), .N(2)) u_addr_mux (
    .in({bus[ADDR_W-1:0], pc}), .sel(ctrl.addr_sel), .out(addr_mux)
  );

  assign io_access = running && execute && ctrl.addr_sel && addr_mux == IO_ADDR;
  assign io_load   = io_access && ctrl.reg_w && ctrl.wd_sel == WD_MEM;
  assign io_store  = io_access && ctrl.mem_w;
  assign io_wait   = (io_load && !in_valid) || (io_store && !out_ready);

  assign mem_addr  = running ? addr_mux : prog_addr;
  assign mem_we    = running ? (adv && ctrl.mem_clk && ctrl.mem_w && !io_store) : prog_we;
  assign mem_wdata = running ? a_data : prog_wdata;

  toy_memory u_mem (
    .clk(clk), .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign prog_rdata = mem_rdata;
  assign rd_data    = io_load ? in_data : mem_rdata;

  assign in_ready  = io_load;
  assign out_valid = io_store;
  assign out_data  = a_data;

  // ---------------- IR ----------------
  toy_reg #(.K(WORD_W)) u_ir (
    .clk(clk), .rst(rst), .we(adv && ctrl.ir_clk), .d(mem_rdata), .q(ir_q)
  );

  // ---------------- registers, ALU, bus ----------------
  toy_mux #(.K(RADDR_W), .N(2)) u_a_mux (
    .in({ir.d, ir.s}), .sel(ctrl.a_sel), .out(a_addr)
  );

  toy_regfile u_rf (
    .clk(clk), .rst(rst), .a_addr(a_addr), .b_addr(ir.t), .w_addr(ir.d),
    .we(adv && ctrl.reg_clk && ctrl.reg_w), .w_data(wd),
    .a_data(a_data), .b_data(b_data)
  );

  toy_cond_eval #(.W(WORD_W)) u_cond (.x(a_data), .eq0(eq0), .gt0(gt0));

  toy_alu u_alu (
    .in1(a_data), .in2(b_data), .sel(ctrl.alu_sel), .sub(ctrl.alu_sub),
    .right(ctrl.alu_right), .out(alu_out)
  );

  toy_mux #(.K(WORD_W), .N(2)) u_bus_mux (
    .in({{8'h00, ir.s, ir.t}, alu_out}), .sel(ctrl.bus_sel), .out(bus)
  );

  toy_mux #(.K(WORD_W), .N(3)) u_wd_mux (
    .in({bus, {8'h00, pc}, rd_data}), .sel(ctrl.wd_sel), .out(wd)
  );

  assign pc_o    = pc;
  assign ir_o    = ir_q;
  assign fetch_o = fetch;

  // ---------------- handshake rules ----------------
  // a word offered on standard output stays put until it is taken
  property p_out_hold;
    @(posedge clk) disable iff (rst) out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  assert property (p_out_hold);
  // a load from standard input keeps asking until a word arrives
  property p_in_hold;
    @(posedge clk) disable iff (rst) in_ready && !in_valid |=> in_ready;
  endproperty
  assert property (p_in_hold);

endmodule
