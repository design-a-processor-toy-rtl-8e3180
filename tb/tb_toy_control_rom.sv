// tb_toy_control_rom: exhaustive test of the micro-programmed control ROM.
// All 512 addresses are applied. With the clock bit set, each word must
// equal the output of the hard-wired control (toy_control) for the same
// inputs; with the clock bit clear, the clock-qualified lines (PC, IR,
// memory and register clocks) must be low and the other lines unchanged;
// words with fetch = execute must be zero. In fetch words only the lines
// that act in fetch are compared (PC mux and clock, address mux, IR, memory
// and register clocks): the others are ignored while the memory and
// register clocks are low.
module tb_toy_control_rom;
  import toy_pkg::*;
  opcode_e op;
  logic fetch, execute, clock, eq0, gt0;
  ctrl_t c_rom, c_hw, c_exp, c_got;
  int checks = 0, failures = 0;

  toy_control_rom dut (.op, .fetch, .execute, .clock, .eq0, .gt0, .ctrl(c_rom));
  toy_control     ref_ctrl (.op, .fetch, .execute, .eq0, .gt0, .ctrl(c_hw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      logic [8:0] ad;
      ad = 9'(a);
      op = opcode_e'(ad[8:5]); execute = ad[4]; fetch = ad[3]; clock = ad[2]; gt0 = ad[1]; eq0 = ad[0];
      #1;
      if (fetch == execute) begin
        c_exp = '0;
      end else begin
        c_exp = c_hw;
        if (!clock) begin
          c_exp.pc_clk = 1'b0; c_exp.ir_clk = 1'b0; c_exp.mem_clk = 1'b0; c_exp.reg_clk = 1'b0;
        end
      end
      c_got = c_rom;
      if (fetch && !execute) begin
        c_got = '0; c_got.pc_sel = c_rom.pc_sel; c_got.pc_clk = c_rom.pc_clk; c_got.addr_sel = c_rom.addr_sel;
        c_got.ir_clk = c_rom.ir_clk; c_got.mem_clk = c_rom.mem_clk; c_got.reg_clk = c_rom.reg_clk;
        c_got.alu_sel = ALU_ADDSUB; c_got.wd_sel = WD_MEM;
        begin
          ctrl_t e;
          e = '0; e.pc_sel = c_exp.pc_sel; e.pc_clk = c_exp.pc_clk; e.addr_sel = c_exp.addr_sel;
          e.ir_clk = c_exp.ir_clk; e.mem_clk = c_exp.mem_clk; e.reg_clk = c_exp.reg_clk;
          e.alu_sel = ALU_ADDSUB; e.wd_sel = WD_MEM;
          c_exp = e;
        end
      end
      checks++;
      if (c_got !== c_exp) begin
        failures++;
        $display("FAIL addr=%h rom=%h exp=%h", ad, c_got, c_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
