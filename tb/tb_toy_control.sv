// tb_toy_control: self-checking test of the hard-wired TOY control.
// For every opcode, both phases and all four flag combinations it checks the
// 17 control lines against a table written from the instruction semantics:
// which multiplexer input each instruction needs, which storage it writes
// and when the PC is loaded.
module tb_toy_control;
  import toy_pkg::*;
  opcode_e op;
  logic fetch, execute, eq0, gt0;
  ctrl_t c;
  int checks = 0, failures = 0;

  toy_control dut (.op, .fetch, .execute, .eq0, .gt0, .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%h exec=%b eq0=%b gt0=%b %s got=%b exp=%b", op, execute, eq0, gt0, what, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 16; o++)
      for (int ph = 0; ph < 2; ph++)
        for (int f = 0; f < 4; f++) begin
          logic writes_reg, writes_mem, uses_d_as_a, bus_is_addr, pc_jump;
          logic [1:0] wd;
          logic [2:0] asel;
          logic sb, rt;
          op = opcode_e'(o); execute = 1'(ph); fetch = ~execute; eq0 = f[0]; gt0 = f[1];
          #1;
          // expectations from the reference card and the datapath
          writes_reg  = (o >= 1 && o <= 8) || o == 10 || o == 15;
          writes_mem  = (o == 9 || o == 11);
          uses_d_as_a = (o == 9 || o == 11 || o == 12 || o == 13);
          bus_is_addr = (o == 7 || o == 8 || o == 9 || o == 12 || o == 13 || o == 15);
          wd   = (o == 8 || o == 10) ? 2'b00 : (o == 15) ? 2'b01 : 2'b10;
          asel = (o == 3) ? 3'b001 : (o == 4) ? 3'b010 : (o == 5 || o == 6) ? 3'b011 :
                 (o == 10 || o == 11 || o == 14) ? 3'b100 : 3'b000;
          sb = (o == 2);
          rt = (o == 6);
          pc_jump = (o == 14) || (o == 15) || (o == 12 && eq0) || (o == 13 && gt0);
          // phase-only lines
          expect_bit("ir_clk",   c.ir_clk,   fetch);
          expect_bit("addr_sel", c.addr_sel, execute);
          expect_bit("pc_sel",   c.pc_sel,   execute);
          expect_bit("pc_clk",   c.pc_clk,   fetch | (execute & pc_jump));
          expect_bit("mem_clk",  c.mem_clk,  execute);
          expect_bit("reg_clk",  c.reg_clk,  execute);
          // effective writes (line AND its clock qualifier)
          expect_bit("reg write", c.reg_w & c.reg_clk, execute & writes_reg);
          expect_bit("mem write", c.mem_w & c.mem_clk, execute & writes_mem);
          if (execute) begin
            if (writes_reg) begin
              expect_bit("wd_sel1", c.wd_sel[1], wd[1]);
              expect_bit("wd_sel0", c.wd_sel[0], wd[0]);
            end
            if (uses_d_as_a || (o >= 1 && o <= 6)) expect_bit("a_sel", c.a_sel, uses_d_as_a);
            if (o != 0) expect_bit("bus_sel", c.bus_sel, bus_is_addr);
            if (!bus_is_addr && o != 0) begin
              expect_bit("alu_sel2", c.alu_sel[2], asel[2]);
              expect_bit("alu_sel1", c.alu_sel[1], asel[1]);
              expect_bit("alu_sel0", c.alu_sel[0], asel[0]);
              if (o == 1 || o == 2) expect_bit("alu_sub", c.alu_sub, sb);
              if (o == 5 || o == 6) expect_bit("alu_right", c.alu_right, rt);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
