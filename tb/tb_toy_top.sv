// tb_toy_top: end-to-end test of toy_top at its default sizes.
//
// TOY machine, four runs through the stopped-machine memory port:
//   1. a set-up program puts 0028 in R3 and 0064 in R4 and halts;
//   2. started at 20 with mem[20] = 1234 (add R2 <- R3 + R4), the fetch
//      cycle must leave PC = 21 and IR = 1234 and the execute cycle must
//      leave R2 = 008C, which a following store puts in memory;
//   3. started at 20 with mem[20] = FF30 (jump and link), R15 must be 21 and
//      PC 30;
//   4. a program that sums the words read from standard input until a 0
//      and writes the sum to standard output, fed with gaps so that the
//      machine waits for input and for the output to be taken;
//   5. a program that calls a multiply-by-adding subroutine with jump and
//      link / jump register, and uses load/store indirect, both shifts, and,
//      xor, a taken and a not-taken branch positive and a write to R0.
// Every run checks the results in memory, the words on standard output and
// the cycle count: 2 per instruction plus 1 per waiting cycle.
// Practice circuits: pushes and pops on the stack, the counter through a
// wrap, and set / reset / hold on the SR flip-flop.
// Each mechanism (input wait, output wait, branch taken, branch not taken,
// jump and link, jump register, R0 write, halt, stack push / pop / read /
// top, counter wrap, SR set / reset / hold) is counted and must occur.
module tb_toy_top;
  import toy_pkg::*;
  logic clk = 0, rst, start, halted, prog_we, in_valid, in_ready, out_valid, out_ready, fetch;
  addr_t start_pc, prog_addr, pc;
  word_t prog_wdata, prog_rdata, in_data, out_data, ir;
  logic stk_w, stk_op, cnt_en, sr_s, sr_r, sr_q, sr_q_n;
  logic [7:0] stk_wdata, stk_rdata;
  logic [3:0] cnt_q;
  int checks = 0, failures = 0;

  toy_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_wait = 0, n_out_wait = 0, n_taken = 0, n_not_taken = 0, n_jal = 0, n_jr = 0;
  int n_r0 = 0, n_halt = 0, n_push = 0, n_pop = 0, n_sread = 0, n_stop = 0, n_wrap = 0;
  int n_set = 0, n_reset = 0, n_hold = 0;
  int waits = 0;

  // a branch is taken when the PC after its execute cycle is its target
  logic br_pending = 0;
  addr_t br_target;
  always @(posedge clk) begin
    if (br_pending) begin
      if (pc == br_target) n_taken++; else n_not_taken++;
      br_pending <= 1'b0;
    end
    if (!rst && !halted && !fetch) begin
      if (in_ready && !in_valid)  begin n_in_wait++;  waits++; end
      if (out_valid && !out_ready) begin n_out_wait++; waits++; end
      if (!(in_ready && !in_valid) && !(out_valid && !out_ready)) begin
        case (ir[15:12])
          4'hC, 4'hD: begin br_pending <= 1'b1; br_target <= ir[7:0]; end
          4'hE: n_jr++;
          4'hF: n_jal++;
          4'h0: n_halt++;
          default: ;
        endcase
        if (ir[11:8] == 4'h0 && ir[15:12] inside {[4'h1:4'h8], 4'hA, 4'hF}) n_r0++;
      end
    end
  end

  // ---------------- TOY helpers ----------------
  task automatic poke(addr_t a, word_t w);
    prog_we = 1; prog_addr = a; prog_wdata = w;
    @(posedge clk); #1;
    prog_we = 0;
  endtask

  // check a memory word through the stopped-machine port
  task automatic expect_mem(addr_t a, word_t v, string what);
    prog_addr = a; #1;
    check(prog_rdata == v, $sformatf("%s (mem[%h] = %h, expected %h)", what, a, prog_rdata, v));
  endtask

  word_t inq [$];
  word_t outq [$];

  // run from `at` until halted; returns cycles; gaps>0 makes I/O wait
  task automatic run(addr_t at, int gaps, output int cycles);
    start = 1; start_pc = at;
    @(posedge clk); #1;
    start = 0;
    cycles = 0; waits = 0;
    while (!halted && cycles < 10000) begin
      in_valid  = inq.size() > 0 && (gaps == 0 || $urandom_range(0, gaps) == 0);
      in_data   = (inq.size() > 0) ? inq[0] : 16'h0;
      out_ready = (gaps == 0 || $urandom_range(0, gaps) == 0);
      #1;
      if (in_valid && in_ready) void'(inq.pop_front());
      if (out_valid && out_ready) outq.push_back(out_data);
      @(posedge clk); #1;
      cycles++;
    end
    in_valid = 0; out_ready = 0;
    check(halted == 1'b1, "machine halted");
  endtask

  int cyc;
  word_t sum;

  initial begin
    rst = 1; start = 0; start_pc = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    in_valid = 0; in_data = 0; out_ready = 0;
    stk_w = 0; stk_op = 0; stk_wdata = 0; cnt_en = 0; sr_s = 0; sr_r = 1;
    repeat (2) @(posedge clk); #1;
    rst = 0;

    // ---- 1. set up R3 and R4 ----
    poke(8'h10, 16'h7328);  // R3 <- 28
    poke(8'h11, 16'h7464);  // R4 <- 64
    poke(8'h12, 16'h0000);  // halt
    run(8'h10, 0, cyc);
    check(cyc == 6, $sformatf("set-up takes 3 instructions x 2 cycles (got %0d)", cyc));

    // ---- 2. the ADD example, cycle by cycle ----
    poke(8'h20, 16'h1234);  // R2 <- R3 + R4
    poke(8'h21, 16'h9250);  // mem[50] <- R2
    poke(8'h22, 16'h0000);
    start = 1; start_pc = 8'h20;
    @(posedge clk); #1;
    start = 0;
    check(pc == 8'h20 && fetch, "ADD: fetch phase, PC = 20");
    @(posedge clk); #1;                 // fetch and clock
    check(pc == 8'h21, $sformatf("ADD: after fetch PC = 21 (got %h)", pc));
    check(ir == 16'h1234, $sformatf("ADD: after fetch IR = 1234 (got %h)", ir));
    check(!fetch, "ADD: execute phase");
    @(posedge clk); #1;                 // execute and clock
    check(pc == 8'h21 && fetch, "ADD: back in fetch at 21 after execute and clock");
    while (!halted) @(posedge clk);
    #1;
    expect_mem(8'h50, 16'h008C, "ADD: R2 = 008C");

    // ---- 3. jump and link example ----
    poke(8'h20, 16'hFF30);  // R15 <- pc; pc <- 30
    poke(8'h30, 16'h9F51);  // mem[51] <- R15
    poke(8'h31, 16'h0000);
    run(8'h20, 0, cyc);
    expect_mem(8'h51, 16'h0021, "JAL: R15 = 0021");
    check(pc == 8'h32, $sformatf("JAL: jumped to 30, halted after 31 (PC %h)", pc));
    check(cyc == 6, $sformatf("JAL run: 3 instructions (got %0d cycles)", cyc));

    // ---- 4. sum of standard input ----
    poke(8'h10, 16'h7A00);  // RA <- 0
    poke(8'h11, 16'h8BFF);  // RB <- stdin
    poke(8'h12, 16'hCB15);  // if RB == 0 goto 15
    poke(8'h13, 16'h1AAB);  // RA <- RA + RB
    poke(8'h14, 16'hC011);  // goto 11
    poke(8'h15, 16'h9AFF);  // stdout <- RA
    poke(8'h16, 16'h0000);
    sum = 0;
    for (int i = 0; i < 8; i++) begin word_t v; v = 16'($urandom_range(1, 1000)); inq.push_back(v); sum += v; end
    inq.push_back(16'h0);
    outq.delete();
    run(8'h10, 3, cyc);
    check(outq.size() == 1 && outq[0] == sum, $sformatf("sum of input = %h", sum));
    check(inq.size() == 0, "all input consumed");
    // instructions: 1 + 8 * 4 + 2 (last read and branch) + 2
    check(cyc == 2 * (1 + 8 * 4 + 2 + 2) + waits, $sformatf("sum run cycles %0d, waits %0d", cyc, waits));

    // ---- 5. subroutine, indirect access, shifts, logic, branches ----
    begin
      word_t prog [int];
      prog = '{8'h10: 16'h8A30, 8'h11: 16'h8B31, 8'h12: 16'hFF40, 8'h13: 16'h9C32,
               8'h14: 16'h7250, 8'h15: 16'hAD02, 8'h16: 16'h7351, 8'h17: 16'hBD03,
               8'h18: 16'h7401, 8'h19: 16'h7503, 8'h1A: 16'h5645, 8'h1B: 16'h6765,
               8'h1C: 16'h3867, 8'h1D: 16'h4967, 8'h1E: 16'hD820, 8'h1F: 16'hD921,
               8'h20: 16'h0000, 8'h21: 16'h9633, 8'h22: 16'h9734, 8'h23: 16'h9835,
               8'h24: 16'h9936, 8'h25: 16'h96FF, 8'h26: 16'h1022, 8'h27: 16'h9037,
               8'h28: 16'h0000,
               8'h40: 16'h7C00, 8'h41: 16'h7101, 8'h42: 16'hCB46, 8'h43: 16'h1CCA,
               8'h44: 16'h2BB1, 8'h45: 16'hC042, 8'h46: 16'hE00F,
               8'h30: 16'h0007, 8'h31: 16'h0006, 8'h50: 16'hBEEF, 8'h51: 16'h0000};
      foreach (prog[a]) poke(addr_t'(a), prog[a]);
    end
    outq.delete();
    run(8'h10, 2, cyc);
    expect_mem(8'h32, 16'd42, "7 x 6 = 42 by subroutine");
    expect_mem(8'h51, 16'hBEEF, "load / store indirect copy");
    expect_mem(8'h33, 16'h0008, "1 << 3 = 8");
    expect_mem(8'h34, 16'h0001, "8 >> 3 = 1");
    expect_mem(8'h35, 16'h0000, "8 & 1 = 0");
    expect_mem(8'h36, 16'h0009, "8 ^ 1 = 9");
    expect_mem(8'h37, 16'h0000, "R0 still 0 after a write");
    check(outq.size() == 1 && outq[0] == 16'h0008, "output 8");
    // main 16 + 8, subroutine 2 + 6 * 4 + 2
    check(cyc == 2 * (24 + 28) + waits, $sformatf("program 5 cycles %0d, waits %0d", cyc, waits));

    // ---- practice stack ----
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      stk_w = 1; stk_op = 0; stk_wdata = 8'(8'hA0 + i);
      @(negedge clk); n_push++;
    end
    stk_w = 0; stk_op = 1; #1; n_stop++;
    check(stk_rdata == 8'h04, "stack top = 4 after 5 pushes");
    for (int i = 4; i >= 0; i--) begin
      stk_w = 0; stk_op = 0; #1; n_sread++;
      check(stk_rdata == 8'(8'hA0 + i), $sformatf("stack pop order %0d", i));
      stk_w = 1; stk_op = 1;
      @(negedge clk); n_pop++;
    end
    stk_w = 0; stk_op = 1; #1;
    check(stk_rdata == 8'h0F, "stack empty again");
    stk_w = 0; stk_op = 0;

    // ---- practice counter ----
    cnt_en = 1;
    for (int i = 1; i <= 20; i++) begin
      @(negedge clk);
      check(cnt_q == 4'(i), $sformatf("counter %0d", i));
      if (i == 16) n_wrap++;
    end
    cnt_en = 0;

    // ---- SR flip-flop ----
    sr_s = 1; sr_r = 0; #1; n_set++;   check(sr_q == 1 && sr_q_n == 0, "SR set");
    sr_s = 0; sr_r = 0; #1; n_hold++;  check(sr_q == 1, "SR hold 1");
    sr_s = 0; sr_r = 1; #1; n_reset++; check(sr_q == 0 && sr_q_n == 1, "SR reset");
    sr_s = 0; sr_r = 0; #1; n_hold++;  check(sr_q == 0, "SR hold 0");

    // ---- every mechanism happened ----
    check(n_in_wait > 0, "input wait happened");
    check(n_out_wait > 0, "output wait happened");
    check(n_taken > 0, "branch taken happened");
    check(n_not_taken > 0, "branch not taken happened");
    check(n_jal > 0, "jump and link happened");
    check(n_jr > 0, "jump register happened");
    check(n_r0 > 0, "write to R0 happened");
    check(n_halt >= 5, "halt happened");
    check(n_push > 0 && n_pop > 0 && n_sread > 0 && n_stop > 0, "stack operations happened");
    check(n_wrap > 0, "counter wrap happened");
    check(n_set > 0 && n_reset > 0 && n_hold > 0, "SR operations happened");
    $display("in_wait=%0d out_wait=%0d taken=%0d not_taken=%0d jal=%0d jr=%0d r0=%0d halt=%0d",
             n_in_wait, n_out_wait, n_taken, n_not_taken, n_jal, n_jr, n_r0, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
