// tb_toy_cpu: random-program test of the TOY processor against an
// instruction-level model written from the TOY reference card.
//
// Each round fills all 256 memory words with random data, writes a random
// program at 10 (opcodes 1..F, targets mostly inside the program) followed by
// stores of R1..R15 to E1..EF and a halt, and runs the model on a copy. Rounds
// whose model run does not halt within a step limit are dropped. The
// processor is then loaded through the stopped-machine memory port, started
// at 10 and run until it halts while the testbench feeds standard input and
// takes standard output with random gaps. Checked: every output word and its
// order, the number of input words taken, the final PC, all 256 memory words,
// and the cycle count, which must be two cycles per executed instruction plus
// one per cycle spent waiting for input or output.
module tb_toy_cpu;
  import toy_pkg::*;
  logic clk = 0, rst, start, halted, prog_we, in_valid, in_ready, out_valid, out_ready, fetch;
  addr_t start_pc, prog_addr, pc;
  word_t prog_wdata, prog_rdata, in_data, out_data, ir;
  int checks = 0, failures = 0;

  toy_cpu dut (
    .clk, .rst, .start, .start_pc, .halted, .prog_we, .prog_addr, .prog_wdata, .prog_rdata,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .pc_o(pc), .ir_o(ir), .fetch_o(fetch)
  );

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  word_t m_mem [256];
  word_t m_reg [16];
  word_t m_out [$];
  word_t in_words [64];
  int    m_in_used, m_steps;
  addr_t m_pc;
  int    op_seen [16];
  int    br_taken, br_not_taken, r0_writes;

  // returns 1 when the model halts within `limit` instructions
  function automatic bit run_model(int limit);
    word_t ir_m, a, b, v;
    logic [3:0] op, d, s, t;
    addr_t ad;
    m_steps = 0; m_in_used = 0;
    m_out.delete();
    for (int i = 0; i < 16; i++) m_reg[i] = 16'h0;
    while (m_steps < limit) begin
      ir_m = m_mem[m_pc];
      m_pc = m_pc + 8'd1;
      m_steps++;
      {op, d, s, t} = ir_m;
      ad = ir_m[7:0];
      a = m_reg[s]; b = m_reg[t];
      v = 16'h0;
      case (op)
        4'h0: return 1'b1;
        4'h1: v = a + b;
        4'h2: v = a - b;
        4'h3: v = a & b;
        4'h4: v = a ^ b;
        4'h5: v = (b > 16'd15) ? 16'h0 : (a << b[3:0]);
        4'h6: v = (b > 16'd15) ? {16{a[15]}} : 16'($signed(a) >>> b[3:0]);
        4'h7: v = {8'h00, ad};
        4'h8, 4'hA: begin
          addr_t ea;
          ea = (op == 4'h8) ? ad : m_reg[t][7:0];
          if (ea == 8'hFF) begin v = in_words[m_in_used % 64]; m_in_used++; end
          else v = m_mem[ea];
        end
        4'h9, 4'hB: begin
          addr_t ea;
          ea = (op == 4'h9) ? ad : m_reg[t][7:0];
          if (ea == 8'hFF) m_out.push_back(m_reg[d]);
          else m_mem[ea] = m_reg[d];
        end
        4'hC: if (m_reg[d] == 16'h0) m_pc = ad;
        4'hD: if ($signed(m_reg[d]) > 0) m_pc = ad;
        4'hE: m_pc = m_reg[t][7:0];
        4'hF: begin v = {8'h00, m_pc}; m_pc = ad; end
        default: ;
      endcase
      if (op inside {[4'h1:4'h8], 4'hA, 4'hF}) begin
        if (d != 0) m_reg[d] = v;
      end
    end
    return 1'b0;
  endfunction

  // coverage bookkeeping, separate from the model so dropped rounds do not count
  function automatic void tally(word_t image [256]);
    // re-run quickly only for coverage counts
    word_t r [16];
    addr_t p;
    word_t mm [256];
    int used;
    mm = image; p = 8'h10; used = 0;
    for (int i = 0; i < 16; i++) r[i] = 0;
    for (int k = 0; k < m_steps; k++) begin
      word_t w;
      logic [3:0] op, d, t;
      w = mm[p]; p++;
      op = w[15:12]; d = w[11:8]; t = w[3:0];
      op_seen[op]++;
      if (op inside {[4'h1:4'h8], 4'hA, 4'hF} && d == 0) r0_writes++;
      case (op)
        4'h1: r[d] = r[w[7:4]] + r[t];
        4'h2: r[d] = r[w[7:4]] - r[t];
        4'h3: r[d] = r[w[7:4]] & r[t];
        4'h4: r[d] = r[w[7:4]] ^ r[t];
        4'h5: r[d] = (r[t] > 15) ? 16'h0 : r[w[7:4]] << r[t][3:0];
        4'h6: r[d] = (r[t] > 15) ? {16{r[w[7:4]][15]}} : 16'($signed(r[w[7:4]]) >>> r[t][3:0]);
        4'h7: r[d] = {8'h0, w[7:0]};
        4'h8: if (w[7:0] == 8'hFF) begin r[d] = in_words[used % 64]; used++; end else r[d] = mm[w[7:0]];
        4'hA: if (r[t][7:0] == 8'hFF) begin r[d] = in_words[used % 64]; used++; end else r[d] = mm[r[t][7:0]];
        4'h9: if (w[7:0] != 8'hFF) mm[w[7:0]] = r[d];
        4'hB: if (r[t][7:0] != 8'hFF) mm[r[t][7:0]] = r[d];
        4'hC: if (r[d] == 0) begin p = w[7:0]; br_taken++; end else br_not_taken++;
        4'hD: if ($signed(r[d]) > 0) begin p = w[7:0]; br_taken++; end else br_not_taken++;
        4'hE: p = r[t][7:0];
        4'hF: begin r[d] = {8'h0, p}; p = w[7:0]; end
        default: ;
      endcase
      r[0] = 0;
    end
  endfunction

  // ---------------- stimulus ----------------
  word_t image [256];
  int    rounds = 0, stall_in = 0, stall_out = 0;

  task automatic run_round();
    int len, cycles, outs_seen, ins_taken, waits;
    word_t w;
    bit ok;
    // build a program
    for (int i = 0; i < 256; i++) image[i] = 16'($urandom);
    len = $urandom_range(8, 40);
    for (int i = 0; i < len; i++) begin
      logic [3:0] op;
      op = 4'($urandom_range(1, 15));
      w = {op, 12'($urandom)};
      // keep most jump targets inside the program, and make input/output common
      if (op inside {4'hC, 4'hD, 4'hF} && $urandom_range(0, 3) != 0) w[7:0] = 8'(8'h10 + $urandom_range(0, len + 15));
      if (op inside {4'h8, 4'h9} && $urandom_range(0, 3) == 0) w[7:0] = 8'hFF;
      if (op inside {4'h5, 4'h6} && $urandom_range(0, 1) == 0) w[3:0] = 4'h0;
      image[8'h10 + i] = w;
    end
    for (int i = 1; i < 16; i++) image[8'h10 + len + i - 1] = {4'h9, 4'(i), 8'(8'hE0 + i)};
    image[8'h10 + len + 15] = 16'h0000;
    for (int i = 0; i < 64; i++) in_words[i] = 16'($urandom);
    m_mem = image;
    m_pc  = 8'h10;
    ok = run_model(400);
    if (!ok) return;
    rounds++;
    tally(image);

    // load and run the processor
    rst = 1; start = 0; prog_we = 0; in_valid = 0; out_ready = 0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (!halted) begin failures++; $display("FAIL not stopped after reset"); end
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_wdata = image[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    start = 1; start_pc = 8'h10;
    @(posedge clk); #1;
    start = 0;
    cycles = 0; outs_seen = 0; ins_taken = 0; waits = 0;
    while (!halted && cycles < 5000) begin
      in_valid  = ($urandom_range(0, 2) != 0);
      in_data   = in_words[ins_taken % 64];
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (in_ready && !in_valid)  begin waits++; stall_in++; end
      if (out_valid && !out_ready) begin waits++; stall_out++; end
      if (out_valid && out_ready) begin
        checks++;
        if (outs_seen >= m_out.size() || out_data !== m_out[outs_seen]) begin
          failures++; $display("FAIL output %0d got=%h", outs_seen, out_data);
        end
        outs_seen++;
      end
      if (in_ready && in_valid) ins_taken++;
      @(posedge clk); #1;
      cycles++;
    end
    in_valid = 0; out_ready = 0;
    checks++;
    if (!halted) begin failures++; $display("FAIL round %0d did not halt", rounds); end
    checks++;
    if (outs_seen != m_out.size()) begin failures++; $display("FAIL outputs %0d exp %0d", outs_seen, m_out.size()); end
    checks++;
    if (ins_taken != m_in_used) begin failures++; $display("FAIL inputs %0d exp %0d", ins_taken, m_in_used); end
    checks++;
    if (pc !== m_pc) begin failures++; $display("FAIL final pc %h exp %h", pc, m_pc); end
    checks++;
    if (cycles != 2 * m_steps + waits) begin
      failures++; $display("FAIL cycles %0d exp %0d (steps %0d waits %0d)", cycles, 2 * m_steps + waits, m_steps, waits);
    end
    for (int i = 0; i < 256; i++) begin
      prog_addr = 8'(i); #1;
      checks++;
      if (prog_rdata !== m_mem[i]) begin failures++; $display("FAIL mem[%h] got=%h exp=%h", i, prog_rdata, m_mem[i]); end
    end
  endtask

  initial begin
    rst = 1; start = 0; start_pc = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    in_valid = 0; in_data = 0; out_ready = 0;
    br_taken = 0; br_not_taken = 0; r0_writes = 0;
    for (int i = 0; i < 16; i++) op_seen[i] = 0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < 400 && rounds < 150; t++) run_round();
    // every instruction and mechanism must have been exercised
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL opcode %h never executed", i); end
    end
    checks++; if (br_taken == 0)     begin failures++; $display("FAIL no branch taken"); end
    checks++; if (br_not_taken == 0) begin failures++; $display("FAIL no branch not taken"); end
    checks++; if (stall_in == 0)     begin failures++; $display("FAIL no input wait"); end
    checks++; if (stall_out == 0)    begin failures++; $display("FAIL no output wait"); end
    checks++; if (r0_writes == 0)    begin failures++; $display("FAIL no write to R0"); end
    $display("rounds=%0d taken=%0d not_taken=%0d in_waits=%0d out_waits=%0d r0_writes=%0d",
             rounds, br_taken, br_not_taken, stall_in, stall_out, r0_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
