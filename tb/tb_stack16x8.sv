// tb_stack16x8: self-checking test of the 16 x 8 stack: push, pop, read of
// stack[top] and read of the top pointer, against a model with the same
// pointer rule (reset top = 15, push pre-increments, pop decrements, wrap).
module tb_stack16x8;
  logic clk = 0, rst, w, op;
  logic [7:0] wd, rd;
  logic [7:0] model [16];
  logic [3:0] top;
  int checks = 0, failures = 0, pushes = 0, pops = 0;

  stack16x8 dut (.clk, .rst, .w, .op, .wdata(wd), .rdata(rd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_top();
    w = 0; op = 1; #1;
    checks++;
    if (rd !== {4'h0, top}) begin failures++; $display("FAIL top got=%h exp=%h", rd, top); end
  endtask

  initial begin
    rst = 1; w = 0; op = 0; wd = 0;
    @(posedge clk); #1;
    rst = 0; top = 4'hF;
    chk_top();
    // push 1..10, read back in reverse with pops
    for (int i = 1; i <= 10; i++) begin
      w = 1; op = 0; wd = 8'(i * 7);
      @(posedge clk); #1;
      top++; model[top] = wd; pushes++;
      w = 0; op = 0; #1;
      checks++;
      if (rd !== model[top]) begin failures++; $display("FAIL read after push got=%h exp=%h", rd, model[top]); end
    end
    chk_top();
    for (int i = 10; i >= 1; i--) begin
      w = 0; op = 0; #1;
      checks++;
      if (rd !== 8'(i * 7)) begin failures++; $display("FAIL pop order got=%h exp=%h", rd, 8'(i * 7)); end
      w = 1; op = 1;
      @(posedge clk); #1;
      top--; pops++;
    end
    chk_top();
    // fill every entry so that the model knows all of them, then random mix
    for (int i = 0; i < 16; i++) begin
      w = 1; op = 0; wd = 8'($urandom);
      @(posedge clk); #1;
      top++; model[top] = wd;
    end
    for (int i = 0; i < 500; i++) begin
      w = 1'($urandom); op = 1'($urandom); wd = 8'($urandom);
      #1;
      if (!w) begin
        checks++;
        if (rd !== (op ? {4'h0, top} : model[top])) begin failures++; $display("FAIL rand read op=%b got=%h", op, rd); end
      end
      @(posedge clk); #1;
      if (w && !op) begin top++; model[top] = wd; end
      else if (w && op) top--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
