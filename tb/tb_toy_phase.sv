// tb_toy_phase: self-checking test of the fetch/execute generator: reset to
// fetch, strict alternation while enabled, fetch = not execute, and holding
// while the enable is low.
module tb_toy_phase;
  logic clk = 0, rst, en, fetch, execute, model;
  int checks = 0, failures = 0;

  toy_phase dut (.clk, .rst, .en, .fetch, .execute);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      checks++;
      if (execute !== model || fetch !== ~model) begin
        failures++; $display("FAIL i=%0d fetch=%b execute=%b exp_exec=%b", i, fetch, execute, model);
      end
      en = (i < 20) ? 1'b1 : 1'($urandom);
      @(posedge clk); #1;
      if (en) model = ~model;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
