// tb_counter4: self-checking test of the 4-bit counter: reset to 0, +1 per
// enabled clock edge, hold when disabled, wrap from 15 to 0.
module tb_counter4;
  logic clk = 0, rst, en;
  logic [3:0] q, model;
  int checks = 0, failures = 0, wraps = 0;

  counter4 dut (.clk, .rst, .en, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d q=%0d exp=%0d", i, q, model); end
      en = (i < 40) ? 1'b1 : 1'($urandom);
      @(posedge clk); #1;
      if (en) begin if (model == 4'hF) wraps++; model = model + 4'd1; end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
