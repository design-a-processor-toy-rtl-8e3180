// tb_toy_reg: self-checking test of the K-bit register. Checks reset, that
// the contents stay while write enable is low, and that the input is copied
// at the clock edge when it is high (one cycle latency).
module tb_toy_reg;
  logic clk = 0, rst, we;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  toy_reg #(.K(16)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = 16'hFFFF;
    @(posedge clk); #1;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0; model = 16'h0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); d = 16'($urandom);
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
