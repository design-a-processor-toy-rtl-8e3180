// tb_toy_memory: self-checking test of the 256 x 16 main memory. Fills all
// 256 words, then does random reads and writes against a model array,
// checking that writes land only with the enable, at the clock edge, and
// that the addressed word is readable without waiting for a clock.
module tb_toy_memory;
  logic clk = 0, we;
  logic [7:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  toy_memory dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); wdata = 16'(i * 16'h0101 + 16'h5a); we = 1; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL fill a=%h got=%h exp=%h", addr, rdata, model[i]); end
    end
    for (int i = 0; i < 1000; i++) begin
      addr = 8'($urandom); wdata = 16'($urandom); we = 1'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL read a=%h got=%h exp=%h", addr, rdata, model[addr]); end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL after a=%h got=%h exp=%h", addr, rdata, model[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
