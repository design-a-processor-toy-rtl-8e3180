// tb_toy_regfile: self-checking test of the 16 x 16 register file: two
// independent read ports, one write port, and register 0 always reading 0
// even after writes to it.
module tb_toy_regfile;
  logic clk = 0, rst, we;
  logic [3:0] aa, ba, wa;
  logic [15:0] wd, ad, bd;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  toy_regfile dut (.clk, .rst, .a_addr(aa), .b_addr(ba), .w_addr(wa), .we, .w_data(wd), .a_data(ad), .b_data(bd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; aa = 4'd5; ba = 4'd15;
    @(posedge clk); #1;
    checks++;
    if (ad !== 16'h0 || bd !== 16'h0) begin failures++; $display("FAIL reset"); end
    rst = 0; we = 1;
    for (int i = 0; i < 16; i++) begin
      wa = 4'(i); wd = 16'($urandom) | 16'h1; model[i] = (i == 0) ? 16'h0 : wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      aa = 4'($urandom); ba = 4'($urandom); wa = 4'($urandom);
      wd = 16'($urandom) | 16'h1; we = 1'($urandom);
      #1;
      checks++;
      if (ad !== model[aa]) begin failures++; $display("FAIL A r%0d got=%h exp=%h", aa, ad, model[aa]); end
      checks++;
      if (bd !== model[ba]) begin failures++; $display("FAIL B r%0d got=%h exp=%h", ba, bd, model[ba]); end
      @(posedge clk); #1;
      if (we && wa != 0) model[wa] = wd;
    end
    aa = 0; ba = 0; #1;
    checks++;
    if (ad !== 16'h0 || bd !== 16'h0) begin failures++; $display("FAIL R0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
