// tb_toy_cond_eval: self-checking test of the =0 and >0 flags over corner
// values (0, 1, 7FFF, 8000, FFFF) and random words, read as two's complement.
module tb_toy_cond_eval;
  logic [15:0] x;
  logic eq0, gt0;
  int checks = 0, failures = 0;

  toy_cond_eval dut (.x, .eq0, .gt0);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [15:0] v);
    x = v; #1;
    checks++;
    if (eq0 !== (v == 16'h0) || gt0 !== ($signed(v) > 16'sh0)) begin
      failures++; $display("FAIL x=%h eq0=%b gt0=%b", v, eq0, gt0);
    end
  endtask

  initial begin
    try(16'h0000); try(16'h0001); try(16'h7FFF); try(16'h8000); try(16'hFFFF);
    for (int i = 0; i < 1000; i++) try(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
