// tb_toy_mux: self-checking test of the K-wide N-to-1 multiplexer, at the
// default 2 inputs and at 3 inputs of 16 bits (as used for the register
// write-data select). Every select value is tried with random inputs.
module tb_toy_mux;
  logic [1:0][15:0] in2;
  logic [2:0][15:0] in3;
  logic       s2;
  logic [1:0] s3;
  logic [15:0] y2, y3;
  int checks = 0, failures = 0;

  toy_mux #(.K(16), .N(2)) dut2 (.in(in2), .sel(s2), .out(y2));
  toy_mux #(.K(16), .N(3)) dut3 (.in(in3), .sel(s3), .out(y3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      in2 = {16'($urandom), 16'($urandom)};
      in3 = {16'($urandom), 16'($urandom), 16'($urandom)};
      s2 = 1'(i);
      s3 = 2'(i % 4);
      #1;
      checks++;
      if (y2 !== (s2 ? in2[1] : in2[0])) begin failures++; $display("FAIL N=2 sel=%0d", s2); end
      checks++;
      if (y3 !== ((s3 == 2'd3) ? 16'h0 : in3[s3])) begin failures++; $display("FAIL N=3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
