// tb_toy_alu: self-checking test of the TOY ALU.
// Drives random and corner operands through every select code, with and
// without subtract / shift direction, and compares with a reference written
// independently from the TOY reference card (two's-complement words,
// arithmetic right shift, shift by 16 or more empties the word).
module tb_toy_alu;
  import toy_pkg::*;
  logic [15:0] a, b, y;
  alu_sel_e sel;
  logic sub, right;
  int checks = 0, failures = 0;

  toy_alu dut (.in1(a), .in2(b), .sel(sel), .sub(sub), .right(right), .out(y));

  function automatic logic [15:0] ref_alu(logic [15:0] x, logic [15:0] z, logic [2:0] s, logic sb, logic rt);
    int xi, zi;
    xi = int'($signed(x));
    zi = int'(z);
    case (s)
      3'b000: return sb ? 16'(xi - zi) : 16'(xi + zi);
      3'b001: return x & z;
      3'b010: return x ^ z;
      3'b011: if (rt) return (zi >= 16) ? (x[15] ? 16'hFFFF : 16'h0) : 16'(xi / (1 << zi) - ((xi < 0 && (xi % (1 << zi)) != 0) ? 1 : 0));
              else    return (zi >= 16) ? 16'h0 : 16'(xi * (1 << zi));
      3'b100: return z;
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [15:0] x, logic [15:0] z, logic [2:0] s, logic sb, logic rt);
    logic [15:0] e;
    a = x; b = z; sel = alu_sel_e'(s); sub = sb; right = rt;
    #1;
    e = ref_alu(x, z, s, sb, rt);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL sel=%b sub=%b right=%b a=%h b=%h got=%h exp=%h", s, sb, rt, x, z, y, e);
    end
  endtask

  initial begin
    // the reference card example: 0028 + 0064 = 008C
    try(16'h0028, 16'h0064, 3'b000, 1'b0, 1'b0);
    try(16'h0005, 16'h0007, 3'b000, 1'b1, 1'b0);   // 5 - 7 = FFFE
    try(16'h8001, 16'h0001, 3'b011, 1'b0, 1'b1);   // arithmetic right shift
    try(16'h8001, 16'h0010, 3'b011, 1'b0, 1'b1);
    try(16'h1234, 16'h0011, 3'b011, 1'b0, 1'b0);
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] x, z;
      x = 16'($urandom);
      z = (i % 3 == 0) ? 16'($urandom_range(0, 20)) : 16'($urandom);
      try(x, z, 3'($urandom_range(0, 4)), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
