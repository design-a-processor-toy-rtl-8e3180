// tb_sr_latch: self-checking test of the SR flip-flop: set, reset and hold
// (S = R = 0 keeps the last value), with Q_n the complement of Q. The
// forbidden S = R = 1 input is never applied.
module tb_sr_latch;
  logic s, r, q, q_n, model;
  int checks = 0, failures = 0;

  sr_latch dut (.s, .r, .q, .q_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; r = 1; #1; model = 0;
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(0, 2))
        0: begin s = 1; r = 0; model = 1; end
        1: begin s = 0; r = 1; model = 0; end
        default: begin s = 0; r = 0; end
      endcase
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++; $display("FAIL i=%0d s=%b r=%b q=%b exp=%b", i, s, r, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
