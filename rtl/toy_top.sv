// toy_top: the TOY machine with the practice circuits beside it.
//
// The TOY processor (toy_cpu) is the main design: a 16-bit, 16-register,
// 256-word machine that runs one instruction every two clock cycles. Next to
// it, unconnected to it and with their own ports, stand the small practice
// circuits: the 16 x 8 stack, the 4-bit counter and the SR flip-flop. All
// clocked parts share clk and rst. See each module for its timing.
// MICROCODE selects the TOY control: 0 (default) hard-wired gates, 1 the
// 512 x 17 micro-program ROM.
module toy_top
  import toy_pkg::*;
#(
  parameter bit MICROCODE = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  // TOY machine
  input  logic       start,
  input  addr_t      start_pc,
  output logic       halted,
  input  logic       prog_we,
  input  addr_t      prog_addr,
  input  word_t      prog_wdata,
  output word_t      prog_rdata,
  input  logic       in_valid,
  output logic       in_ready,
  input  word_t      in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_data,
  output addr_t      pc,
  output word_t      ir,
  output logic       fetch,
  // practice stack
  input  logic       stk_w,
  input  logic       stk_op,
  input  logic [7:0] stk_wdata,
  output logic [7:0] stk_rdata,
  // practice 4-bit counter
  input  logic       cnt_en,
  output logic [3:0] cnt_q,
  // SR flip-flop
  input  logic       sr_s,
  input  logic       sr_r,
  output logic       sr_q,
  output logic       sr_q_n
);

  toy_cpu #(.MICROCODE(MICROCODE)) u_cpu (
    .clk, .rst, .start, .start_pc, .halted,
    .prog_we, .prog_addr, .prog_wdata, .prog_rdata,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .pc_o(pc), .ir_o(ir), .fetch_o(fetch)
  );

  stack16x8 u_stack (
    .clk, .rst, .w(stk_w), .op(stk_op), .wdata(stk_wdata), .rdata(stk_rdata)
  );

  counter4 u_cnt (.clk, .rst, .en(cnt_en), .q(cnt_q));

  sr_latch u_sr (.s(sr_s), .r(sr_r), .q(sr_q), .q_n(sr_q_n));

endmodule
