// stack16x8: a 16-entry, 8-bit stack (the practice stack).
//
// Control inputs W and op select one of four operations, as in the stack
// operation table:
//   W=0 op=0  read: stack[top] is on rdata
//   W=0 op=1  top:  the top pointer is on rdata (zero-extended)
//   W=1 op=0  push: top <- top+1; stack[top+1] <- wdata   (at the clock edge)
//   W=1 op=1  pop:  top <- top-1                          (at the clock edge)
// Reads are combinational; push and pop act at the rising clock edge. Own
// choices: reset sets top to DEPTH-1 so the first push lands in entry 0;
// the pointer wraps around on overflow and underflow; while W=1 rdata shows
// stack[top].
module stack16x8 #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 8,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         w,
  input  logic         op,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] top;

  always_ff @(posedge clk) begin
    if (rst) begin
      top <= PW'(DEPTH - 1);
    end else if (w) begin
      if (!op) begin
        top           <= top + 1'b1;
        mem[top + 1'b1] <= wdata;
      end else begin
        top <= top - 1'b1;
      end
    end
  end

  always_comb begin
    if (!w && op) rdata = W'(top);
    else          rdata = mem[top];
  end

endmodule
