// toy_mux: a K-bit wide N-to-1 multiplexer.
//
// Input i appears on the output when `sel` equals i; this is the layered
// array of K single-bit N-to-1 multiplexers of the multiplexer recap. The
// select is ceil(log2 N) bits wide. A select past N-1 gives 0 (own choice).
// Combinational.
module toy_mux #(
  parameter int unsigned K = 16,
  parameter int unsigned N = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][K-1:0] in,
  input  logic [SW-1:0]       sel,
  output logic [K-1:0]        out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) out = in[i];
  end

endmodule
