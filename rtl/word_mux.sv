// word_mux: N-input, WIDTH-bit multiplexer.
//
// `y` is input `d[sel]`; a select value of N or above gives input 0. The
// core uses it for the ALU operand, the memory-to-register choice and the
// next-PC choices. Purely combinational.
module word_mux #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]         d [N],
  input  logic [$clog2(N)-1:0]     sel,
  output logic [WIDTH-1:0]         y
);
  always_comb begin
    y = d[0];
    for (int i = 1; i < N; i++)
      if (int'(sel) == i) y = d[i];
  end
endmodule
