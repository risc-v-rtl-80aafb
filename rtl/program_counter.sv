// program_counter: the register that holds the address of the instruction
// being executed.
//
// It loads `pc_next` on every rising clock edge and clears to 0 on a
// synchronous active-high reset (reset value and style are this design's
// choice). For fault-injection experiments, `seu_en` flips bit `seu_bit` of
// the stored value instead of loading, modelling a single-event upset.
module program_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WIDTH-1:0]         pc_next,
  input  logic                     seu_en,
  input  logic [$clog2(WIDTH)-1:0] seu_bit,
  output logic [WIDTH-1:0]         pc
);
  always_ff @(posedge clk) begin
    if (rst)         pc <= '0;
    else if (seu_en) pc <= pc ^ (WIDTH'(1) << seu_bit);
    else             pc <= pc_next;
  end
endmodule
