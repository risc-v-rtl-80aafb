// adder: WIDTH-bit adder with carry in and carry out.
//
// Used for the PC incrementer (PC + 4) and the branch/AUIPC target adder
// (PC + immediate). The result is WIDTH+1 bits wide, the top bit being the
// carry out, as in the document's processor. Purely combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   sum
);
  assign sum = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
endmodule
