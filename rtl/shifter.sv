// shifter: the barrel shifter inside the ALU.
//
// Shifts `a` by `shamt` (0..31) positions: logical left, logical right or
// arithmetic right (sign bit copied in). Purely combinational.
module shifter
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [4:0]  shamt,
  input  shift_op_e   op,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      SH_SLL:  y = a << shamt;
      SH_SRL:  y = a >> shamt;
      SH_SRA:  y = 32'($signed(a) >>> shamt);
      default: y = a;
    endcase
  end
endmodule
