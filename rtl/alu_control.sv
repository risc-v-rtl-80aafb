// alu_control: the ALU control unit.
//
// Turns the control unit's ALUop, the instruction's funct3 and instruction
// bit 30 into one ALU operation. ALUop values follow the document's control
// table: 000 add (loads, stores, jumps, AUIPC), 001 subtract (branch
// compare), 010 R-type (funct3 and bit 30 pick the operation), 111 I-type
// arithmetic (funct3 picks; bit 30 only separates SRAI from SRLI, since ADDI
// has no subtract form), 100 LUI (pass the immediate), 110 SYSTEM (unused,
// add). The mapping of funct3 is the RV32I one. Purely combinational.
module alu_control
  import rv_pkg::*;
(
  input  aluop_e     alu_op,
  input  logic [2:0] funct3,
  input  logic       instr30,
  output alu_sel_e   sel
);
  alu_sel_e by_f3;

  always_comb begin
    unique case (funct3)
      3'b000:  by_f3 = (alu_op == ALUOP_R && instr30) ? ALU_SUB : ALU_ADD;
      3'b001:  by_f3 = ALU_SLL;
      3'b010:  by_f3 = ALU_SLT;
      3'b011:  by_f3 = ALU_SLTU;
      3'b100:  by_f3 = ALU_XOR;
      3'b101:  by_f3 = instr30 ? ALU_SRA : ALU_SRL;
      3'b110:  by_f3 = ALU_OR;
      default: by_f3 = ALU_AND;
    endcase
    unique case (alu_op)
      ALUOP_BRANCH:     sel = ALU_SUB;
      ALUOP_R, ALUOP_I: sel = by_f3;
      ALUOP_LUI:        sel = ALU_PASSB;
      default:          sel = ALU_ADD;
    endcase
  end
endmodule
