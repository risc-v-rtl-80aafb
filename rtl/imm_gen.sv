// imm_gen: immediate generator.
//
// Reassembles and sign-extends the immediate of the instruction according to
// its format (RV32I bit layout): I (loads, OP-IMM, JALR, SYSTEM),
// S (stores), B (branches, byte offset with bit 0 = 0), U (LUI, AUIPC, value
// already shifted left by 12) and J (JAL, bit 0 = 0). R-type and unknown
// opcodes give 0. Purely combinational. Instruction bits [1:0] (always 11
// in RV32I) carry no immediate bits and are left unused.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  output logic [31:0] imm
);
  always_comb begin
    unique case (instr[6:2])
      OPC_LOAD, OPC_ARITH_I, OPC_JALR, OPC_SYSTEM:
        imm = {{20{instr[31]}}, instr[31:20]};
      OPC_STORE:
        imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      OPC_BRANCH:
        imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25],
               instr[11:8], 1'b0};
      OPC_LUI, OPC_AUIPC:
        imm = {instr[31:12], 12'd0};
      OPC_JAL:
        imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20],
               instr[30:21], 1'b0};
      default:
        imm = '0;
    endcase
  end
endmodule
