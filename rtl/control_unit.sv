// control_unit: main decoder of the single-cycle core.
//
// Maps the major opcode (instruction bits [6:2]) to the control word. The
// settings follow the document's control table, opcode by opcode:
//   branch  : Branch, ALUop 001 (compare by subtraction), memRead as listed
//   load    : RegWrite, MemRead, MemToReg, ALUSrc, ALUop 000
//   store   : MemWrite, ALUSrc, ALUop 000
//   JALR    : RegWrite, ALUSrc, jump 10 (target = rs1 + imm)
//   JAL     : RegWrite, ALUSrc, jump 01 (target = PC + imm)
//   OP-IMM  : RegWrite, ALUSrc, ALUop 111
//   OP      : RegWrite, ALUop 010
//   AUIPC   : RegWrite, ALUop 000
//   LUI     : RegWrite, ALUSrc, ALUop 100
//   SYSTEM  : terminate (the PC holds, which halts the core), ALUop 110
// Any other opcode (FENCE included) is a no-op: all signals low; the
// document's table gives no default, so this is this design's choice.
// Purely combinational.
module control_unit
  import rv_pkg::*;
(
  input  logic [4:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{terminate: 1'b0, reg_write: 1'b0, mem_read: 1'b0,
             mem_to_reg: 1'b0, mem_write: 1'b0, branch: 1'b0,
             alu_src: 1'b0, alu_op: ALUOP_ADD, jump: JUMP_NONE};
    unique case (opcode)
      OPC_BRANCH: begin
        ctrl.branch   = 1'b1;
        ctrl.mem_read = 1'b1;
        ctrl.alu_op   = ALUOP_BRANCH;
      end
      OPC_LOAD: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.alu_src    = 1'b1;
      end
      OPC_STORE: begin
        ctrl.mem_to_reg = 1'b1;
        ctrl.mem_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
      end
      OPC_JALR: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.jump      = JUMP_JALR;
      end
      OPC_JAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.jump      = JUMP_JAL;
      end
      OPC_ARITH_I: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALUOP_I;
      end
      OPC_ARITH_R: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_R;
      end
      OPC_AUIPC: begin
        ctrl.reg_write = 1'b1;
      end
      OPC_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALUOP_LUI;
      end
      OPC_SYSTEM: begin
        ctrl.terminate = 1'b1;
        ctrl.alu_op    = ALUOP_SYSTEM;
      end
      default: ;
    endcase
  end
endmodule
