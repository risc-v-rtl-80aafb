// rd_select: register write-back selector.
//
// Chooses the value written to rd by opcode: LUI writes the U immediate,
// JAL and JALR write the return address PC + 4, AUIPC writes PC + immediate
// (the branch-target adder's sum), and every other instruction writes the
// ALU-or-memory value. Purely combinational.
module rd_select
  import rv_pkg::*;
(
  input  logic [4:0]  opcode,
  input  logic [31:0] imm,
  input  logic [31:0] pc_plus4,
  input  logic [31:0] pc_plus_imm,
  input  logic [31:0] alu_or_mem,
  output logic [31:0] wdata
);
  always_comb begin
    unique case (opcode)
      OPC_LUI:           wdata = imm;
      OPC_JAL, OPC_JALR: wdata = pc_plus4;
      OPC_AUIPC:         wdata = pc_plus_imm;
      default:           wdata = alu_or_mem;
    endcase
  end
endmodule
