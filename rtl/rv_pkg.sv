// rv_pkg: types and constants shared by the single-cycle RV32I core and its
// triple-modular-redundant (TMR) storage blocks.
//
// The opcode values are those of the RV32I base ISA. The ALUop codes that the
// control unit hands to the ALU control unit follow the document's control
// table (000 add, 001 branch compare, 010 R-type, 111 I-type arithmetic,
// 100 LUI, 110 SYSTEM). The ALU operation encoding, the jump-select encoding
// and the fault-injection bundle are this design's own choices.
package rv_pkg;

  // Major opcodes, instruction bits [6:2] (bits [1:0] are always 2'b11).
  typedef enum logic [4:0] {
    OPC_LOAD    = 5'b00000,
    OPC_MISCMEM = 5'b00011,
    OPC_ARITH_I = 5'b00100,
    OPC_AUIPC   = 5'b00101,
    OPC_STORE   = 5'b01000,
    OPC_ARITH_R = 5'b01100,
    OPC_LUI     = 5'b01101,
    OPC_BRANCH  = 5'b11000,
    OPC_JALR    = 5'b11001,
    OPC_JAL     = 5'b11011,
    OPC_SYSTEM  = 5'b11100
  } opcode_e;

  // ALUop from the control unit to the ALU control unit.
  typedef enum logic [2:0] {
    ALUOP_ADD    = 3'b000,
    ALUOP_BRANCH = 3'b001,
    ALUOP_R      = 3'b010,
    ALUOP_LUI    = 3'b100,
    ALUOP_SYSTEM = 3'b110,
    ALUOP_I      = 3'b111
  } aluop_e;

  // ALU operation selected by the ALU control unit.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLL  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SLTU = 4'd9,
    ALU_PASSB = 4'd10
  } alu_sel_e;

  // Shift operations of the shifter inside the ALU.
  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_SRA = 2'd2
  } shift_op_e;

  // Next-PC source: sequential/branch, JAL target, JALR target.
  typedef enum logic [1:0] {
    JUMP_NONE = 2'b00,
    JUMP_JAL  = 2'b01,
    JUMP_JALR = 2'b10
  } jump_e;

  // Control word produced by the control unit.
  typedef struct packed {
    logic   terminate;  // SYSTEM instruction: hold the PC (halt)
    logic   reg_write;
    logic   mem_read;
    logic   mem_to_reg;
    logic   mem_write;
    logic   branch;
    logic   alu_src;    // 1: second ALU operand is the immediate
    aluop_e alu_op;
    jump_e  jump;
  } ctrl_t;

  // Loads/stores: funct3 gives the access size and the load extension.
  typedef enum logic [2:0] {
    F3_B  = 3'b000,
    F3_H  = 3'b001,
    F3_W  = 3'b010,
    F3_BU = 3'b100,
    F3_HU = 3'b101
  } mem_f3_e;

  // Which triplicated storage component a single-event-upset injection hits.
  typedef enum logic [1:0] {
    SEU_PC   = 2'd0,
    SEU_RF   = 2'd1,
    SEU_IMEM = 2'd2,
    SEU_DMEM = 2'd3
  } seu_target_e;

  // Fault-injection request: flip bit `bit_idx` of word/byte `addr` in
  // replica `copy` of component `target` on the next clock edge.
  typedef struct packed {
    logic        en;
    seu_target_e target;
    logic [1:0]  copy;
    logic [15:0] addr;
    logic [4:0]  bit_idx;
  } seu_req_t;

endpackage
