// rv32i_tmr_core: single-cycle RV32I processor whose four storage
// components, the program counter, the register file, the instruction memory
// and the data memory, are each built three times and read through 2-of-3
// majority voters (triple modular redundancy, TMR).
//
// Every instruction completes in one clock cycle: the voted PC addresses the
// voted instruction memory; the control unit, immediate generator and
// register file (voted read ports) feed the ALU; the ALU result addresses the
// voted data memory; the write-back value is chosen among ALU, memory, LUI
// immediate, PC + 4 and PC + immediate; and the next PC (PC + 4, branch
// target, JAL target or JALR target with bit 0 cleared) is written into all
// three PC replicas on the rising edge. A SYSTEM instruction (ECALL/EBREAK)
// holds the PC, which halts the core; `halted` shows it.
//
// The datapath blocks, their control settings and the choice of the four
// TMR-protected components follow the document. This design's own
// additions are: the instruction-memory load port (`prog_*`, used while
// `rst` is high), a single-event-upset injection port (`seu`) that flips one
// bit of one replica of one component, per-component voter mismatch flags,
// the retirement trace outputs (`wb_*`, `st_*`), and the per-component TMR
// parameters that build a single unvoted copy instead (TMR_x = 0), which give
// the non-redundant baseline and the "one voter at a time" variants.
//
// Reset: synchronous, active high; clears the PC replicas and registers.
// Stores are suppressed while `rst` is high.
module rv32i_tmr_core
  import rv_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 16,   // instruction memory byte-address bits (PC[15:0])
  parameter int unsigned DMEM_ADDR_W = 8,    // data memory byte-address bits (ALU result [7:0])
  parameter bit          TMR_PC      = 1'b1,
  parameter bit          TMR_RF      = 1'b1,
  parameter bit          TMR_IMEM    = 1'b1,
  parameter bit          TMR_DMEM    = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  // instruction memory load port (word address)
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-3:0] prog_addr,
  input  logic [31:0]            prog_data,
  // upset injection
  input  seu_req_t               seu,
  // status
  output logic                   halted,
  output logic [31:0]            pc,
  output logic [31:0]            instr,
  output logic [3:0]             mismatch,   // {dmem, imem, rf, pc} voter disagreement
  // retirement trace: register write-back and store of this cycle
  output logic                   wb_en,
  output logic [4:0]             wb_rd,
  output logic [31:0]            wb_data,
  output logic                   st_en,
  output logic [DMEM_ADDR_W-1:0] st_addr,
  output logic [2:0]             st_funct3,
  output logic [31:0]            st_data
);
  ctrl_t       ctrl;
  alu_sel_e    alu_sel;
  logic [31:0] imm, rdata1, rdata2, alu_b, alu_res, dmem_rdata, alu_or_mem;
  logic [31:0] rd_wdata, seq_next, jalr_tgt, jump_next, pc_next;
  logic [32:0] pc_plus4_w, pc_plus_imm_w;
  logic        zf, cf, nf, vf, br_taken;
  logic [2:0]  funct3;
  logic        mm_pc, mm_rf, mm_imem, mm_dmem;

  assign funct3 = instr[14:12];

  // ---------------- fetch ----------------
  pc_tmr #(.WIDTH(32), .TMR(TMR_PC)) u_pc (
    .clk, .rst, .pc_next,
    .seu_en   (seu.en && seu.target == SEU_PC),
    .seu_copy (seu.copy),
    .seu_bit  (seu.bit_idx),
    .pc,
    .mismatch (mm_pc)
  );

  imem_tmr #(.ADDR_W(IMEM_ADDR_W), .TMR(TMR_IMEM)) u_imem (
    .clk,
    .addr     (pc[IMEM_ADDR_W-1:0]),
    .rdata    (instr),
    .wr_en    (prog_we),
    .wr_addr  (prog_addr),
    .wr_data  (prog_data),
    .seu_en   (seu.en && seu.target == SEU_IMEM),
    .seu_copy (seu.copy),
    .seu_addr (seu.addr[IMEM_ADDR_W-3:0]),
    .seu_bit  (seu.bit_idx),
    .mismatch (mm_imem)
  );

  // ---------------- decode ----------------
  control_unit u_ctrl (.opcode(instr[6:2]), .ctrl);
  imm_gen      u_imm  (.instr, .imm);

  regfile_tmr #(.TMR(TMR_RF)) u_rf (
    .clk, .rst,
    .rs1       (instr[19:15]),
    .rs2       (instr[24:20]),
    .rd        (instr[11:7]),
    .reg_write (ctrl.reg_write),
    .wdata     (rd_wdata),
    .rdata1, .rdata2,
    .seu_en    (seu.en && seu.target == SEU_RF),
    .seu_copy  (seu.copy),
    .seu_addr  (seu.addr[4:0]),
    .seu_bit   (seu.bit_idx),
    .mismatch  (mm_rf)
  );

  // ---------------- execute ----------------
  word_mux #(.N(2), .WIDTH(32)) u_alu_src_mux (
    .d('{rdata2, imm}), .sel(ctrl.alu_src), .y(alu_b)
  );
  alu_control u_alu_ctrl (
    .alu_op(ctrl.alu_op), .funct3, .instr30(instr[30]), .sel(alu_sel)
  );
  alu u_alu (
    .a(rdata1), .b(alu_b), .sel(alu_sel), .result(alu_res),
    .zero_f(zf), .carry_f(cf), .neg_f(nf), .ovf_f(vf)
  );
  branch_control u_br (
    .funct3, .branch(ctrl.branch), .zero_f(zf), .carry_f(cf),
    .neg_f(nf), .ovf_f(vf), .taken(br_taken)
  );

  // ---------------- memory ----------------
  dmem_tmr #(.ADDR_W(DMEM_ADDR_W), .TMR(TMR_DMEM)) u_dmem (
    .clk,
    .mem_read  (ctrl.mem_read),
    .mem_write (ctrl.mem_write && !rst),
    .funct3,
    .addr      (alu_res[DMEM_ADDR_W-1:0]),
    .wdata     (rdata2),
    .rdata     (dmem_rdata),
    .seu_en    (seu.en && seu.target == SEU_DMEM),
    .seu_copy  (seu.copy),
    .seu_addr  (seu.addr[DMEM_ADDR_W-1:0]),
    .seu_bit   (seu.bit_idx[2:0]),
    .mismatch  (mm_dmem)
  );

  // ---------------- write-back ----------------
  word_mux #(.N(2), .WIDTH(32)) u_mem_to_reg_mux (
    .d('{alu_res, dmem_rdata}), .sel(ctrl.mem_to_reg), .y(alu_or_mem)
  );
  rd_select u_rd_sel (
    .opcode(instr[6:2]), .imm,
    .pc_plus4(pc_plus4_w[31:0]), .pc_plus_imm(pc_plus_imm_w[31:0]),
    .alu_or_mem, .wdata(rd_wdata)
  );

  // ---------------- next PC ----------------
  adder #(.WIDTH(32)) u_pc_add  (.a(pc), .b(32'd4), .cin(1'b0), .sum(pc_plus4_w));
  adder #(.WIDTH(32)) u_br_add  (.a(pc), .b(imm),   .cin(1'b0), .sum(pc_plus_imm_w));

  assign jalr_tgt = {alu_res[31:1], 1'b0};

  word_mux #(.N(2), .WIDTH(32)) u_branch_mux (
    .d('{pc_plus4_w[31:0], pc_plus_imm_w[31:0]}), .sel(br_taken), .y(seq_next)
  );
  word_mux #(.N(3), .WIDTH(32)) u_jump_mux (
    .d('{seq_next, pc_plus_imm_w[31:0], jalr_tgt}), .sel(ctrl.jump), .y(jump_next)
  );
  word_mux #(.N(2), .WIDTH(32)) u_halt_mux (
    .d('{jump_next, pc}), .sel(ctrl.terminate), .y(pc_next)
  );

  // ---------------- status and trace ----------------
  assign halted    = ctrl.terminate;
  assign mismatch  = {mm_dmem, mm_imem, mm_rf, mm_pc};
  assign wb_en     = ctrl.reg_write && !rst && instr[11:7] != 5'd0;
  assign wb_rd     = instr[11:7];
  assign wb_data   = rd_wdata;
  assign st_en     = ctrl.mem_write && !rst;
  assign st_addr   = alu_res[DMEM_ADDR_W-1:0];
  assign st_funct3 = funct3;
  assign st_data   = rdata2;

  // the ALU's upper result bits beyond the data memory address are used
  // only by JALR and write-back; the adders' carry outs are not used.
  logic unused;
  assign unused = ^{pc_plus4_w[32], pc_plus_imm_w[32], instr[1:0]};
endmodule
