// rv32i_test_pkg: testbench helpers for the RV32I core: instruction
// encoders, a small test program, and an instruction-set reference model
// (one instruction per call) that the core's retirement trace is compared
// against. The reference model is written from the RV32I semantics and
// shares no code with the design.
package rv32i_test_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_i(input logic [6:0] opc, input int imm, input int rs1,
                                        input logic [2:0] f3, input int rd);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input int imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    logic [12:0] i;
    i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [6:0] opc, input logic [19:0] imm20, input int rd);
    return {imm20, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_j(input int imm, input int rd);
    logic [20:0] i;
    i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  localparam logic [6:0] OP_IMM = 7'b0010011, LOAD = 7'b0000011, JALR = 7'b1100111;
  localparam logic [6:0] LUI = 7'b0110111, AUIPC = 7'b0010111;
  localparam logic [31:0] ECALL = 32'h0000_0073;

  localparam int PROG_LEN = 53;

  // Test program. Exercises every RV32I instruction class: arithmetic and
  // logic (register and immediate forms, all shifts, set-less-than), LUI,
  // AUIPC, every load and store size, all six branch conditions both taken
  // and not taken, a counted loop, JAL to a subroutine and JALR back, and
  // ECALL, which halts the core. Word index in comments.
  function automatic void build_program(output logic [31:0] p [PROG_LEN]);
    p[0]  = enc_i(OP_IMM, 5, 0, 3'b000, 1);           // addi x1, x0, 5
    p[1]  = enc_i(OP_IMM, -3, 0, 3'b000, 2);          // addi x2, x0, -3
    p[2]  = enc_r(7'h00, 2, 1, 3'b000, 3);            // add  x3, x1, x2
    p[3]  = enc_r(7'h20, 2, 1, 3'b000, 4);            // sub  x4, x1, x2
    p[4]  = enc_u(LUI, 20'h12345, 5);                 // lui  x5, 0x12345
    p[5]  = enc_i(OP_IMM, 'h678, 5, 3'b000, 5);       // addi x5, x5, 0x678
    p[6]  = enc_s(0, 5, 0, 3'b010);                   // sw   x5, 0(x0)
    p[7]  = enc_s(4, 5, 0, 3'b010);                   // sw   x5, 4(x0)
    p[8]  = enc_s(4, 2, 0, 3'b001);                   // sh   x2, 4(x0)
    p[9]  = enc_s(6, 1, 0, 3'b000);                   // sb   x1, 6(x0)
    p[10] = enc_i(LOAD, 4, 0, 3'b010, 6);             // lw   x6, 4(x0)
    p[11] = enc_i(LOAD, 4, 0, 3'b001, 7);             // lh   x7, 4(x0)
    p[12] = enc_i(LOAD, 4, 0, 3'b101, 8);             // lhu  x8, 4(x0)
    p[13] = enc_i(LOAD, 3, 0, 3'b000, 9);             // lb   x9, 3(x0)
    p[14] = enc_i(LOAD, 2, 0, 3'b100, 10);            // lbu  x10, 2(x0)
    p[15] = enc_i(OP_IMM, 10, 0, 3'b000, 11);         // addi x11, x0, 10
    p[16] = enc_i(OP_IMM, 0, 0, 3'b000, 12);          // addi x12, x0, 0
    p[17] = enc_r(7'h00, 11, 12, 3'b000, 12);         // loop: add x12, x12, x11
    p[18] = enc_i(OP_IMM, -1, 11, 3'b000, 11);        // addi x11, x11, -1
    p[19] = enc_b(-8, 0, 11, 3'b001);                 // bne  x11, x0, loop
    p[20] = enc_b(8, 1, 2, 3'b100);                   // blt  x2, x1, +8 (taken)
    p[21] = enc_i(OP_IMM, 1, 0, 3'b000, 13);          // addi x13, x0, 1 (skipped)
    p[22] = enc_b(8, 1, 2, 3'b110);                   // bltu x2, x1, +8 (not taken)
    p[23] = enc_i(OP_IMM, 2, 0, 3'b000, 14);          // addi x14, x0, 2
    p[24] = enc_b(8, 2, 1, 3'b101);                   // bge  x1, x2, +8 (taken)
    p[25] = enc_i(OP_IMM, 3, 0, 3'b000, 14);          // addi x14, x0, 3 (skipped)
    p[26] = enc_b(8, 2, 1, 3'b111);                   // bgeu x1, x2, +8 (not taken)
    p[27] = enc_b(8, 1, 1, 3'b000);                   // beq  x1, x1, +8 (taken)
    p[28] = enc_i(OP_IMM, 7, 0, 3'b000, 15);          // addi x15, x0, 7 (skipped)
    p[29] = enc_r(7'h00, 1, 2, 3'b010, 16);           // slt  x16, x2, x1
    p[30] = enc_r(7'h00, 1, 2, 3'b011, 17);           // sltu x17, x2, x1
    p[31] = enc_r(7'h00, 4, 5, 3'b100, 18);           // xor  x18, x5, x4
    p[32] = enc_r(7'h00, 2, 5, 3'b110, 19);           // or   x19, x5, x2
    p[33] = enc_r(7'h00, 2, 5, 3'b111, 20);           // and  x20, x5, x2
    p[34] = enc_r(7'h00, 1, 5, 3'b001, 21);           // sll  x21, x5, x1
    p[35] = enc_r(7'h00, 1, 2, 3'b101, 22);           // srl  x22, x2, x1
    p[36] = enc_r(7'h20, 1, 2, 3'b101, 23);           // sra  x23, x2, x1
    p[37] = enc_i(OP_IMM, 4, 5, 3'b001, 24);          // slli x24, x5, 4
    p[38] = enc_i(OP_IMM, 28, 2, 3'b101, 25);         // srli x25, x2, 28
    p[39] = enc_i(OP_IMM, 'h401, 2, 3'b101, 26);      // srai x26, x2, 1
    p[40] = enc_i(OP_IMM, -1, 5, 3'b100, 27);         // xori x27, x5, -1
    p[41] = enc_i(OP_IMM, 'h70, 1, 3'b110, 28);       // ori  x28, x1, 0x70
    p[42] = enc_i(OP_IMM, 'hff, 5, 3'b111, 29);       // andi x29, x5, 0xff
    p[43] = enc_i(OP_IMM, 0, 2, 3'b010, 30);          // slti x30, x2, 0
    p[44] = enc_i(OP_IMM, 6, 1, 3'b011, 31);          // sltiu x31, x1, 6
    p[45] = enc_u(AUIPC, 20'h00001, 6);               // auipc x6, 1
    p[46] = enc_j(12, 1);                             // jal  x1, +12 (to 49)
    p[47] = enc_i(OP_IMM, 99, 0, 3'b000, 7);          // addi x7, x0, 99 (after return)
    p[48] = ECALL;                                    // ecall: halt
    p[49] = enc_i(OP_IMM, 77, 0, 3'b000, 8);          // sub: addi x8, x0, 77
    p[50] = enc_s(8, 12, 0, 3'b010);                  // sw   x12, 8(x0)
    p[51] = enc_i(LOAD, 8, 0, 3'b010, 9);             // lw   x9, 8(x0)
    p[52] = enc_i(JALR, 0, 1, 3'b000, 0);             // jalr x0, 0(x1)
  endfunction

  // ---------------- reference model ----------------
  typedef struct {
    logic [31:0] pc;
    logic [31:0] regs [32];
    logic [7:0]  mem [256];
    bit          halted;
  } iss_state_t;

  typedef struct {
    logic [31:0] instr;
    bit          wb_en;
    logic [4:0]  rd;
    logic [31:0] wb_data;
    bit          st_en;
    logic [7:0]  st_addr;
    logic [31:0] st_data;
    logic [2:0]  st_f3;
    bit          is_branch, taken, is_jal, is_jalr, is_load, is_store, is_halt;
  } iss_effect_t;

  // Executes the instruction at s.pc from program p (words beyond p read as
  // ECALL) and returns what it did. Data addresses wrap at 256 bytes.
  function automatic iss_effect_t iss_step(ref iss_state_t s, input logic [31:0] p [PROG_LEN]);
    iss_effect_t e;
    logic [31:0] in, a, b, ii, is, ib, iu, ij, r, npc;
    logic [4:0]  rd;
    logic [2:0]  f3;
    logic [7:0]  ad;
    int          w;
    e = '{default: '0};
    w = int'(s.pc >> 2);
    in = (w < PROG_LEN) ? p[w] : ECALL;
    e.instr = in;
    rd = in[11:7]; f3 = in[14:12];
    a = s.regs[in[19:15]]; b = s.regs[in[24:20]];
    ii = {{20{in[31]}}, in[31:20]};
    is = {{20{in[31]}}, in[31:25], in[11:7]};
    ib = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
    iu = {in[31:12], 12'd0};
    ij = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
    npc = s.pc + 4;
    r = 0;
    case (in[6:0])
      7'b0110011, 7'b0010011: begin
        logic [31:0] op2;
        logic [4:0] sh;
        op2 = (in[6:0] == 7'b0110011) ? b : ii;
        sh = op2[4:0];
        case (f3)
          3'b000: r = (in[6:0] == 7'b0110011 && in[30]) ? a - op2 : a + op2;
          3'b001: r = a << sh;
          3'b010: r = ($signed(a) < $signed(op2)) ? 1 : 0;
          3'b011: r = (a < op2) ? 1 : 0;
          3'b100: r = a ^ op2;
          3'b101: r = in[30] ? 32'($signed(a) >>> sh) : a >> sh;
          3'b110: r = a | op2;
          default: r = a & op2;
        endcase
        e.wb_en = 1;
      end
      7'b0110111: begin r = iu; e.wb_en = 1; end
      7'b0010111: begin r = s.pc + iu; e.wb_en = 1; end
      7'b1101111: begin r = s.pc + 4; npc = s.pc + ij; e.wb_en = 1; e.is_jal = 1; end
      7'b1100111: begin r = s.pc + 4; npc = (a + ii) & ~32'd1; e.wb_en = 1; e.is_jalr = 1; end
      7'b1100011: begin
        bit t;
        case (f3)
          3'b000: t = (a == b);
          3'b001: t = (a != b);
          3'b100: t = ($signed(a) < $signed(b));
          3'b101: t = ($signed(a) >= $signed(b));
          3'b110: t = (a < b);
          default: t = (a >= b);
        endcase
        e.is_branch = 1; e.taken = t;
        if (t) npc = s.pc + ib;
      end
      7'b0000011: begin
        logic [31:0] wd;
        ad = 8'(a + ii);
        wd = {s.mem[8'(ad + 3)], s.mem[8'(ad + 2)], s.mem[8'(ad + 1)], s.mem[ad]};
        case (f3)
          3'b000: r = {{24{wd[7]}}, wd[7:0]};
          3'b001: r = {{16{wd[15]}}, wd[15:0]};
          3'b100: r = {24'd0, wd[7:0]};
          3'b101: r = {16'd0, wd[15:0]};
          default: r = wd;
        endcase
        e.wb_en = 1; e.is_load = 1;
      end
      7'b0100011: begin
        ad = 8'(a + is);
        e.st_en = 1; e.st_addr = ad; e.st_data = b; e.st_f3 = f3; e.is_store = 1;
        s.mem[ad] = b[7:0];
        if (f3 != 3'b000) s.mem[8'(ad + 1)] = b[15:8];
        if (f3 == 3'b010) begin
          s.mem[8'(ad + 2)] = b[23:16];
          s.mem[8'(ad + 3)] = b[31:24];
        end
      end
      7'b1110011: begin e.is_halt = 1; npc = s.pc; s.halted = 1; end
      default: ;
    endcase
    if (rd == 0) e.wb_en = 0;
    e.rd = rd; e.wb_data = r;
    if (e.wb_en) s.regs[rd] = r;
    s.pc = npc;
    return e;
  endfunction

endpackage
