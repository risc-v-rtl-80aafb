// tb_alu_control: walks every ALUop, funct3 and bit-30 combination and
// compares with the RV32I operation each stands for.
module tb_alu_control;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  aluop_e     alu_op;
  logic [2:0] funct3;
  logic       instr30;
  alu_sel_e   sel, exp;

  alu_control dut (.alu_op, .funct3, .instr30, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aluop_e ops [6];
    ops = '{ALUOP_ADD, ALUOP_BRANCH, ALUOP_R, ALUOP_LUI, ALUOP_SYSTEM, ALUOP_I};
    foreach (ops[k]) for (int f = 0; f < 8; f++) for (int b30 = 0; b30 < 2; b30++) begin
      alu_op = ops[k]; funct3 = 3'(f); instr30 = 1'(b30);
      #1;
      if (alu_op == ALUOP_R || alu_op == ALUOP_I) begin
        case (f)
          0: exp = (alu_op == ALUOP_R && b30 == 1) ? ALU_SUB : ALU_ADD;
          1: exp = ALU_SLL;
          2: exp = ALU_SLT;
          3: exp = ALU_SLTU;
          4: exp = ALU_XOR;
          5: exp = b30 ? ALU_SRA : ALU_SRL;
          6: exp = ALU_OR;
          default: exp = ALU_AND;
        endcase
      end else if (alu_op == ALUOP_BRANCH) exp = ALU_SUB;
      else if (alu_op == ALUOP_LUI) exp = ALU_PASSB;
      else exp = ALU_ADD;
      checks++;
      if (sel != exp) begin failures++; $display("FAIL op=%b f3=%0d b30=%0d sel=%0d exp=%0d", alu_op, f, b30, sel, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
