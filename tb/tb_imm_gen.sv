// tb_imm_gen: encodes random immediates into I, S, B, U and J instructions
// (with random other fields) and checks that the generator recovers them.
module tb_imm_gen;
  int checks = 0, failures = 0;
  logic [31:0] instr, imm, exp;

  imm_gen dut (.instr, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] r, v;
      logic [6:0] opc;
      r = $urandom; v = $urandom;
      case (n % 6)
        0: begin // I-type (load / op-imm / jalr)
          opc = (n % 12 == 0) ? 7'b0000011 : 7'b0010011;
          exp = 32'($signed(v[11:0]));
          instr = {v[11:0], r[19:7], opc};
        end
        1: begin // S
          exp = 32'($signed(v[11:0]));
          instr = {v[11:5], r[24:15], r[14:12], v[4:0], 7'b0100011};
        end
        2: begin // B
          exp = 32'($signed({v[12:1], 1'b0}));
          instr = {v[12], v[10:5], r[24:12], v[4:1], v[11], 7'b1100011};
        end
        3: begin // U (lui / auipc)
          exp = {v[31:12], 12'd0};
          instr = {v[31:12], r[11:7], (n % 12 == 3) ? 7'b0110111 : 7'b0010111};
        end
        4: begin // J
          exp = 32'($signed({v[20:1], 1'b0}));
          instr = {v[20], v[10:1], v[11], v[19:12], r[11:7], 7'b1101111};
        end
        default: begin // R: no immediate
          exp = 0;
          instr = {r[31:7], 7'b0110011};
        end
      endcase
      #1;
      checks++;
      if (imm != exp) begin failures++; $display("FAIL instr=%h imm=%h exp=%h", instr, imm, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
