// tb_rd_select: for every opcode checks which of the four candidate values
// is chosen for register write-back.
module tb_rd_select;
  int checks = 0, failures = 0;
  logic [4:0]  opcode;
  logic [31:0] imm, pc_plus4, pc_plus_imm, alu_or_mem, wdata, exp;

  rd_select dut (.opcode, .imm, .pc_plus4, .pc_plus_imm, .alu_or_mem, .wdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 320; n++) begin
      opcode = 5'(n); imm = $urandom; pc_plus4 = $urandom; pc_plus_imm = $urandom; alu_or_mem = $urandom;
      #1;
      case (opcode)
        5'b01101: exp = imm;            // LUI
        5'b11011, 5'b11001: exp = pc_plus4; // JAL, JALR
        5'b00101: exp = pc_plus_imm;    // AUIPC
        default:  exp = alu_or_mem;
      endcase
      checks++;
      if (wdata != exp) begin failures++; $display("FAIL opcode %b", opcode); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
