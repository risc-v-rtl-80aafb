// tb_control_unit: compares the control word of every opcode with the
// control table (terminate, RegWrite, MemRead, MemToReg, MemWrite, Branch,
// ALUSrc, ALUop, jump); opcodes outside the table must give all zeros.
module tb_control_unit;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] opcode;
  ctrl_t      ctrl;

  control_unit dut (.opcode, .ctrl);

  // {terminate, regWrite, memRead, memToReg, memWrite, branch, aluSrc, aluOp[3], jump[2]}
  function automatic logic [11:0] expected(input logic [4:0] opc);
    case (opc)
      5'b11000: return 12'b0_0_1_0_0_1_0_001_00; // branch
      5'b00000: return 12'b0_1_1_1_0_0_1_000_00; // load
      5'b01000: return 12'b0_0_0_1_1_0_1_000_00; // store
      5'b11001: return 12'b0_1_0_0_0_0_1_000_10; // jalr
      5'b11011: return 12'b0_1_0_0_0_0_1_000_01; // jal
      5'b00100: return 12'b0_1_0_0_0_0_1_111_00; // op-imm
      5'b01100: return 12'b0_1_0_0_0_0_0_010_00; // op
      5'b00101: return 12'b0_1_0_0_0_0_0_000_00; // auipc
      5'b01101: return 12'b0_1_0_0_0_0_1_100_00; // lui
      5'b11100: return 12'b1_0_0_0_0_0_0_110_00; // system
      default:  return 12'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 32; o++) begin
      logic [11:0] got;
      opcode = 5'(o);
      #1;
      got = {ctrl.terminate, ctrl.reg_write, ctrl.mem_read, ctrl.mem_to_reg, ctrl.mem_write,
             ctrl.branch, ctrl.alu_src, ctrl.alu_op, ctrl.jump};
      checks++;
      if (got != expected(opcode)) begin
        failures++; $display("FAIL opcode %b got %b exp %b", opcode, got, expected(opcode));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
