// tb_shifter: random operands and amounts for SLL, SRL and SRA, checked
// against a bit-by-bit reference.
module tb_shifter;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, y, exp;
  logic [4:0]  shamt;
  shift_op_e   op;

  shifter dut (.a, .shamt, .op, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      a = $urandom; shamt = 5'($urandom);
      op = shift_op_e'(n % 3);
      #1;
      for (int i = 0; i < 32; i++) begin
        int s;
        s = int'(shamt);
        case (op)
          SH_SLL:  exp[i] = (i - s >= 0) ? a[i - s] : 1'b0;
          SH_SRL:  exp[i] = (i + s <= 31) ? a[i + s] : 1'b0;
          default: exp[i] = (i + s <= 31) ? a[i + s] : a[31];
        endcase
      end
      checks++;
      if (y != exp) begin failures++; $display("FAIL op=%0d a=%h s=%0d y=%h exp=%h", op, a, shamt, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
