// tb_branch_control: drives the flags of a - b (computed in the testbench)
// for random and equal operands and checks the six branch conditions against
// direct comparisons of a and b; no branch is taken when `branch` is low.
module tb_branch_control;
  int checks = 0, failures = 0;
  logic [2:0] funct3;
  logic       branch, zf, cf, nf, vf, taken;

  branch_control dut (.funct3, .branch, .zero_f(zf), .carry_f(cf), .neg_f(nf), .ovf_f(vf), .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] a, b;
      logic [32:0] d;
      bit exp;
      a = $urandom; b = (n % 5 == 0) ? a : $urandom;
      if (n % 7 == 0) b = a ^ 32'h8000_0000;
      d = {1'b0, a} + {1'b0, ~b} + 33'd1;
      zf = (d[31:0] == 0); cf = d[32]; nf = d[31];
      vf = (a[31] != b[31]) && (d[31] != a[31]);
      funct3 = 3'(n % 8); branch = (n % 10 != 0);
      #1;
      case (funct3)
        3'b000: exp = (a == b);
        3'b001: exp = (a != b);
        3'b100: exp = ($signed(a) < $signed(b));
        3'b101: exp = ($signed(a) >= $signed(b));
        3'b110: exp = (a < b);
        3'b111: exp = (a >= b);
        default: exp = 0;
      endcase
      exp = exp && branch;
      checks++;
      if (taken != exp) begin failures++; $display("FAIL f3=%b a=%h b=%h taken=%b", funct3, a, b, taken); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
