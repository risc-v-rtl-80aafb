// tb_adder: checks the 32-bit adder (sum and carry out) on corner cases and
// random operands against 64-bit arithmetic.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic        cin;
  logic [32:0] sum;

  adder #(.WIDTH(32)) dut (.a, .b, .cin, .sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint unsigned exp;
      case (n)
        0: begin a = '1; b = 32'd1; cin = 0; end
        1: begin a = '1; b = '1; cin = 1; end
        2: begin a = 32'd0; b = 32'd4; cin = 0; end
        default: begin a = $urandom; b = $urandom; cin = 1'($urandom); end
      endcase
      #1;
      exp = longint'(a) + longint'(b) + longint'(cin);
      checks++;
      if (sum != exp[32:0]) begin
        failures++;
        $display("FAIL %h + %h + %b = %h", a, b, cin, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
