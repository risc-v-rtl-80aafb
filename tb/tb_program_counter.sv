// tb_program_counter: checks that the PC register clears on reset, loads its
// next value on each rising edge, and flips exactly the addressed bit on an
// injected upset.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, seu_en;
  logic [31:0] pc_next, pc, exp;
  logic [4:0]  seu_bit;

  program_counter #(.WIDTH(32)) dut (.clk, .rst, .pc_next, .seu_en, .seu_bit, .pc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h exp=%h", what, pc, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; seu_en = 0; pc_next = 32'hdead_beef; seu_bit = 0;
    @(posedge clk); #1;
    exp = 0; check(pc == 0, "reset");
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      if (n % 4 == 3) begin
        seu_en = 1; seu_bit = 5'($urandom); pc_next = $urandom;
        exp = pc ^ (32'd1 << seu_bit);
      end else begin
        seu_en = 0; pc_next = $urandom; exp = pc_next;
      end
      @(posedge clk); #1;
      check(pc == exp, seu_en ? "upset" : "load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
