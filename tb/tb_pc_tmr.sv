// tb_pc_tmr: checks the triplicated PC. An upset in any one replica must not
// change the voted PC, must raise the mismatch flag for exactly one cycle and
// must be repaired by the next load (all replicas load the same next value).
// A single-copy instance (TMR = 0) shows the same upset reaching the output.
module tb_pc_tmr;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, seu_en;
  logic [1:0]  seu_copy;
  logic [4:0]  seu_bit;
  logic [31:0] pc_next, pc, pc0, exp;
  logic        mm, mm0;

  pc_tmr #(.WIDTH(32), .TMR(1)) dut (.clk, .rst, .pc_next, .seu_en, .seu_copy,
                                     .seu_bit, .pc, .mismatch(mm));
  pc_tmr #(.WIDTH(32), .TMR(0)) base (.clk, .rst, .pc_next, .seu_en, .seu_copy,
                                      .seu_bit, .pc(pc0), .mismatch(mm0));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h exp=%h mm=%b", what, pc, exp, mm); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; seu_en = 0; seu_copy = 0; seu_bit = 0; pc_next = 32'h40;
    @(posedge clk); #1;
    exp = 0; check(pc == 0 && !mm, "reset");
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      // normal load
      seu_en = 0; pc_next = $urandom; exp = pc_next;
      @(posedge clk); #1;
      check(pc == exp && !mm, "load");
      check(pc0 == exp && !mm0, "baseline load");
      // upset in one replica: voted PC holds, mismatch visible
      seu_en = 1; seu_copy = 2'(n % 3); seu_bit = 5'($urandom);
      @(posedge clk); #1;
      check(pc == exp, "masked upset");
      check(mm, "mismatch after upset");
      check(pc0 == (exp ^ (32'd1 << seu_bit)), "baseline upset visible");
      // next load repairs the replica
      seu_en = 0; pc_next = $urandom; exp = pc_next;
      @(posedge clk); #1;
      check(pc == exp && !mm, "repaired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
