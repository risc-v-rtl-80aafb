// tb_tmr_voter: checks the 2-of-3 majority voter against its truth table
// (exhaustively, 1-bit instance) and against a per-bit count of ones on
// random 32-bit words, including the mismatch flag.
module tb_tmr_voter;
  int checks = 0, failures = 0;

  logic       a1, b1, c1, y1, mm1;
  logic [31:0] a, b, c, y;
  logic        mm;

  tmr_voter #(.WIDTH(1))  u1 (.a(a1), .b(b1), .c(c1), .y(y1), .mismatch(mm1));
  tmr_voter #(.WIDTH(32)) u32 (.a, .b, .c, .y, .mismatch(mm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth table: output 1 when at least two inputs are 1
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      check(y1 == (int'(a1) + int'(b1) + int'(c1) >= 2), $sformatf("tt %b", v[2:0]));
      check(mm1 == !(a1 == b1 && b1 == c1), $sformatf("mm %b", v[2:0]));
    end
    for (int n = 0; n < 500; n++) begin
      logic [31:0] exp;
      a = $urandom; b = (n % 3 == 0) ? a : $urandom; c = (n % 5 == 0) ? a : $urandom;
      if (n % 7 == 0) begin b = a; c = a ^ (32'd1 << (n % 32)); end
      #1;
      for (int i = 0; i < 32; i++) exp[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      check(y == exp, "random vote");
      check(mm == (a != b || b != c), "random mismatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
