// tb_word_mux: checks 2- and 3-input multiplexers for every select value on
// random data; the unused select value of the 3-input mux gives input 0.
module tb_word_mux;
  int checks = 0, failures = 0;
  logic [31:0] d2 [2];
  logic [31:0] d3 [3];
  logic        s2;
  logic [1:0]  s3;
  logic [31:0] y2, y3;

  word_mux #(.N(2), .WIDTH(32)) m2 (.d(d2), .sel(s2), .y(y2));
  word_mux #(.N(3), .WIDTH(32)) m3 (.d(d3), .sel(s3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      foreach (d2[i]) d2[i] = $urandom;
      foreach (d3[i]) d3[i] = $urandom;
      s2 = 1'(n); s3 = 2'(n);
      #1;
      checks++;
      if (y2 != d2[s2]) begin failures++; $display("FAIL mux2 sel=%0d", s2); end
      checks++;
      if (y3 != ((s3 == 3) ? d3[0] : d3[s3])) begin failures++; $display("FAIL mux3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
