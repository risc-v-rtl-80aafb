// tb_regfile_tmr: checks the triplicated register file: writes and reads
// match a reference array; a one-replica upset is outvoted on both read
// ports and flagged until the register is rewritten; a two-replica upset at
// the same bit defeats the vote.
module tb_regfile_tmr;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, reg_write, seu_en, mm;
  logic [1:0]  seu_copy;
  logic [4:0]  rs1, rs2, rd, seu_addr, seu_bit;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] model [32];

  regfile_tmr #(.TMR(1)) dut (.clk, .rst, .rs1, .rs2, .rd, .reg_write, .wdata,
      .rdata1, .rdata2, .seu_en, .seu_copy, .seu_addr, .seu_bit, .mismatch(mm));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rs1=%0d %h rs2=%0d %h", what, rs1, rdata1, rs2, rdata2); end
  endtask

  task automatic write_reg(input logic [4:0] r, input logic [31:0] d);
    @(negedge clk);
    reg_write = 1; rd = r; wdata = d;
    if (r != 0) model[r] = d;
    @(posedge clk); #1;
    reg_write = 0;
  endtask

  task automatic upset(input logic [1:0] copy, input logic [4:0] r, input logic [4:0] b);
    @(negedge clk);
    seu_en = 1; seu_copy = copy; seu_addr = r; seu_bit = b;
    @(posedge clk); #1;
    seu_en = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_write = 0; seu_en = 0; seu_copy = 0; rs1 = 0; rs2 = 0; rd = 0;
    seu_addr = 0; seu_bit = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) write_reg(5'(i), $urandom);
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); rs2 = 5'(i ^ 5); #1;
      check(rdata1 == model[rs1] && rdata2 == model[rs2] && !mm, "clean read");
    end
    for (int n = 0; n < 60; n++) begin
      logic [4:0] r;
      r = 5'($urandom_range(1, 31));
      upset(2'(n % 3), r, 5'($urandom));
      rs1 = r; rs2 = r; #1;
      check(rdata1 == model[r] && rdata2 == model[r], "single upset masked");
      check(mm, "single upset flagged");
      write_reg(r, $urandom);
      #1;
      check(rdata1 == model[r] && !mm, "rewrite repairs");
    end
    upset(2'd0, 5'd9, 5'd31);
    upset(2'd1, 5'd9, 5'd31);
    rs1 = 5'd9; rs2 = 5'd0; #1;
    check(rdata1 == (model[9] ^ 32'h8000_0000), "double upset wins vote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
