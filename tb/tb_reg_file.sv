// tb_reg_file: random writes and dual reads against a reference array;
// x0 stays zero; reset clears every register; upsets flip one bit.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, reg_write, seu_en;
  logic [4:0]  rs1, rs2, rd, seu_addr, seu_bit;
  logic [31:0] wdata, rdata1, rdata2;
  logic [31:0] model [32];

  reg_file dut (.clk, .rst, .rs1, .rs2, .rd, .reg_write, .wdata, .rdata1, .rdata2,
                .seu_en, .seu_addr, .seu_bit);

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int i = 0; i < 32; i++) begin
      rs1 = 5'(i); rs2 = 5'(31 - i); #1;
      checks++;
      if (rdata1 != model[i] || rdata2 != model[31 - i]) begin
        failures++;
        $display("FAIL x%0d=%h exp %h / x%0d=%h exp %h", i, rdata1, model[i], 31-i, rdata2, model[31-i]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_write = 0; seu_en = 0; rs1 = 0; rs2 = 0; rd = 0; seu_addr = 0; seu_bit = 0; wdata = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    check_reads();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      reg_write = 1'($urandom); rd = 5'($urandom); wdata = $urandom;
      seu_en = (n % 5 == 0); seu_addr = 5'($urandom); seu_bit = 5'($urandom);
      if (seu_en && seu_addr != 0) model[seu_addr] ^= 32'd1 << seu_bit;
      if (reg_write && rd != 0) model[rd] = wdata;
      @(posedge clk); #1;
      seu_en = 0;
      rs1 = 5'($urandom); rs2 = 5'($urandom); #1;
      checks++;
      if (rdata1 != model[rs1] || rdata2 != model[rs2]) begin
        failures++; $display("FAIL read x%0d x%0d", rs1, rs2);
      end
    end
    reg_write = 0;
    check_reads();
    @(negedge clk);
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
