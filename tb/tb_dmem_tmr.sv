// tb_dmem_tmr: checks the triplicated data memory: stores reach all three
// replicas, loads are correct, an upset in one replica is outvoted and
// flagged until the byte is stored again, and two upsets at the same bit in
// two replicas defeat the vote.
module tb_dmem_tmr;
  localparam int AW = 8;
  int checks = 0, failures = 0;
  logic          clk = 0, mem_read, mem_write, seu_en, mm;
  logic [2:0]    funct3, seu_bit;
  logic [1:0]    seu_copy;
  logic [AW-1:0] addr, seu_addr;
  logic [31:0]   wdata, rdata;
  logic [7:0]    model [2**AW];

  dmem_tmr #(.ADDR_W(AW), .TMR(1)) dut (.clk, .mem_read, .mem_write, .funct3,
      .addr, .wdata, .rdata, .seu_en, .seu_copy, .seu_addr, .seu_bit, .mismatch(mm));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h got=%h", what, addr, rdata); end
  endtask

  function automatic logic [31:0] word_at(input logic [AW-1:0] a);
    return {model[AW'(a+3)], model[AW'(a+2)], model[AW'(a+1)], model[a]};
  endfunction

  task automatic store_word(input logic [AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    mem_write = 1; funct3 = 3'b010; addr = a; wdata = d;
    for (int k = 0; k < 4; k++) model[AW'(a+k)] = d[8*k +: 8];
    @(posedge clk); #1;
    mem_write = 0;
  endtask

  task automatic upset(input logic [1:0] copy, input logic [AW-1:0] a, input logic [2:0] b);
    @(negedge clk);
    seu_en = 1; seu_copy = copy; seu_addr = a; seu_bit = b;
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
    mem_read = 0; mem_write = 0; seu_en = 0; seu_copy = 0; funct3 = 0; seu_bit = 0;
    addr = 0; seu_addr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i += 4) store_word(AW'(i), $urandom);
    mem_read = 1;
    for (int i = 0; i < 2**AW; i += 4) begin
      funct3 = 3'b010; addr = AW'(i); #1;
      check(rdata == word_at(addr) && !mm, "clean word");
    end
    // byte and halfword stores
    @(negedge clk);
    mem_read = 0; mem_write = 1; funct3 = 3'b000; addr = 8'h11; wdata = 32'h0000_00a5;
    model[8'h11] = 8'ha5;
    @(posedge clk); #1;
    funct3 = 3'b001; addr = 8'h22; wdata = 32'h0000_8001;
    model[8'h22] = 8'h01; model[8'h23] = 8'h80;
    @(posedge clk); #1;
    mem_write = 0; mem_read = 1;
    funct3 = 3'b000; addr = 8'h11; #1; check(rdata == 32'hffff_ffa5, "lb");
    funct3 = 3'b100; #1; check(rdata == 32'h0000_00a5, "lbu");
    funct3 = 3'b001; addr = 8'h22; #1; check(rdata == 32'hffff_8001, "lh");
    funct3 = 3'b101; #1; check(rdata == 32'h0000_8001, "lhu");
    for (int n = 0; n < 40; n++) begin
      logic [AW-1:0] a;
      logic [2:0] b;
      a = AW'($urandom) & ~AW'(3); b = 3'($urandom);
      upset(2'(n % 3), AW'(a + (n % 4)), b);
      funct3 = 3'b010; addr = a; #1;
      check(rdata == word_at(a), "single upset masked");
      check(mm, "single upset flagged");
      store_word(a, word_at(a));
      funct3 = 3'b010; addr = a; #1;
      check(rdata == word_at(a) && !mm, "store repairs");
    end
    upset(2'd1, 8'h40, 3'd2);
    upset(2'd2, 8'h40, 3'd2);
    funct3 = 3'b100; addr = 8'h40; #1;
    check(rdata == {24'd0, model[8'h40] ^ 8'h04}, "double upset wins vote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
