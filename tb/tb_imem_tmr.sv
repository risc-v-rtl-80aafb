// tb_imem_tmr: checks the triplicated instruction memory. After loading,
// every word reads back; an upset in one replica is outvoted and flagged;
// upsets in two replicas at the same bit defeat the vote (the known limit of
// TMR). Reduced address width.
module tb_imem_tmr;
  localparam int AW = 10;
  int checks = 0, failures = 0;
  logic          clk = 0, wr_en, seu_en, mm;
  logic [AW-1:0] addr;
  logic [AW-3:0] wr_addr, seu_addr;
  logic [31:0]   wr_data, rdata;
  logic [1:0]    seu_copy;
  logic [4:0]    seu_bit;
  logic [31:0]   model [2**(AW-2)];

  imem_tmr #(.ADDR_W(AW), .TMR(1)) dut (.clk, .addr, .rdata, .wr_en, .wr_addr,
      .wr_data, .seu_en, .seu_copy, .seu_addr, .seu_bit, .mismatch(mm));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h got=%h", what, addr, rdata); end
  endtask

  task automatic upset(input logic [1:0] copy, input logic [AW-3:0] a, input logic [4:0] b);
    @(negedge clk);
    seu_en = 1; seu_copy = copy; seu_addr = a; seu_bit = b;
    @(posedge clk); #1;
    seu_en = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; seu_en = 0; seu_copy = 0; addr = 0; wr_addr = 0; seu_addr = 0; seu_bit = 0; wr_data = 0;
    for (int i = 0; i < 2**(AW-2); i++) begin
      wr_en = 1; wr_addr = (AW-2)'(i); wr_data = $urandom; model[i] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < 2**(AW-2); i++) begin
      addr = {(AW-2)'(i), 2'b00}; #1;
      check(rdata == model[i] && !mm, "clean read");
    end
    for (int n = 0; n < 30; n++) begin
      logic [AW-3:0] a;
      logic [4:0] b;
      a = (AW-2)'($urandom); b = 5'($urandom);
      upset(2'(n % 3), a, b);
      addr = {a, 2'b00}; #1;
      check(rdata == model[a], "single upset masked");
      check(mm, "single upset flagged");
      // rewrite the word through the load port: the replica is repaired
      @(negedge clk);
      wr_en = 1; wr_addr = a; wr_data = model[a];
      @(posedge clk); #1;
      wr_en = 0; #1;
      check(rdata == model[a] && !mm, "rewrite repairs");
    end
    // two replicas hit at the same bit: the vote follows the wrong majority
    upset(2'd0, 3, 5'd7);
    upset(2'd2, 3, 5'd7);
    addr = {(AW-2)'(3), 2'b00}; #1;
    check(rdata == (model[3] ^ 32'h80), "double upset wins vote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
