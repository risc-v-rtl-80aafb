// tb_instr_mem: loads random words through the load port, reads them back
// asynchronously by byte address (low two bits ignored) and checks an
// injected bit flip. Uses a reduced address width to keep the run short.
module tb_instr_mem;
  localparam int AW = 10;
  int checks = 0, failures = 0;
  logic          clk = 0, wr_en, seu_en;
  logic [AW-1:0] addr;
  logic [AW-3:0] wr_addr, seu_addr;
  logic [31:0]   wr_data, rdata;
  logic [4:0]    seu_bit;
  logic [31:0]   model [2**(AW-2)];

  instr_mem #(.ADDR_W(AW)) dut (.clk, .addr, .rdata, .wr_en, .wr_addr, .wr_data,
                                .seu_en, .seu_addr, .seu_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; seu_en = 0; addr = 0; wr_addr = 0; seu_addr = 0; seu_bit = 0; wr_data = 0;
    for (int i = 0; i < 2**(AW-2); i++) begin
      wr_en = 1; wr_addr = (AW-2)'(i); wr_data = $urandom; model[i] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int n = 0; n < 400; n++) begin
      if (n % 10 == 9) begin
        @(negedge clk);
        seu_en = 1; seu_addr = (AW-2)'($urandom); seu_bit = 5'($urandom);
        model[seu_addr] ^= 32'd1 << seu_bit;
        @(posedge clk); #1;
        seu_en = 0;
        addr = {seu_addr, 2'($urandom)};
      end else begin
        addr = AW'($urandom);
      end
      #1;
      checks++;
      if (rdata != model[addr[AW-1:2]]) begin
        failures++; $display("FAIL addr %h got %h exp %h", addr, rdata, model[addr[AW-1:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
