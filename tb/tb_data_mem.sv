// tb_data_mem: random byte, halfword and word stores and loads against a
// byte-array reference model (little-endian, address wrap, sign and zero
// extension), the mem_read gate, and injected bit flips.
module tb_data_mem;
  localparam int AW = 8;
  int checks = 0, failures = 0;
  logic          clk = 0, mem_read, mem_write, seu_en;
  logic [2:0]    funct3, seu_bit;
  logic [AW-1:0] addr, seu_addr;
  logic [31:0]   wdata, rdata;
  logic [7:0]    model [2**AW];

  data_mem #(.ADDR_W(AW)) dut (.clk, .mem_read, .mem_write, .funct3, .addr,
                               .wdata, .rdata, .seu_en, .seu_addr, .seu_bit);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_load(input logic [2:0] f3, input logic [AW-1:0] a);
    logic [31:0] w;
    w = {model[AW'(a+3)], model[AW'(a+2)], model[AW'(a+1)], model[a]};
    case (f3)
      3'b000: return 32'($signed(w[7:0]));
      3'b001: return 32'($signed(w[15:0]));
      3'b100: return {24'd0, w[7:0]};
      3'b101: return {16'd0, w[15:0]};
      default: return w;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] st_f3 [3];
    logic [2:0] ld_f3 [5];
    st_f3 = '{3'b000, 3'b001, 3'b010};
    ld_f3 = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    mem_read = 0; mem_write = 0; seu_en = 0; funct3 = 0; seu_bit = 0; addr = 0; seu_addr = 0; wdata = 0;
    // fill with words
    for (int i = 0; i < 2**AW; i += 4) begin
      mem_write = 1; funct3 = 3'b010; addr = AW'(i); wdata = $urandom;
      for (int k = 0; k < 4; k++) model[AW'(i+k)] = wdata[8*k +: 8];
      @(posedge clk); #1;
    end
    mem_write = 0;
    for (int n = 0; n < 1500; n++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 4) begin
        @(negedge clk);
        mem_write = 1; mem_read = 0; funct3 = st_f3[$urandom_range(0, 2)];
        addr = AW'($urandom); wdata = $urandom;
        model[addr] = wdata[7:0];
        if (funct3 != 3'b000) model[AW'(addr+1)] = wdata[15:8];
        if (funct3 == 3'b010) begin
          model[AW'(addr+2)] = wdata[23:16];
          model[AW'(addr+3)] = wdata[31:24];
        end
        @(posedge clk); #1;
        mem_write = 0;
      end else if (kind == 4) begin
        @(negedge clk);
        seu_en = 1; seu_addr = AW'($urandom); seu_bit = 3'($urandom);
        model[seu_addr] ^= 8'd1 << seu_bit;
        @(posedge clk); #1;
        seu_en = 0;
      end else begin
        mem_read = (kind != 9); funct3 = ld_f3[$urandom_range(0, 4)]; addr = AW'($urandom);
        #1;
        checks++;
        if (rdata != (mem_read ? ref_load(funct3, addr) : 32'd0)) begin
          failures++;
          $display("FAIL load f3=%b addr=%h got=%h exp=%h", funct3, addr, rdata, ref_load(funct3, addr));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
