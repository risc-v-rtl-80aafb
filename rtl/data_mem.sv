// data_mem: byte-addressed data memory with RV32I load and store sizes.
//
// 2**ADDR_W bytes, little-endian. The 8-bit address follows the document's
// processor, which drives the data memory with ALU result bits [7:0]; the
// memory takes funct3 and does the sizing itself, as there. Loads are
// asynchronous (single-cycle core): `rdata` is the byte (LB/LBU), halfword
// (LH/LHU) or word (LW) at `addr`, sign- or zero-extended by funct3, and 0
// when `mem_read` is low. Stores (SB/SH/SW) write on the rising clock edge
// when `mem_write` is high. Addresses wrap around the memory; misaligned
// accesses are allowed and simply use consecutive bytes (the document does
// not discuss alignment). `seu_en` flips bit `seu_bit` of byte `seu_addr` on
// the clock edge to model an upset; a store to the same byte in the same
// cycle takes precedence. Contents are not reset.
module data_mem
  import rv_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              mem_read,
  input  logic              mem_write,
  input  logic [2:0]        funct3,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  input  logic              seu_en,
  input  logic [ADDR_W-1:0] seu_addr,
  input  logic [2:0]        seu_bit
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [7:0] mem [DEPTH];
  logic [ADDR_W-1:0] a1, a2, a3;
  logic [31:0] word;

  always_comb begin
    a1 = addr + ADDR_W'(1);
    a2 = addr + ADDR_W'(2);
    a3 = addr + ADDR_W'(3);
  end

  always_ff @(posedge clk) begin
    if (seu_en)
      mem[seu_addr] <= mem[seu_addr] ^ (8'd1 << seu_bit);
    if (mem_write) begin
      mem[addr] <= wdata[7:0];
      if (funct3[1:0] != 2'b00) mem[a1] <= wdata[15:8];
      if (funct3 == F3_W) begin
        mem[a2] <= wdata[23:16];
        mem[a3] <= wdata[31:24];
      end
    end
  end

  always_comb begin
    word = {mem[a3], mem[a2], mem[a1], mem[addr]};
    unique case (funct3)
      F3_B:    rdata = {{24{word[7]}}, word[7:0]};
      F3_H:    rdata = {{16{word[15]}}, word[15:0]};
      F3_BU:   rdata = {24'd0, word[7:0]};
      F3_HU:   rdata = {16'd0, word[15:0]};
      default: rdata = word;
    endcase
    if (!mem_read) rdata = '0;
  end
endmodule
