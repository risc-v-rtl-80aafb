// reg_file: the 32 x 32-bit RV32I integer register file.
//
// Two asynchronous read ports (rs1, rs2) and one write port written on the
// rising clock edge when `reg_write` is high, as the document describes.
// Writes to x0 are dropped and x0 always reads 0. A synchronous active-high
// reset clears every register, as the document's per-register cells have a
// reset. `seu_en` flips bit `seu_bit` of register `seu_addr` on the clock
// edge (ignored for x0) to model an upset; a write to the same register in the same cycle takes
// precedence.
module reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic [4:0]  rd,
  input  logic        reg_write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata1,
  output logic [31:0] rdata2,
  input  logic        seu_en,
  input  logic [4:0]  seu_addr,
  input  logic [4:0]  seu_bit
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      if (seu_en && seu_addr != 5'd0)
        regs[seu_addr] <= regs[seu_addr] ^ (32'd1 << seu_bit);
      if (reg_write && rd != 5'd0)
        regs[rd] <= wdata;
    end
  end

  always_comb begin
    rdata1 = (rs1 == 5'd0) ? '0 : regs[rs1];
    rdata2 = (rs2 == 5'd0) ? '0 : regs[rs2];
  end
endmodule
