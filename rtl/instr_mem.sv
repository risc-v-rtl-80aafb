// instr_mem: instruction memory, one 32-bit word per aligned byte address.
//
// The PC's low ADDR_W bits form the byte address; bits [1:0] are ignored,
// so the memory holds 2**(ADDR_W-2) words (those two address bits are
// intentionally unused). The 16-bit address follows the
// document's processor, which indexes instruction memory with PC[15:0].
// The read is asynchronous, as a single-cycle core needs the instruction in
// the cycle its PC is presented. The document treats the memory as read-only
// while a program runs; how a program gets into it is not described, so this
// design adds a synchronous load port (`wr_en`, `wr_addr`, `wr_data`, word
// address) that a host uses while the core is held in reset. `seu_en` flips
// bit `seu_bit` of word `seu_addr` on the clock edge to model an upset (a
// load-port write to the same word in the same cycle takes precedence).
// Contents are not reset.
module instr_mem #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [31:0]       rdata,
  input  logic              wr_en,
  input  logic [ADDR_W-3:0] wr_addr,
  input  logic [31:0]       wr_data,
  input  logic              seu_en,
  input  logic [ADDR_W-3:0] seu_addr,
  input  logic [4:0]        seu_bit
);
  localparam int unsigned DEPTH = 2 ** (ADDR_W - 2);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (seu_en) mem[seu_addr] <= mem[seu_addr] ^ (32'd1 << seu_bit);
    if (wr_en)  mem[wr_addr]  <= wr_data;
  end

  assign rdata = mem[addr[ADDR_W-1:2]];
endmodule
