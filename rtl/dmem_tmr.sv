// dmem_tmr: triplicated data memory with a majority voter on the load data.
//
// Stores go to all three replicas; the loaded value is the bitwise majority
// of the three replicas' (already sized and extended) load results, so an
// upset in one replica never reaches the register file. Replicas are not
// scrubbed: a wrong byte stays wrong in its replica until that byte is
// stored again. With TMR = 0 a single memory is built. `seu_copy` selects
// the replica an injected upset hits.
module dmem_tmr #(
  parameter int unsigned ADDR_W = 8,
  parameter bit          TMR    = 1'b1
) (
  input  logic              clk,
  input  logic              mem_read,
  input  logic              mem_write,
  input  logic [2:0]        funct3,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  input  logic              seu_en,
  input  logic [1:0]        seu_copy,
  input  logic [ADDR_W-1:0] seu_addr,
  input  logic [2:0]        seu_bit,
  output logic              mismatch
);
  if (TMR) begin : g_tmr
    logic [31:0] rd [3];
    for (genvar i = 0; i < 3; i++) begin : g_rep
      data_mem #(.ADDR_W(ADDR_W)) u_mem (
        .clk, .mem_read, .mem_write, .funct3, .addr, .wdata, .rdata(rd[i]),
        .seu_en(seu_en && seu_copy == 2'(i)), .seu_addr, .seu_bit
      );
    end
    tmr_voter #(.WIDTH(32)) u_vote (
      .a(rd[0]), .b(rd[1]), .c(rd[2]), .y(rdata), .mismatch
    );
  end else begin : g_single
    data_mem #(.ADDR_W(ADDR_W)) u_mem (
      .clk, .mem_read, .mem_write, .funct3, .addr, .wdata, .rdata,
      .seu_en, .seu_addr, .seu_bit
    );
    assign mismatch = 1'b0;
  end
endmodule
