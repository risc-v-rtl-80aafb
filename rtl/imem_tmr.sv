// imem_tmr: triplicated instruction memory with a majority voter on the
// fetched word.
//
// The three replicas see the same fetch address and the same load-port
// writes; the fetched instruction is the bitwise majority of their outputs,
// so an upset in one replica's copy of a word never reaches the decoder.
// The replicas are not scrubbed: a corrupted word stays corrupted in its
// replica and is outvoted on every fetch. With TMR = 0 a single memory is
// built. `seu_copy` selects the replica an injected upset hits.
module imem_tmr #(
  parameter int unsigned ADDR_W = 16,
  parameter bit          TMR    = 1'b1
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [31:0]       rdata,
  input  logic              wr_en,
  input  logic [ADDR_W-3:0] wr_addr,
  input  logic [31:0]       wr_data,
  input  logic              seu_en,
  input  logic [1:0]        seu_copy,
  input  logic [ADDR_W-3:0] seu_addr,
  input  logic [4:0]        seu_bit,
  output logic              mismatch
);
  if (TMR) begin : g_tmr
    logic [31:0] rd [3];
    for (genvar i = 0; i < 3; i++) begin : g_rep
      instr_mem #(.ADDR_W(ADDR_W)) u_mem (
        .clk, .addr, .rdata(rd[i]), .wr_en, .wr_addr, .wr_data,
        .seu_en(seu_en && seu_copy == 2'(i)), .seu_addr, .seu_bit
      );
    end
    tmr_voter #(.WIDTH(32)) u_vote (
      .a(rd[0]), .b(rd[1]), .c(rd[2]), .y(rdata), .mismatch
    );
  end else begin : g_single
    instr_mem #(.ADDR_W(ADDR_W)) u_mem (
      .clk, .addr, .rdata, .wr_en, .wr_addr, .wr_data,
      .seu_en, .seu_addr, .seu_bit
    );
    assign mismatch = 1'b0;
  end
endmodule
