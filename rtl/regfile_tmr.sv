// regfile_tmr: triplicated register file with majority voters on both read
// ports.
//
// Writes go to all three replicas; each read port returns the bitwise
// majority of the three replicas' values. Voting at the read ports gives the
// same result as voting each register (32 voters) and needs only two 32-bit
// voters. Replicas are not scrubbed: an upset register stays wrong in its
// replica until the register is written again, and is outvoted meanwhile.
// With TMR = 0 a single register file is built. `seu_copy` selects the
// replica an injected upset hits.
module regfile_tmr #(
  parameter bit TMR = 1'b1
) (
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
  input  logic [1:0]  seu_copy,
  input  logic [4:0]  seu_addr,
  input  logic [4:0]  seu_bit,
  output logic        mismatch
);
  if (TMR) begin : g_tmr
    logic [31:0] r1 [3];
    logic [31:0] r2 [3];
    logic        mm1, mm2;
    for (genvar i = 0; i < 3; i++) begin : g_rep
      reg_file u_rf (
        .clk, .rst, .rs1, .rs2, .rd, .reg_write, .wdata,
        .rdata1(r1[i]), .rdata2(r2[i]),
        .seu_en(seu_en && seu_copy == 2'(i)), .seu_addr, .seu_bit
      );
    end
    tmr_voter #(.WIDTH(32)) u_vote1 (
      .a(r1[0]), .b(r1[1]), .c(r1[2]), .y(rdata1), .mismatch(mm1)
    );
    tmr_voter #(.WIDTH(32)) u_vote2 (
      .a(r2[0]), .b(r2[1]), .c(r2[2]), .y(rdata2), .mismatch(mm2)
    );
    assign mismatch = mm1 | mm2;
  end else begin : g_single
    reg_file u_rf (
      .clk, .rst, .rs1, .rs2, .rd, .reg_write, .wdata, .rdata1, .rdata2,
      .seu_en, .seu_addr, .seu_bit
    );
    assign mismatch = 1'b0;
  end
endmodule
