// pc_tmr: triplicated program counter with a majority voter on its output.
//
// All three PC replicas receive the same next-PC value; the voted value is
// the processor's PC. Because the next PC is computed from the voted PC, a
// replica hit by an upset is rewritten with the correct value on the next
// clock edge, so a PC upset is both masked and repaired within one cycle.
// With TMR = 0 a single unvoted PC is built (the non-redundant baseline).
// `seu_copy` selects which replica an injected upset hits.
module pc_tmr #(
  parameter int unsigned WIDTH = 32,
  parameter bit          TMR   = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WIDTH-1:0]         pc_next,
  input  logic                     seu_en,
  input  logic [1:0]               seu_copy,
  input  logic [$clog2(WIDTH)-1:0] seu_bit,
  output logic [WIDTH-1:0]         pc,
  output logic                     mismatch
);
  if (TMR) begin : g_tmr
    logic [WIDTH-1:0] pc_r [3];
    for (genvar i = 0; i < 3; i++) begin : g_rep
      program_counter #(.WIDTH(WIDTH)) u_pc (
        .clk, .rst, .pc_next,
        .seu_en (seu_en && seu_copy == 2'(i)),
        .seu_bit,
        .pc     (pc_r[i])
      );
    end
    tmr_voter #(.WIDTH(WIDTH)) u_vote (
      .a(pc_r[0]), .b(pc_r[1]), .c(pc_r[2]), .y(pc), .mismatch
    );
  end else begin : g_single
    program_counter #(.WIDTH(WIDTH)) u_pc (
      .clk, .rst, .pc_next, .seu_en, .seu_bit, .pc
    );
    assign mismatch = 1'b0;
  end
endmodule
