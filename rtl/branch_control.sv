// branch_control: branch-taken decision.
//
// When `branch` is high, uses funct3 and the ALU flags of rs1 - rs2 to
// decide the six RV32I branch conditions: BEQ (Z), BNE (!Z), BLT (N != V),
// BGE (N == V), BLTU (!C, a borrow) and BGEU (C). Otherwise not taken.
// Purely combinational.
module branch_control (
  input  logic [2:0] funct3,
  input  logic       branch,
  input  logic       zero_f,
  input  logic       carry_f,
  input  logic       neg_f,
  input  logic       ovf_f,
  output logic       taken
);
  logic cond;
  always_comb begin
    unique case (funct3)
      3'b000:  cond = zero_f;
      3'b001:  cond = !zero_f;
      3'b100:  cond = neg_f != ovf_f;
      3'b101:  cond = neg_f == ovf_f;
      3'b110:  cond = !carry_f;
      3'b111:  cond = carry_f;
      default: cond = 1'b0;
    endcase
    taken = branch && cond;
  end
endmodule
