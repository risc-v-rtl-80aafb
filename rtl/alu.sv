// alu: RV32I arithmetic and logic unit with status flags.
//
// Computes `result` from operands `a` and `b` for the operation `sel`:
// add, subtract, AND, OR, XOR, the three shifts (through the shifter
// sub-block, shift amount b[4:0]), signed and unsigned set-less-than, and
// pass-b (for LUI). It also drives the four flags the document lists:
// zero (Z), carry (C), negative (N) and overflow (V). C, N and V come from
// the adder: for ADD a + b, for every other operation a - b computed as
// a + ~b + 1, so C = 1 means "no borrow" (a >= b unsigned) and N ^ V means
// a < b signed; the branch unit uses them for the branch compares. Z is
// taken from the adder too for ADD/SUB and from the result otherwise.
// Purely combinational.
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    sel,
  output logic [31:0] result,
  output logic        zero_f,
  output logic        carry_f,
  output logic        neg_f,
  output logic        ovf_f
);
  logic [32:0] sum;
  logic [31:0] b_in;
  logic [31:0] sh_y;
  shift_op_e   sh_op;

  always_comb begin
    b_in = (sel == ALU_ADD) ? b : ~b;
    sum  = {1'b0, a} + {1'b0, b_in} + 33'((sel == ALU_ADD) ? 1'b0 : 1'b1);
  end

  always_comb begin
    unique case (sel)
      ALU_SRL: sh_op = SH_SRL;
      ALU_SRA: sh_op = SH_SRA;
      default: sh_op = SH_SLL;
    endcase
  end

  shifter u_shift (.a(a), .shamt(b[4:0]), .op(sh_op), .y(sh_y));

  always_comb begin
    carry_f = sum[32];
    neg_f   = sum[31];
    ovf_f   = (a[31] == b_in[31]) && (sum[31] != a[31]);
    unique case (sel)
      ALU_ADD, ALU_SUB: result = sum[31:0];
      ALU_AND:          result = a & b;
      ALU_OR:           result = a | b;
      ALU_XOR:          result = a ^ b;
      ALU_SLL, ALU_SRL, ALU_SRA: result = sh_y;
      ALU_SLT:          result = {31'd0, neg_f ^ ovf_f};
      ALU_SLTU:         result = {31'd0, ~carry_f};
      ALU_PASSB:        result = b;
      default:          result = sum[31:0];
    endcase
    zero_f = (sel == ALU_ADD || sel == ALU_SUB) ? (sum[31:0] == 32'd0)
                                                : (result == 32'd0);
  end
endmodule
