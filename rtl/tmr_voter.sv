// tmr_voter: bitwise two-out-of-three majority voter.
//
// Each output bit is a&b | a&c | b&c of the matching bits of the three
// replica outputs, the sum-of-products form and truth table given for the
// voter; a single wrong replica is outvoted. The voter is purely
// combinational and adds no latency. WIDTH replicates the one-bit voter
// across a word. The `mismatch` flag (any bit on which the replicas do not
// all agree) is an addition of this design, used to observe that a fault
// was masked.
module tmr_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic             mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = |((a ^ b) | (a ^ c));
  end
endmodule
