// tmr_voter: bitwise two-out-of-three majority voter.
//
// y takes, bit by bit, the value held by at least two of a, b and c, so one
// faulty copy is masked. disagree is high while any bit of the three copies
// differs, which a system can log or feed to a watchdog. Combinational, no
// clock. Width W is a parameter.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         disagree
);

  assign y        = (a & b) | (a & c) | (b & c);
  assign disagree = |((a ^ b) | (a ^ c));

endmodule
