// tmr_voter: bitwise two-out-of-three majority voter.
//
// Each output bit takes the value held by at least two of the three replica
// inputs, so a fault confined to one replica is masked. mismatch is high while
// any bit of the three replicas disagrees (one replica has failed); it does not
// affect y. Purely combinational.
//
// Majority voting on replicated logic is the TMR technique of the reference
// design; the mismatch output is an addition of this implementation.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);

  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = |((a ^ b) | (a ^ c));

endmodule
