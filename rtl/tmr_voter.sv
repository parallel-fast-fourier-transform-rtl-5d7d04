// tmr_voter: bitwise two-out-of-three majority vote.
//
// Three copies of a block drive a, b and c; y takes, bit by bit, the value
// at least two of them agree on, so an upset in any one copy never reaches
// y. mismatch is set when the copies disagree anywhere, for monitoring.
// Combinational. The document protects the fault detection and correction
// logic, and the adders feeding the checks, with triple modular redundancy;
// the voter and its mismatch flag are this design's rendering of that.
module tmr_voter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
