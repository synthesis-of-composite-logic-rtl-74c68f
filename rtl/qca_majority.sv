// qca_majority: three-input majority voter, the basic QCA logic gate.
//
// The output is 1 when at least two of the three inputs are 1:
// M(P,Q,R) = PQ + QR + RP. Tying one input to a fixed 0 (a -1 polarized cell)
// makes it a 2-input AND; tying it to 1 (a +1 cell) makes it a 2-input OR.
// Purely combinational. The function is the document's.
module qca_majority (
  input  logic p,
  input  logic q,
  input  logic r,
  output logic m
);

  always_comb m = (p & q) | (q & r) | (r & p);

endmodule
