// qca_inverter: the QCA inverter, the second logic primitive next to the
// majority voter. Its output is the complement of its input (the signal is
// taken off diagonally so the polarization flips). Purely combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
