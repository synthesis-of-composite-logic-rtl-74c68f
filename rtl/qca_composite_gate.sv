// qca_composite_gate: the Composite Gate (CG) without regular clocking.
//
// One unit that gives the three basic 2-input functions of A and B at once:
//   AND = M1 = Maj(A, B, 0)
//   OR  = M2 = Maj(A, B, 1)
//   XOR = M5 = Maj(M3, M4, 1), with M3 = Maj(A, B', 0) = A.B'
//                                   M4 = Maj(A', B, 0) = A'.B
// i.e. five majority voters and two inverters. NAND, NOR and XNOR are the
// complements of these outputs, so they need one inverter each (see qca_sym2).
//
// Timing: the gate spans three consecutive clock zones, a latency of three
// quarter periods (0.75 of a QCA clock):
//   zone ZONE_FIRST     captures the inputs A and B,
//   zone ZONE_FIRST+1   holds M1..M4 (with the two input inverters),
//   zone ZONE_FIRST+2   holds AND, OR and M5 = XOR; the outputs are read here.
// An input present on the clk edge at which the first zone switches appears
// at the outputs after the edge two cycles later. A new input can be taken
// every QCA period (four clk cycles).
//
// The gate network (M1..M5 and two
// inverters), the three-zone latency and the output set follow the document.
// Which gate sits in which of the three zones is this model's choice; the
// document gives only the total. Active-low asynchronous reset clears all
// zones.
module qca_composite_gate
  import qca_pkg::*;
#(
  parameter int unsigned ZONE_FIRST = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  phase,
  input  logic    a,
  input  logic    b,
  output cg_out_t y
);

  localparam int unsigned Z1 = ZONE_FIRST;
  localparam int unsigned Z2 = next_zone(Z1);
  localparam int unsigned Z3 = next_zone(Z2);

  // Zone 1: the input cells.
  logic a_z1, b_z1;
  qca_clock_zone #(.WIDTH(2), .ZONE(Z1)) u_z1 (
    .clk, .rst_n, .phase, .d({a, b}), .q({a_z1, b_z1})
  );

  // Zone 2: first level of majority voters.
  logic na, nb, m1, m2, m3, m4;
  qca_inverter u_inv_a (.a(a_z1), .y(na));
  qca_inverter u_inv_b (.a(b_z1), .y(nb));
  qca_majority u_m1 (.p(a_z1), .q(b_z1), .r(1'b0), .m(m1));   // A.B
  qca_majority u_m2 (.p(a_z1), .q(b_z1), .r(1'b1), .m(m2));   // A+B
  qca_majority u_m3 (.p(a_z1), .q(nb),   .r(1'b0), .m(m3));   // A.B'
  qca_majority u_m4 (.p(na),   .q(b_z1), .r(1'b0), .m(m4));   // A'.B

  logic m1_z2, m2_z2, m3_z2, m4_z2;
  qca_clock_zone #(.WIDTH(4), .ZONE(Z2)) u_z2 (
    .clk, .rst_n, .phase, .d({m1, m2, m3, m4}), .q({m1_z2, m2_z2, m3_z2, m4_z2})
  );

  // Zone 3: the output majority voter for XOR; AND and OR are carried along.
  logic m5;
  qca_majority u_m5 (.p(m3_z2), .q(m4_z2), .r(1'b1), .m(m5)); // A.B' + A'.B

  qca_clock_zone #(.WIDTH(3), .ZONE(Z3)) u_z3 (
    .clk, .rst_n, .phase, .d({m1_z2, m2_z2, m5}), .q({y.and_o, y.or_o, y.xor_o})
  );

endmodule
