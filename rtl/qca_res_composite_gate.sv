// qca_res_composite_gate: the Composite Gate laid out on the RES regular
// clocking grid.
//
// Same logic as qca_composite_gate (five majority voters, two inverters), but
// placed on tiles of the RES clocking scheme so that every cell belongs to a
// tile of a fixed, repeating clock-zone pattern. The longer routing the grid
// forces costs zones: the gate spans nine consecutive clock zones, a latency
// of 2.25 QCA clock periods. In exchange it brings out eight signals: AND, OR,
// XOR, their complements NAND, NOR, XNOR, and the complemented inputs A', B'.
//
// Zone plan (NUM_ZONES = 9 zones, numbered on from ZONE_FIRST):
//   zone 1 of 9   captures A and B,
//   zone 2 of 9   inverters A', B' and the voters M1..M4,
//   zone 3 of 9   M5 = XOR, the rest carried along,
//   zone 4 of 9   output inverters give NAND, NOR, XNOR,
//   zones 5..9    routing to the output cells.
// An input present on the clk edge at which the first zone switches appears
// at the outputs after the edge eight cycles later (nine edges in all).
// ZONE_FIRST defaults to 4: the A input cell sits in a tile of zone 4.
//
// The function set, the nine-zone latency and the zone of the input tile
// follow the document; how the nine zones divide between logic and routing
// is this model's own choice, as the document gives only the total.
// The active-low asynchronous reset puts every zone in the state it would
// hold with A = B = 0 applied for a long time, so the first outputs after
// reset are the functions of 0 and 0 rather than a mix of cleared values.
module qca_res_composite_gate
  import qca_pkg::*;
#(
  parameter int unsigned ZONE_FIRST = 4,
  parameter int unsigned NUM_ZONES  = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  phase_t      phase,
  input  logic        a,
  input  logic        b,
  output res_cg_out_t y
);

  // Zones used for logic before the plain routing zones start.
  localparam int unsigned LOGIC_ZONES = 4;

  if (NUM_ZONES < LOGIC_ZONES) begin : g_bad_depth
    $error("qca_res_composite_gate: NUM_ZONES must be at least %0d", LOGIC_ZONES);
  end

  localparam int unsigned Z1 = ZONE_FIRST;
  localparam int unsigned Z2 = next_zone(Z1);
  localparam int unsigned Z3 = next_zone(Z2);
  localparam int unsigned Z4 = next_zone(Z3);
  localparam int unsigned Z5 = next_zone(Z4);

  // Zone 1 of 9: input cells.
  logic a_1, b_1;
  qca_clock_zone #(.WIDTH(2), .ZONE(Z1)) u_z1 (
    .clk, .rst_n, .phase, .d({a, b}), .q({a_1, b_1})
  );

  // Zone 2 of 9: input inverters and first voter level.
  logic na, nb, m1, m2, m3, m4;
  qca_inverter u_inv_a (.a(a_1), .y(na));
  qca_inverter u_inv_b (.a(b_1), .y(nb));
  qca_majority u_m1 (.p(a_1), .q(b_1), .r(1'b0), .m(m1));   // A.B
  qca_majority u_m2 (.p(a_1), .q(b_1), .r(1'b1), .m(m2));   // A+B
  qca_majority u_m3 (.p(a_1), .q(nb),  .r(1'b0), .m(m3));   // A.B'
  qca_majority u_m4 (.p(na),  .q(b_1), .r(1'b0), .m(m4));   // A'.B

  logic na_2, nb_2, m1_2, m2_2, m3_2, m4_2;
  // Reset values: the zone contents for A = B = 0.
  localparam logic [5:0]  RST_Z2 = 6'b11_0000;   // na nb m1 m2 m3 m4
  localparam logic [4:0]  RST_Z3 = 5'b11_000;    // na nb and or xor
  localparam res_cg_out_t RST_Z4 = '{and_o: 1'b0, or_o: 1'b0, nor_o: 1'b1, na_o: 1'b1,
                                     nand_o: 1'b1, xnor_o: 1'b1, xor_o: 1'b0, nb_o: 1'b1};

  qca_clock_zone #(.WIDTH(6), .ZONE(Z2), .RESET_VAL(RST_Z2)) u_z2 (
    .clk, .rst_n, .phase,
    .d({na, nb, m1, m2, m3, m4}),
    .q({na_2, nb_2, m1_2, m2_2, m3_2, m4_2})
  );

  // Zone 3 of 9: output voter M5.
  logic m5;
  qca_majority u_m5 (.p(m3_2), .q(m4_2), .r(1'b1), .m(m5)); // A.B' + A'.B

  logic na_3, nb_3, and_3, or_3, xor_3;
  qca_clock_zone #(.WIDTH(5), .ZONE(Z3), .RESET_VAL(RST_Z3)) u_z3 (
    .clk, .rst_n, .phase,
    .d({na_2, nb_2, m1_2, m2_2, m5}),
    .q({na_3, nb_3, and_3, or_3, xor_3})
  );

  // Zone 4 of 9: complements of the three functions.
  logic nand_c, nor_c, xnor_c;
  qca_inverter u_inv_and (.a(and_3), .y(nand_c));
  qca_inverter u_inv_or  (.a(or_3),  .y(nor_c));
  qca_inverter u_inv_xor (.a(xor_3), .y(xnor_c));

  res_cg_out_t out_4;
  qca_clock_zone #(.WIDTH($bits(res_cg_out_t)), .ZONE(Z4), .RESET_VAL(RST_Z4)) u_z4 (
    .clk, .rst_n, .phase,
    .d({and_3, or_3, nor_c, na_3, nand_c, xnor_c, xor_3, nb_3}),
    .q(out_4)
  );

  // Zones 5..9 of 9: routing to the output cells.
  qca_zone_chain #(
    .WIDTH     ($bits(res_cg_out_t)),
    .ZONE_FIRST(Z5),
    .DEPTH     (NUM_ZONES - LOGIC_ZONES),
    .RESET_VAL (RST_Z4)
  ) u_route (
    .clk, .rst_n, .phase, .d(out_4), .q(y)
  );

endmodule
