// qca_cg_top: the composite-gate designs side by side on one four-phase clock.
//
// A single qca_clock_gen supplies the phase index to everything:
//   u_cg    the composite gate without regular clocking (AND, OR, XOR;
//           three clock zones, zones 1..3),
//   u_sym2  a second composite gate with output inverters, giving all six
//           2-input symmetric functions (three zones, zones 1..3),
//   u_res   the composite gate laid out on the RES regular clocking grid
//           (eight outputs, nine zones, starting in zone 4),
//   u_grid  the RES tile grid under u_res: each tile's zone, whether it is
//           switching now, and the directions data may flow between tiles.
// All three gates read the same inputs a and b.
//
// Timing: one clk cycle is a quarter QCA period. u_cg and u_sym2 take their
// inputs on the edge where phase = 0, u_res on the edge where phase = 3. Hold
// a and b for four cycles (one QCA period), changing them just after a
// phase-0 edge, and every gate sees each input pair exactly once. Outputs:
// cg and sym2 two cycles after their capture edge; res eight cycles after
// its capture edge. Active-low asynchronous reset.
//
// Which designs belong together follows the document; sharing one clock
// generator and one pair of inputs is this model's choice.
module qca_cg_top
  import qca_pkg::*;
#(
  parameter int unsigned GRID_ROWS = 9,
  parameter int unsigned GRID_COLS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a,
  input  logic        b,
  output phase_t      phase,
  output logic [3:0]  zone_switch,
  output zone_state_e zone_st [4],
  output cg_out_t     cg_y,
  output sym2_out_t   sym2_f,
  output res_cg_out_t res_y,
  output zone_num_t   grid_zone     [GRID_ROWS][GRID_COLS],
  output logic        grid_switch   [GRID_ROWS][GRID_COLS],
  output logic [3:0]  grid_flow_out [GRID_ROWS][GRID_COLS],
  output logic [3:0]  grid_flow_in  [GRID_ROWS][GRID_COLS]
);

  qca_clock_gen u_clk (
    .clk, .rst_n, .phase, .zone_switch, .zone_st
  );

  qca_composite_gate #(.ZONE_FIRST(1)) u_cg (
    .clk, .rst_n, .phase, .a, .b, .y(cg_y)
  );

  qca_sym2 #(.ZONE_FIRST(1)) u_sym2 (
    .clk, .rst_n, .phase, .a, .b, .f(sym2_f)
  );

  qca_res_composite_gate #(.ZONE_FIRST(4), .NUM_ZONES(9)) u_res (
    .clk, .rst_n, .phase, .a, .b, .y(res_y)
  );

  qca_res_clock_grid #(.ROWS(GRID_ROWS), .COLS(GRID_COLS)) u_grid (
    .phase,
    .zone_map   (grid_zone),
    .zone_switch(grid_switch),
    .flow_out   (grid_flow_out),
    .flow_in    (grid_flow_in)
  );

endmodule
