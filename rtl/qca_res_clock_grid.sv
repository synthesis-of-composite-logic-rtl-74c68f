// qca_res_clock_grid: the RES regular clocking scheme as a grid of tiles.
//
// Under a QCA layout that uses regular clocking, the plane is cut into square
// tiles and every tile is one clock zone, fed by buried electrodes from the
// four-phase generator. In the RES scheme the zone numbers follow a fixed 4x4
// pattern that is repeated in both directions to cover a circuit of any size:
//
//        col 0  1  2  3
//   row 0:   4  1  2  3
//   row 1:   1  2  1  4
//   row 2:   2  3  4  1
//   row 3:   1  4  3  2
//
// Data may pass from a tile to a side neighbour only when the neighbour is the
// next zone (1->2->3->4->1). With this pattern some tiles have two ways in or
// two ways out, which gives routes in opposite directions (for feedback) and
// lets a three-input majority voter take all its inputs in one zone.
//
// For every tile of a ROWS x COLS grid this block gives its zone number
// (constant), whether it is switching at the current clock phase (zone_switch,
// combinational from phase), and which neighbours it may send to (flow_out)
// and receive from (flow_in). Direction bits are {N, E, S, W}; row 0 is the
// top, column 0 the left. The grid does not wrap around at its edges.
//
// The 4x4 pattern, its replication and the next-zone rule follow the
// document. The default size, 9 rows by 8 columns, is the grid under the
// composite gate laid out with this scheme.
module qca_res_clock_grid
  import qca_pkg::*;
#(
  parameter int unsigned ROWS = 9,
  parameter int unsigned COLS = 8
) (
  input  phase_t    phase,
  output zone_num_t zone_map    [ROWS][COLS],
  output logic      zone_switch [ROWS][COLS],
  output logic [3:0] flow_out   [ROWS][COLS],
  output logic [3:0] flow_in    [ROWS][COLS]
);

  // Zone number of tile (r, c) from the repeating 4x4 pattern.
  function automatic int unsigned tile_zone(input int unsigned r, input int unsigned c);
    int unsigned pattern [4][4];
    pattern = '{'{4, 1, 2, 3},
                '{1, 2, 1, 4},
                '{2, 3, 4, 1},
                '{1, 4, 3, 2}};
    return pattern[r % 4][c % 4];
  endfunction

  // 1 when data may move from a tile of zone 'from' into one of zone 'to'.
  function automatic logic can_pass(input int unsigned from, input int unsigned to);
    return logic'(next_zone(from) == to);
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned Z = tile_zone(r, c);
      // Neighbour zones; 0 marks "no neighbour" at the grid edge.
      localparam int unsigned ZN = (r > 0)        ? tile_zone(r - 1, c) : 0;
      localparam int unsigned ZE = (c + 1 < COLS) ? tile_zone(r, c + 1) : 0;
      localparam int unsigned ZS = (r + 1 < ROWS) ? tile_zone(r + 1, c) : 0;
      localparam int unsigned ZW = (c > 0)        ? tile_zone(r, c - 1) : 0;

      assign zone_map[r][c]    = zone_num_t'(Z);
      assign zone_switch[r][c] = (phase == switch_phase(Z));
      assign flow_out[r][c] = {ZN != 0 && can_pass(Z, ZN),
                               ZE != 0 && can_pass(Z, ZE),
                               ZS != 0 && can_pass(Z, ZS),
                               ZW != 0 && can_pass(Z, ZW)};
      assign flow_in[r][c]  = {ZN != 0 && can_pass(ZN, Z),
                               ZE != 0 && can_pass(ZE, Z),
                               ZS != 0 && can_pass(ZS, Z),
                               ZW != 0 && can_pass(ZW, Z)};
    end
  end

endmodule
