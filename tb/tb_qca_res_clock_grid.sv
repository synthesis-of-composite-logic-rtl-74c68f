// tb_qca_res_clock_grid: checks the RES tile grid at its default 9 x 8 size.
// The expected zone numbers are written out in full for an 8 x 8 block of
// the extended scheme (the 4x4 pattern repeated twice each way), with the
// ninth row equal to the first. From those numbers the testbench works out
// where data may flow (a neighbour one zone later) and compares flow_out and
// flow_in for every tile, and, for each of the four phases, which tiles are
// switching. It also checks the three-way tile just below the top-left
// corner: zone 1, fed from the zone-4 corner, sending right and down.
module tb_qca_res_clock_grid;
  import qca_pkg::*;

  localparam int ROWS = 9;
  localparam int COLS = 8;

  phase_t     phase;
  zone_num_t  zone_map    [ROWS][COLS];
  logic       zone_switch [ROWS][COLS];
  logic [3:0] flow_out    [ROWS][COLS];
  logic [3:0] flow_in     [ROWS][COLS];
  int         checks = 0, failures = 0;

  qca_res_clock_grid dut (.phase, .zone_map, .zone_switch, .flow_out, .flow_in);

  int expect_zone [ROWS][COLS] = '{
    '{4, 1, 2, 3, 4, 1, 2, 3},
    '{1, 2, 1, 4, 1, 2, 1, 4},
    '{2, 3, 4, 1, 2, 3, 4, 1},
    '{1, 4, 3, 2, 1, 4, 3, 2},
    '{4, 1, 2, 3, 4, 1, 2, 3},
    '{1, 2, 1, 4, 1, 2, 1, 4},
    '{2, 3, 4, 1, 2, 3, 4, 1},
    '{1, 4, 3, 2, 1, 4, 3, 2},
    '{4, 1, 2, 3, 4, 1, 2, 3}
  };

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Zone of a neighbour, or -1 outside the grid.
  function automatic int zone_at(input int r, input int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return -1;
    return expect_zone[r][c];
  endfunction

  function automatic logic follows(input int from, input int to);
    return from > 0 && to > 0 && to == (from == 4 ? 1 : from + 1);
  endfunction

  initial begin
    int dr [4] = '{-1, 0, 1, 0};   // N E S W
    int dc [4] = '{0, 1, 0, -1};
    phase = '0;
    #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic [3:0] eo, ei;
        for (int d = 0; d < 4; d++) begin
          int zn;
          zn = zone_at(r + dr[d], c + dc[d]);
          eo[3-d] = follows(expect_zone[r][c], zn);
          ei[3-d] = follows(zn, expect_zone[r][c]);
        end
        checks++;
        if (int'(zone_map[r][c]) != expect_zone[r][c] || flow_out[r][c] !== eo || flow_in[r][c] !== ei) begin
          failures++;
          $display("FAIL tile (%0d,%0d): zone %0d out %b in %b, expected zone %0d out %b in %b",
                   r, c, zone_map[r][c], flow_out[r][c], flow_in[r][c], expect_zone[r][c], eo, ei);
        end
      end
    for (int ph = 0; ph < 4; ph++) begin
      phase = phase_t'(ph);
      #1;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (zone_switch[r][c] !== (expect_zone[r][c] == ph + 1)) begin
            failures++;
            $display("FAIL phase %0d tile (%0d,%0d) switch=%b", ph, r, c, zone_switch[r][c]);
          end
        end
    end
    // Three-way tile (1,0): in from N, out to E and S.
    checks++;
    if (zone_map[1][0] != 3'd1 || flow_in[1][0] !== 4'b1000 || flow_out[1][0] !== 4'b0110) begin
      failures++;
      $display("FAIL three-way tile: in %b out %b", flow_in[1][0], flow_out[1][0]);
    end
    // A zone-4 tile with two inputs (2,2): a three-input voter can sit there.
    checks++;
    if (zone_map[2][2] != 3'd4 || $countones(flow_in[2][2]) != 2 || $countones(flow_out[2][2]) != 2) begin
      failures++;
      $display("FAIL tile (2,2): in %b out %b", flow_in[2][2], flow_out[2][2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
