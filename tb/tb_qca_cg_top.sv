// tb_qca_cg_top: end-to-end test of the whole design at its default sizes.
//
// The top's own clock generator drives everything. The testbench reads the
// phase the top reports and, on each edge where a gate takes its inputs
// (phase 0 for the plain gate and the symmetric-function block, phase 3 for
// the RES gate), works out that gate's outputs from the truth tables and
// schedules them for the edge the gate's latency gives (3 and 9 edges,
// counting the capture edge). Outputs are compared on every cycle.
//
// Stimulus: first the intended protocol (A and B changed just after a
// phase-0 edge and held one QCA period), then inputs changing at random on
// every cycle, then a reset in mid-operation, then the protocol again. The
// RES grid outputs are checked against the repeating 4x4 zone pattern.
//
// Mechanisms counted, each must happen at least once: every phase, every
// input pair taken by both gate kinds, every output bit seen at 0 and at 1,
// two or more input pairs in flight in the nine-zone gate, a reset during
// operation, and a grid tile with more than one way in or out.
module tb_qca_cg_top;
  import qca_pkg::*;

  localparam int ROWS    = 9;
  localparam int COLS    = 8;
  localparam int LAT_CG  = 3;
  localparam int LAT_RES = 9;

  typedef struct { int due; cg_out_t cg; sym2_out_t sym; } pend_cg_t;
  typedef struct { int due; res_cg_out_t res; } pend_res_t;

  logic        clk = 0, rst_n = 0;
  logic        a = 0, b = 0;
  phase_t      phase;
  logic [3:0]  zone_switch;
  zone_state_e zone_st [4];
  cg_out_t     cg_y, exp_cg;
  sym2_out_t   sym2_f, exp_sym;
  res_cg_out_t res_y, exp_res;
  zone_num_t   grid_zone     [ROWS][COLS];
  logic        grid_switch   [ROWS][COLS];
  logic [3:0]  grid_flow_out [ROWS][COLS];
  logic [3:0]  grid_flow_in  [ROWS][COLS];

  int checks = 0, failures = 0;
  int edge_no = -1;
  pend_cg_t  q_cg  [$];
  pend_res_t q_res [$];

  // Mechanism counters.
  int phase_seen [4];
  int pair_cg [4], pair_res [4];
  int max_res_in_flight = 0;
  int mid_resets = 0;
  int multiway_tiles = 0;
  logic [16:0] seen0, seen1;   // {cg 3, sym 6, res 8} output bits

  qca_cg_top dut (
    .clk, .rst_n, .a, .b, .phase, .zone_switch, .zone_st, .cg_y, .sym2_f, .res_y,
    .grid_zone, .grid_switch, .grid_flow_out, .grid_flow_in
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference functions.
  function automatic cg_out_t ref_cg(input logic x, input logic z);
    return '{and_o: x & z, or_o: x | z, xor_o: x ^ z};
  endfunction
  function automatic sym2_out_t ref_sym(input logic x, input logic z);
    return '{f1: x & z, f2: !(x & z), f3: x | z, f4: !(x | z), f5: x ^ z, f6: !(x ^ z)};
  endfunction
  function automatic res_cg_out_t ref_res(input logic x, input logic z);
    return '{and_o: x & z, or_o: x | z, nor_o: !(x | z), na_o: !x,
             nand_o: !(x & z), xnor_o: !(x ^ z), xor_o: x ^ z, nb_o: !z};
  endfunction

  task automatic reset_expect();
    q_cg.delete();
    q_res.delete();
    exp_cg  = ref_cg(0, 0);
    exp_sym = ref_sym(0, 0);
    exp_res = ref_res(0, 0);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      edge_no <= edge_no + 1;
      phase_seen[phase]++;
      if (phase == 2'd0) begin
        q_cg.push_back('{due: edge_no + LAT_CG, cg: ref_cg(a, b), sym: ref_sym(a, b)});
        pair_cg[{a, b}]++;
      end
      if (phase == 2'd3) begin
        q_res.push_back('{due: edge_no + LAT_RES, res: ref_res(a, b)});
        pair_res[{a, b}]++;
      end
    end
  end

  task automatic check_now();
    while (q_cg.size() > 0 && q_cg[0].due <= edge_no) begin
      exp_cg  = q_cg[0].cg;
      exp_sym = q_cg[0].sym;
      void'(q_cg.pop_front());
    end
    while (q_res.size() > 0 && q_res[0].due <= edge_no) exp_res = q_res.pop_front().res;
    if (q_res.size() > max_res_in_flight) max_res_in_flight = q_res.size();
    checks++;
    if (cg_y !== exp_cg) begin
      failures++;
      $display("FAIL edge %0d cg %b expected %b", edge_no, cg_y, exp_cg);
    end
    checks++;
    if (sym2_f !== exp_sym) begin
      failures++;
      $display("FAIL edge %0d sym2 %b expected %b", edge_no, sym2_f, exp_sym);
    end
    checks++;
    if (res_y !== exp_res) begin
      failures++;
      $display("FAIL edge %0d res %b expected %b", edge_no, res_y, exp_res);
    end
    checks++;
    if (zone_switch !== (4'b0001 << phase)) begin
      failures++;
      $display("FAIL zone_switch %b at phase %0d", zone_switch, phase);
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (grid_switch[r][c] !== (int'(grid_zone[r][c]) == int'(phase) + 1)) begin
          failures++;
          $display("FAIL grid tile (%0d,%0d) switch at phase %0d", r, c, phase);
        end
    checks++;
    seen0 |= ~{cg_y, sym2_f, res_y};
    seen1 |=  {cg_y, sym2_f, res_y};
  endtask

  // One QCA period of the intended protocol: new inputs just after phase 0.
  task automatic protocol_period(input logic x, input logic z);
    while (phase != 2'd1) begin @(negedge clk); check_now(); end
    a = x; b = z;
    repeat (4) begin @(negedge clk); check_now(); end
  endtask

  initial begin
    int pattern [4][4] = '{'{4, 1, 2, 3}, '{1, 2, 1, 4}, '{2, 3, 4, 1}, '{1, 4, 3, 2}};
    seen0 = '0; seen1 = '0;
    for (int i = 0; i < 4; i++) begin phase_seen[i] = 0; pair_cg[i] = 0; pair_res[i] = 0; end
    reset_expect();
    repeat (2) @(negedge clk);
    check_now();
    rst_n = 1;

    // Grid: zone pattern and multi-way tiles.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (int'(grid_zone[r][c]) != pattern[r % 4][c % 4]) begin
          failures++;
          $display("FAIL grid zone (%0d,%0d)=%0d", r, c, grid_zone[r][c]);
        end
        if ($countones(grid_flow_in[r][c]) > 1 || $countones(grid_flow_out[r][c]) > 1)
          multiway_tiles++;
      end

    // Protocol: every input pair, in order, then at random.
    for (int v = 0; v < 4; v++) protocol_period(v[1], v[0]);
    for (int i = 0; i < 40; i++) protocol_period(1'($urandom), 1'($urandom));

    // Inputs changing every cycle.
    for (int i = 0; i < 300; i++) begin
      a = 1'($urandom); b = 1'($urandom);
      @(negedge clk); check_now();
    end

    // Reset in the middle of operation, with pairs in flight.
    a = 1; b = 0;
    repeat (6) begin @(negedge clk); check_now(); end
    rst_n = 0;
    mid_resets++;
    reset_expect();
    #1 check_now();
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) protocol_period(1'($urandom), 1'($urandom));
    repeat (12) begin @(negedge clk); check_now(); end

    // Every mechanism must have happened.
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (phase_seen[i] == 0) begin failures++; $display("MISSING phase %0d", i); end
      checks++;
      if (pair_cg[i] == 0 || pair_res[i] == 0) begin
        failures++; $display("MISSING input pair %0d", i);
      end
    end
    checks++;
    if (seen0 != '1 || seen1 != '1) begin
      failures++; $display("MISSING output values: seen0=%b seen1=%b", seen0, seen1);
    end
    checks++;
    if (max_res_in_flight < 2) begin failures++; $display("MISSING pipelining in RES gate"); end
    checks++;
    if (mid_resets == 0) begin failures++; $display("MISSING mid-run reset"); end
    checks++;
    if (multiway_tiles == 0) begin failures++; $display("MISSING multi-way tile"); end
    $display("mechanisms: phases %0d/%0d/%0d/%0d, pairs cg %0d/%0d/%0d/%0d res %0d/%0d/%0d/%0d, max in flight %0d, mid resets %0d, multi-way tiles %0d",
             phase_seen[0], phase_seen[1], phase_seen[2], phase_seen[3],
             pair_cg[0], pair_cg[1], pair_cg[2], pair_cg[3],
             pair_res[0], pair_res[1], pair_res[2], pair_res[3],
             max_res_in_flight, mid_resets, multiway_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
