// tb_qca_res_composite_gate: checks the composite gate on the RES grid.
// The testbench keeps its own phase counter and changes A and B at random on
// every cycle. On each edge where the first zone (zone 4) switches, phase 3,
// it works out all eight outputs (AND, OR, NOR, A', NAND, XNOR, XOR, B') of
// the inputs it sees and schedules them for exactly eight edges later: nine
// zones, a latency of 2.25 QCA periods. Since a new input pair is taken every
// four cycles, up to three pairs are in flight at once; the testbench checks
// that this overlap happened, and measures the latency of one change.
module tb_qca_res_composite_gate;
  import qca_pkg::*;

  localparam int unsigned ZONE_FIRST = 4;
  localparam int          LAT        = 9;

  typedef struct { int due; res_cg_out_t val; } pending_t;

  logic        clk = 0, rst_n = 0;
  phase_t      phase = '0;
  logic        a = 0, b = 0;
  res_cg_out_t y, expect_y;
  int          checks = 0, failures = 0;
  int          edge_no = -1;
  int          max_in_flight = 0;
  pending_t    pend [$];

  qca_res_composite_gate dut (.clk, .rst_n, .phase, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      edge_no <= edge_no + 1;
      if (int'(phase) == int'(ZONE_FIRST) - 1) begin
        pending_t p;
        p.due          = edge_no + LAT;
        p.val.and_o    = a & b;
        p.val.or_o     = a | b;
        p.val.nor_o    = !(a | b);
        p.val.na_o     = !a;
        p.val.nand_o   = !(a & b);
        p.val.xnor_o   = a == b;
        p.val.xor_o    = a != b;
        p.val.nb_o     = !b;
        pend.push_back(p);
      end
      phase <= phase + 2'd1;
    end
  end

  task automatic check_now();
    while (pend.size() > 0 && pend[0].due <= edge_no) expect_y = pend.pop_front().val;
    if (pend.size() > max_in_flight) max_in_flight = pend.size();
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL edge %0d: y=%b expected %b", edge_no, y, expect_y);
    end
  endtask

  initial begin
    int t_cap, t_out;
    // Reset leaves the pipeline as if A = B = 0 had been applied.
    expect_y = '{and_o: 0, or_o: 0, nor_o: 1, na_o: 1, nand_o: 1, xnor_o: 1, xor_o: 0, nb_o: 1};
    repeat (2) @(negedge clk);
    check_now();
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      @(negedge clk);
      check_now();
    end
    checks++;
    if (max_in_flight < 2) begin
      failures++;
      $display("FAIL never more than %0d input pairs in flight", max_in_flight);
    end
    // Latency of one change: A=B=1 taken at a phase-3 edge; AND rises on the
    // ninth edge counting the capture edge.
    a = 0; b = 0;
    repeat (16) @(negedge clk);
    while (phase != 2'd3) @(negedge clk);
    a = 1; b = 1;
    @(posedge clk); t_cap = edge_no + 1;
    while (y.and_o !== 1'b1) @(posedge clk) #1;
    t_out = edge_no;
    checks++;
    if (t_out - t_cap + 1 != LAT) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", t_out - t_cap + 1, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
