// tb_qca_composite_gate: checks the composite gate's functions and timing.
// The testbench runs its own phase counter and changes A and B at random on
// every cycle, so the gate must ignore its inputs except on the edge where
// its first zone switches (phase 0). On each such edge the testbench works
// out AND, OR and XOR of the inputs it sees and schedules them to appear
// exactly two edges later (three zones, 0.75 QCA period). Between those
// edges the outputs must hold their previous value. It also checks that all
// four input pairs were taken and measures the latency of one change.
module tb_qca_composite_gate;
  import qca_pkg::*;

  localparam int unsigned ZONE_FIRST = 1;
  localparam int          LAT        = 3;   // edges from capture to output

  typedef struct { int due; cg_out_t val; } pending_t;

  logic    clk = 0, rst_n = 0;
  phase_t  phase = '0;
  logic    a = 0, b = 0;
  cg_out_t y, expect_y;
  int      checks = 0, failures = 0;
  int      edge_no = -1;
  int      seen [4];
  pending_t pend [$];

  qca_composite_gate dut (
    .clk, .rst_n, .phase, .a, .b, .y
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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
        p.due       = edge_no + LAT;       // edge_no is the previous edge here
        p.val.and_o = a & b;
        p.val.or_o  = a | b;
        p.val.xor_o = a != b;
        pend.push_back(p);
        seen[{a, b}]++;
      end
      phase <= phase + 2'd1;
    end
  end

  task automatic check_now();
    while (pend.size() > 0 && pend[0].due <= edge_no) expect_y = pend.pop_front().val;
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL edge %0d: and/or/xor=%b%b%b expected %b%b%b", edge_no,
               y.and_o, y.or_o, y.xor_o, expect_y.and_o, expect_y.or_o, expect_y.xor_o);
    end
  endtask

  initial begin
    int t_cap, t_out;
    expect_y = '0;
    for (int i = 0; i < 4; i++) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_now();
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      @(negedge clk);
      check_now();
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL input pair %0d never taken", i); end
    end
    // Latency of one change: A=B=1 taken at a phase-0 edge, AND rises two
    // edges later (three clk edges counting the capture edge).
    a = 0; b = 0;
    repeat (8) @(negedge clk);
    while (phase != 2'd0) @(negedge clk);
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
