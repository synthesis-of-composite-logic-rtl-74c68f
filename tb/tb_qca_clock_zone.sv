// tb_qca_clock_zone: checks that a clock zone takes a new value only on the
// clk edge where its own phase is the Switch phase, and holds it otherwise.
// Four zones (numbers 1..4) share random input data that changes every
// cycle; the testbench keeps its own phase counter and, per zone, the value
// it expects, updated only when phase = zone-1.
module tb_qca_clock_zone;
  import qca_pkg::*;

  localparam int W = 8;

  logic         clk = 0, rst_n = 0;
  phase_t       phase = '0;
  logic [W-1:0] d;
  logic [W-1:0] q [4];
  logic [W-1:0] expect_q [4];
  int           checks = 0, failures = 0;
  int           loads [4];

  for (genvar z = 1; z <= 4; z++) begin : g_dut
    qca_clock_zone #(.WIDTH(W), .ZONE(z)) dut (
      .clk, .rst_n, .phase, .d, .q(q[z-1])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: zone z loads on the edge where phase == z-1.
  always @(posedge clk) begin
    if (rst_n) begin
      for (int z = 1; z <= 4; z++)
        if (int'(phase) == z - 1) begin
          expect_q[z-1] <= d;
          loads[z-1]++;
        end
      phase <= phase + 2'd1;
    end
  end

  initial begin
    d = '0;
    for (int z = 0; z < 4; z++) begin expect_q[z] = '0; loads[z] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      @(negedge clk);
      for (int z = 0; z < 4; z++) begin
        checks++;
        if (q[z] !== expect_q[z]) begin
          failures++;
          $display("FAIL cycle %0d zone %0d q=%h expected %h", i, z + 1, q[z], expect_q[z]);
        end
      end
    end
    // Each zone loads once per four cycles.
    for (int z = 0; z < 4; z++) begin
      checks++;
      if (loads[z] != 50) begin
        failures++;
        $display("FAIL zone %0d loaded %0d times", z + 1, loads[z]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
