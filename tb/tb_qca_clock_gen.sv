// tb_qca_clock_gen: checks the four-phase clock generator.
// After reset the phase must be 0, then advance by one each clk cycle and
// wrap after 3 (a QCA period of four cycles). For every cycle the testbench
// works out which zone must be switching (zone z when phase = z-1) and the
// state of each zone (Switch, Hold, Release, Relax, shifted by a quarter
// period per zone) and compares. A reset in the middle must return phase to 0.
module tb_qca_clock_gen;
  import qca_pkg::*;

  logic        clk = 0, rst_n = 0;
  phase_t      phase;
  logic [3:0]  zone_switch;
  zone_state_e zone_st [4];
  int          checks = 0, failures = 0;

  qca_clock_gen dut (.clk, .rst_n, .phase, .zone_switch, .zone_st);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle(input int expect_phase);
    checks++;
    if (int'(phase) != expect_phase) begin
      failures++;
      $display("FAIL phase=%0d expected %0d", phase, expect_phase);
    end
    for (int z = 1; z <= 4; z++) begin
      int st;
      st = (expect_phase - (z - 1) + 4) % 4;   // 0 Switch, 1 Hold, 2 Release, 3 Relax
      checks++;
      if (zone_switch[z-1] !== (st == 0) || int'(zone_st[z-1]) != st) begin
        failures++;
        $display("FAIL zone %0d: switch=%b state=%0d expected state %0d",
                 z, zone_switch[z-1], zone_st[z-1], st);
      end
    end
  endtask

  initial begin
    int expect_phase;
    repeat (3) @(negedge clk);
    check_cycle(0);                 // held in reset
    rst_n = 1;
    expect_phase = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      expect_phase = (expect_phase + 1) % 4;
      check_cycle(expect_phase);
    end
    // Reset in mid-period.
    @(negedge clk);
    rst_n = 0;
    #1;
    check_cycle(0);
    @(negedge clk);
    rst_n = 1;
    expect_phase = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      expect_phase = (expect_phase + 1) % 4;
      check_cycle(expect_phase);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
