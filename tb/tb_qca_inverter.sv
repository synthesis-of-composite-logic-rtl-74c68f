// tb_qca_inverter: the inverter's output must be the complement of its input
// for both input values, repeated with random values.
module tb_qca_inverter;

  logic a, y;
  int   checks = 0, failures = 0;

  qca_inverter dut (.a, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++) begin
      a = (i < 2) ? 1'(i) : 1'($urandom);
      #1;
      checks++;
      if (y === a) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
