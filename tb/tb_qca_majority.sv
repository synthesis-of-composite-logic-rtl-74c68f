// tb_qca_majority: exhaustive check of the three-input majority voter.
// All eight input combinations are applied; the expected output is worked
// out by counting the ones among the inputs (at least two -> 1). It also
// checks the two uses with one input tied: AND with 0 and OR with 1.
module tb_qca_majority;

  logic p, q, r, m;
  int   checks = 0, failures = 0;

  qca_majority dut (.p, .q, .r, .m);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {p, q, r} = 3'(v);
      ones = int'(p) + int'(q) + int'(r);
      #1;
      checks++;
      if (m !== (ones >= 2)) begin
        failures++;
        $display("FAIL p=%b q=%b r=%b m=%b", p, q, r, m);
      end
      // Tied third input: 0 gives AND, 1 gives OR of the other two.
      checks++;
      if (r == 1'b0 && m !== (p && q)) begin failures++; $display("FAIL AND use"); end
      if (r == 1'b1 && m !== (p || q)) begin failures++; $display("FAIL OR use");  end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
