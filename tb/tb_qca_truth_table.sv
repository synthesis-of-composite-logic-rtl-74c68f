// tb_qca_truth_table: the truth-table run of the whole design.
//
// Applies the four input pairs (A,B) = 00, 01, 10, 11 to the top, one per QCA
// clock period, in the intended protocol, waits for the slower (nine-zone)
// gate to deliver, and prints one row per pair with all seventeen outputs:
// the plain gate's AND/OR/XOR, the six symmetric functions and the eight
// outputs of the RES gate. Each value is compared with the Boolean
// definition of its function, and the plain and RES gates must agree on the
// functions they share.
module tb_qca_truth_table;
  import qca_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        a = 0, b = 0;
  phase_t      phase;
  logic [3:0]  zone_switch;
  zone_state_e zone_st [4];
  cg_out_t     cg_y;
  sym2_out_t   sym2_f;
  res_cg_out_t res_y;
  zone_num_t   grid_zone     [9][8];
  logic        grid_switch   [9][8];
  logic [3:0]  grid_flow_out [9][8];
  logic [3:0]  grid_flow_in  [9][8];
  int checks = 0, failures = 0;

  qca_cg_top dut (
    .clk, .rst_n, .a, .b, .phase, .zone_switch, .zone_st, .cg_y, .sym2_f, .res_y,
    .grid_zone, .grid_switch, .grid_flow_out, .grid_flow_in
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string name, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL A=%b B=%b %s=%b expected %b", a, b, name, got, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    $display(" A B | AND OR XOR | f1 f2 f3 f4 f5 f6 | AND OR NOR A' NAND XNOR XOR B'");
    for (int v = 0; v < 4; v++) begin
      while (phase != 2'd1) @(negedge clk);
      {a, b} = 2'(v);
      // Hold the pair for three periods: long enough for nine zones.
      repeat (12) @(negedge clk);
      $display(" %b %b |  %b   %b   %b  |  %b  %b  %b  %b  %b  %b |  %b   %b   %b  %b   %b    %b    %b   %b",
               a, b, cg_y.and_o, cg_y.or_o, cg_y.xor_o,
               sym2_f.f1, sym2_f.f2, sym2_f.f3, sym2_f.f4, sym2_f.f5, sym2_f.f6,
               res_y.and_o, res_y.or_o, res_y.nor_o, res_y.na_o, res_y.nand_o,
               res_y.xnor_o, res_y.xor_o, res_y.nb_o);
      expect_bit("cg AND", cg_y.and_o, a && b);
      expect_bit("cg OR",  cg_y.or_o,  a || b);
      expect_bit("cg XOR", cg_y.xor_o, (a && !b) || (!a && b));
      expect_bit("f1", sym2_f.f1, a && b);
      expect_bit("f2", sym2_f.f2, !a || !b);
      expect_bit("f3", sym2_f.f3, a || b);
      expect_bit("f4", sym2_f.f4, !a && !b);
      expect_bit("f5", sym2_f.f5, (a && !b) || (!a && b));
      expect_bit("f6", sym2_f.f6, (a && b) || (!a && !b));
      expect_bit("res AND",  res_y.and_o,  a && b);
      expect_bit("res OR",   res_y.or_o,   a || b);
      expect_bit("res NOR",  res_y.nor_o,  !(a || b));
      expect_bit("res A'",   res_y.na_o,   !a);
      expect_bit("res NAND", res_y.nand_o, !(a && b));
      expect_bit("res XNOR", res_y.xnor_o, a == b);
      expect_bit("res XOR",  res_y.xor_o,  a != b);
      expect_bit("res B'",   res_y.nb_o,   !b);
      expect_bit("same AND", cg_y.and_o, res_y.and_o);
      expect_bit("same OR",  cg_y.or_o,  res_y.or_o);
      expect_bit("same XOR", cg_y.xor_o, res_y.xor_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
