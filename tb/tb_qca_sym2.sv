// tb_qca_sym2: checks the six 2-input symmetric functions and their timing.
// As for the composite gate, A and B change at random every cycle, the
// testbench keeps its own phase counter and, on each edge where the first
// zone switches (phase 0), schedules the six functions of the inputs it sees
// for exactly two edges later. The expected values come from the function
// definitions: f1=A.B, f2=A'+B', f3=A+B, f4=A'.B', f5=A.B'+A'.B,
// f6=A.B+A'.B'. It also checks that each function is symmetric (swapping
// A and B does not change it) over the whole truth table.
module tb_qca_sym2;
  import qca_pkg::*;

  localparam int unsigned ZONE_FIRST = 1;
  localparam int          LAT        = 3;

  typedef struct { int due; sym2_out_t val; } pending_t;

  logic      clk = 0, rst_n = 0;
  phase_t    phase = '0;
  logic      a = 0, b = 0;
  sym2_out_t f, expect_f;
  sym2_out_t table_f [4];
  int        checks = 0, failures = 0;
  int        edge_no = -1;
  pending_t  pend [$];

  qca_sym2 dut (.clk, .rst_n, .phase, .a, .b, .f);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sym2_out_t ref_f(input logic x, input logic z);
    sym2_out_t r;
    r.f1 = x & z;
    r.f2 = !x | !z;
    r.f3 = x | z;
    r.f4 = !x & !z;
    r.f5 = (x & !z) | (!x & z);
    r.f6 = (x & z) | (!x & !z);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      edge_no <= edge_no + 1;
      if (int'(phase) == int'(ZONE_FIRST) - 1) begin
        pending_t p;
        p.due = edge_no + LAT;
        p.val = ref_f(a, b);
        pend.push_back(p);
      end
      phase <= phase + 2'd1;
    end
  end

  task automatic check_now();
    while (pend.size() > 0 && pend[0].due <= edge_no) expect_f = pend.pop_front().val;
    checks++;
    if (f !== expect_f) begin
      failures++;
      $display("FAIL edge %0d: f6..f1=%b expected %b", edge_no, f, expect_f);
    end
  endtask

  initial begin
    // After reset the gate outputs are 0, so the inverted ones read 1.
    expect_f = '{f1: 0, f2: 1, f3: 0, f4: 1, f5: 0, f6: 1};
    for (int i = 0; i < 4; i++) table_f[i] = '0;
    repeat (2) @(negedge clk);
    check_now();
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      @(negedge clk);
      check_now();
    end
    // Fill a truth table from the gate itself, one pair per QCA period.
    for (int v = 0; v < 4; v++) begin
      while (phase != 2'd0) @(negedge clk);
      {a, b} = 2'(v);
      repeat (4) @(negedge clk);
      check_now();
      table_f[v] = f;
    end
    // Symmetry: f(A,B) = f(B,A), i.e. rows 01 and 10 agree.
    checks++;
    if (table_f[1] !== table_f[2]) begin
      failures++;
      $display("FAIL not symmetric: f(0,1)=%b f(1,0)=%b", table_f[1], table_f[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
