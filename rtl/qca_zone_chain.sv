// qca_zone_chain: a run of DEPTH consecutive clock zones that only carry data,
// as a QCA wire does when it passes through several zones on its way.
//
// The first zone is number ZONE_FIRST (1..4) and each following zone is the
// next in the 1->2->3->4->1 order, so the data advances one zone per clk cycle
// and leaves DEPTH cycles after entering. DEPTH may be 0 (a plain wire).
// Built from qca_clock_zone; the active-low asynchronous reset loads
// RESET_VAL into every zone.
module qca_zone_chain
  import qca_pkg::*;
#(
  parameter int unsigned WIDTH      = 1,
  parameter int unsigned ZONE_FIRST = 1,
  parameter int unsigned DEPTH      = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  phase_t           phase,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [DEPTH+1];

  assign stage[0] = d;

  for (genvar i = 0; i < DEPTH; i++) begin : g_zone
    qca_clock_zone #(
      .WIDTH(WIDTH),
      .ZONE (((ZONE_FIRST - 1 + i) % NUM_PHASES) + 1),
      .RESET_VAL(RESET_VAL)
    ) u_zone (
      .clk  (clk),
      .rst_n(rst_n),
      .phase(phase),
      .d    (stage[i]),
      .q    (stage[i+1])
    );
  end

  assign q = stage[DEPTH];

endmodule
