// qca_clock_zone: one QCA clock zone, modelled as a phase-enabled register.
//
// The cells of a zone take a new value while the zone is in its Switch state
// and keep it through Hold; the next zone reads it then. Here the register
// loads d on the rising edge of clk at which the shared phase index equals
// the zone's Switch phase (ZONE-1), and holds q otherwise. Any logic a zone
// computes (majority voters, inverters) sits in front of d, so a value takes
// exactly one clk cycle per zone crossed.
//
// Parameters: WIDTH bits carried, ZONE number 1..4, RESET_VAL the value q
// takes on the active-low asynchronous reset.
//
// Zones that switch in turn follow the document. Holding the value through
// Release and Relax, where a real zone loses its polarization, is this
// model's choice: no correctly timed reader looks at a zone then.
module qca_clock_zone
  import qca_pkg::*;
#(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned ZONE  = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  phase_t           phase,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  localparam phase_t SW_PHASE = switch_phase(ZONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 q <= RESET_VAL;
    else if (phase == SW_PHASE) q <= d;
  end

endmodule
