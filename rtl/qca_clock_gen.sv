// qca_clock_gen: four-phase QCA clock generator.
//
// Produces the four clock phases (0, 90, 180, 270 degrees) that drive clock
// zones 1, 2, 3 and 4. A 2-bit counter advances by one phase on every rising
// edge of clk, so one QCA clock period is four clk cycles. From the counter it
// derives, for each zone, whether the zone is in Switch (zone_switch, one-hot,
// bit z-1 for zone z) and its full state (Switch, Hold, Release, Relax).
//
// Interface: clk, active-low asynchronous reset rst_n (phase returns to 0, so
// zone 1 is the first to switch after reset). Outputs are registered state
// and logic decoded from it; they change right after each rising edge.
//
// Four phases a quarter period apart, one per zone, follow the document; the
// counter, the clk-per-quarter-period mapping and the reset value are this
// model's own choices.
module qca_clock_gen
  import qca_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output phase_t      phase,
  output logic [3:0]  zone_switch,
  output zone_state_e zone_st [4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 2'd1;
  end

  always_comb begin
    for (int z = 1; z <= 4; z++) begin
      zone_st[z-1]     = zone_state(z, phase);
      zone_switch[z-1] = (zone_st[z-1] == ZS_SWITCH);
    end
  end

  // Exactly one zone is switching at any time.
  always_comb a_one_switching: assert ($onehot(zone_switch));

endmodule
