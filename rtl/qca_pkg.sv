// qca_pkg: shared types and helpers for the QCA composite-gate models.
//
// A QCA circuit is timed by a four-phase clock. Each group of cells (a clock
// zone) goes through Switch, Hold, Release and Relax in turn, and the four
// zones are a quarter period apart. Zones are numbered 1..4 as in the layouts:
// zone 1 is driven by the 0-degree phase, zone 2 by 90, zone 3 by 180 and
// zone 4 by 270 degrees. Data moves from zone n to zone n+1 (4 wraps to 1).
//
// In these models one tick of the RTL clock is one quarter of a QCA clock
// period, so the 2-bit phase index 0..3 says which zone is in Switch:
// zone z switches when phase == z-1. The zone numbering and its order follow
// the document; mapping one quarter period to one RTL clock is this model's
// own choice.
package qca_pkg;

  // Number of phases of the QCA clock (and of distinct clock zones).
  localparam int unsigned NUM_PHASES = 4;

  // The four states a clock zone goes through.
  typedef enum logic [1:0] {
    ZS_SWITCH  = 2'd0,   // barrier rising: cells take their new value
    ZS_HOLD    = 2'd1,   // barrier high: value held, drives the next zone
    ZS_RELEASE = 2'd2,   // barrier falling
    ZS_RELAX   = 2'd3    // barrier low: cell unpolarized
  } zone_state_e;

  // Phase index 0..3 (0, 90, 180, 270 degrees).
  typedef logic [1:0] phase_t;

  // Zone number 1..4 of a clock zone.
  typedef logic [2:0] zone_num_t;

  // Phase index at which zone z (1..4) is in its Switch state.
  function automatic phase_t switch_phase(input int unsigned zone);
    return phase_t'((zone + NUM_PHASES - 1) % NUM_PHASES);
  endfunction

  // Zone that follows zone z in the data flow (1->2->3->4->1).
  function automatic int unsigned next_zone(input int unsigned zone);
    return (zone % NUM_PHASES) + 1;
  endfunction

  // State of zone z (1..4) while the clock is at phase ph.
  function automatic zone_state_e zone_state(input int unsigned zone, input phase_t ph);
    return zone_state_e'(2'(ph - switch_phase(zone)));
  endfunction

  // Outputs of the composite gate without regular clocking.
  typedef struct packed {
    logic and_o;   // A.B
    logic or_o;    // A+B
    logic xor_o;   // A.B' + A'.B
  } cg_out_t;

  // Outputs of the composite gate on the RES grid: the three functions,
  // their complements and the two complemented inputs.
  typedef struct packed {
    logic and_o;    // A.B
    logic or_o;     // A+B
    logic nor_o;    // (A+B)'
    logic na_o;     // A'
    logic nand_o;   // (A.B)'
    logic xnor_o;   // A.B + A'.B'
    logic xor_o;    // A.B' + A'.B
    logic nb_o;     // B'
  } res_cg_out_t;

  // The six 2-input symmetric functions, numbered as in the function table.
  typedef struct packed {
    logic f1;   // A.B
    logic f2;   // A'+B'
    logic f3;   // A+B
    logic f4;   // A'.B'
    logic f5;   // A.B'+A'.B
    logic f6;   // A.B+A'.B'
  } sym2_out_t;

endpackage
