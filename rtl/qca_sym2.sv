// qca_sym2: all six 2-input symmetric functions from one composite gate.
//
// Leaving out the constants 0 and 1, two variables have 2^(2+1)-2 = 6
// symmetric functions:
//   f1 = A.B        AND  (composite gate output)
//   f2 = A'+B'      NAND (inverted AND)
//   f3 = A+B        OR   (composite gate output)
//   f4 = A'.B'      NOR  (inverted OR)
//   f5 = A.B'+A'.B  XOR  (composite gate output)
//   f6 = A.B+A'.B'  XNOR (inverted XOR)
// One qca_composite_gate gives f1, f3, f5 and one inverter on each of its
// outputs gives the other three. Every gate output is used, so nothing is
// left over as an unused intermediate signal.
//
// Timing is that of the composite gate: three clock zones from ZONE_FIRST.
// The output inverters sit in the last zone, after its register, so all six
// functions change together, two clk cycles after the edge on which the first
// zone takes the inputs. The structure follows the document; placing the
// output inverters after the last zone register is this model's choice.
module qca_sym2
  import qca_pkg::*;
#(
  parameter int unsigned ZONE_FIRST = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  phase_t    phase,
  input  logic      a,
  input  logic      b,
  output sym2_out_t f
);

  cg_out_t cg;

  qca_composite_gate #(.ZONE_FIRST(ZONE_FIRST)) u_cg (
    .clk, .rst_n, .phase, .a, .b, .y(cg)
  );

  logic nand_o, nor_o, xnor_o;
  qca_inverter u_inv_and (.a(cg.and_o), .y(nand_o));
  qca_inverter u_inv_or  (.a(cg.or_o),  .y(nor_o));
  qca_inverter u_inv_xor (.a(cg.xor_o), .y(xnor_o));

  assign f = '{f1: cg.and_o, f2: nand_o, f3: cg.or_o,
               f4: nor_o,    f5: cg.xor_o, f6: xnor_o};

endmodule
