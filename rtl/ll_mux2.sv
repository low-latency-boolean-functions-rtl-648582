// ll_mux2: 2:1 multiplexer with latency complexity 2.
//
// y = (x0 & x1) | (~x0 & x2): the select x0 passes x1 when high and x2
// when low. Three realisations, chosen by FORM:
//   MUX_LIBRARY:   one expression, standing for a library MUX2 cell;
//   MUX_NAND_NOR:  y = ~(~NAND(x0,x1) NOR ~NAND(~x0,x2)), two NAND gates
//                  whose outputs are inverted into a NOR and an output
//                  inverter (two NAND/NOR gates on every path);
//   MUX_NAND:      y = NAND(NAND(x0,x1), NAND(~x0,x2)), the same function
//                  after the inverters around the NOR are folded into it.
// The NAND form needs more area than a library MUX2 but, in common cell
// libraries, about 30 percent less delay.
//
// Purely combinational. The function and the two gate-level forms are the
// published ones; the FORM parameter and its default are this design's.
module ll_mux2 #(
  parameter int unsigned FORM = 2  // 0: MUX_LIBRARY, 1: MUX_NAND_NOR, 2: MUX_NAND
) (
  input  logic x0,  // select
  input  logic x1,  // passed when x0 = 1
  input  logic x2,  // passed when x0 = 0
  output logic y
);

  localparam int unsigned MUX_LIBRARY  = 0;
  localparam int unsigned MUX_NAND_NOR = 1;

  logic nx0;              // level-0 inverter on the select
  logic p, q;             // the two level-1 NAND gates
  assign nx0 = ~x0;
  assign p   = ~(x0 & x1);
  assign q   = ~(nx0 & x2);

  always_comb begin
    if (FORM == MUX_LIBRARY) begin
      y = x0 ? x1 : x2;
    end else if (FORM == MUX_NAND_NOR) begin
      y = ~(~((~p) | (~q)));
    end else begin
      y = ~(p & q);
    end
  end

endmodule
