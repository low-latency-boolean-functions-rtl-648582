// ll_compound_gate: a fan-in 3 or 4 library gate, or its low-latency
// equivalent made of 2-input NAND/NOR gates and inverters.
//
// CELL picks the function (x0..x3 are x[0]..x[3]):
//   NAND3 ~(x0&x1&x2)        NOR3  ~(x0|x1|x2)
//   AOI21 ~((x0&x1)|x2)      OAI21 ~((x0|x1)&x2)
//   NAND4 ~(x0&x1&x2&x3)     NOR4  ~(x0|x1|x2|x3)
//   AOI22 ~((x0&x1)|(x2&x3)) OAI22 ~((x0|x1)&(x2|x3))
// The 3-input cells ignore x[3].
//
// IMPL_LIBRARY writes the function as one expression, standing for the
// single library cell. IMPL_NAND_NOR builds it as a depth-2 sub-circuit:
// x0 and x1 (and x2, x3 for the 4-input cells) are inverted, a first
// 2-input gate of the dual type combines each inverted pair, and one
// 2-input gate of the cell's own kind (NAND for NAND/OAI, NOR for NOR/AOI)
// combines the results, with x2 joining it directly in the 3-input cells.
// Example: OAI22 = NAND(NAND(~x0,~x1), NAND(~x2,~x3)).
//
// Purely combinational. In the NAND/NOR form every path crosses two
// NAND/NOR gates, so the cell has latency complexity 2. Which sub-circuit
// replaces which cell follows the published equivalences; the single
// parameterised module is this design's own packaging.
module ll_compound_gate
  import ll_pkg::*;
#(
  parameter cell_e CELL = C_OAI22,
  parameter impl_e IMPL = IMPL_NAND_NOR
) (
  input  logic [0:3] x,
  output logic       y
);

  function automatic logic nand2(input logic a, input logic b);
    return ~(a & b);
  endfunction

  function automatic logic nor2(input logic a, input logic b);
    return ~(a | b);
  endfunction

  logic n0, n1, n2, n3;  // level-0 inverters
  assign n0 = ~x[0];
  assign n1 = ~x[1];
  assign n2 = ~x[2];
  assign n3 = ~x[3];

  always_comb begin
    if (IMPL == IMPL_LIBRARY) begin
      unique case (CELL)
        C_NAND3: y = ~(x[0] & x[1] & x[2]);
        C_NOR3:  y = ~(x[0] | x[1] | x[2]);
        C_AOI21: y = ~((x[0] & x[1]) | x[2]);
        C_OAI21: y = ~((x[0] | x[1]) & x[2]);
        C_NAND4: y = ~(x[0] & x[1] & x[2] & x[3]);
        C_NOR4:  y = ~(x[0] | x[1] | x[2] | x[3]);
        C_AOI22: y = ~((x[0] & x[1]) | (x[2] & x[3]));
        C_OAI22: y = ~((x[0] | x[1]) & (x[2] | x[3]));
        default: y = 1'b0;
      endcase
    end else begin
      unique case (CELL)
        C_NAND3: y = nand2(nor2(n0, n1), x[2]);
        C_NOR3:  y = nor2(nand2(n0, n1), x[2]);
        C_AOI21: y = nor2(nor2(n0, n1), x[2]);
        C_OAI21: y = nand2(nand2(n0, n1), x[2]);
        C_NAND4: y = nand2(nor2(n0, n1), nor2(n2, n3));
        C_NOR4:  y = nor2(nand2(n0, n1), nand2(n2, n3));
        C_AOI22: y = nor2(nor2(n0, n1), nor2(n2, n3));
        C_OAI22: y = nand2(nand2(n0, n1), nand2(n2, n3));
        default: y = 1'b0;
      endcase
    end
  end

endmodule
