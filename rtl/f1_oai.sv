// f1_oai: optimised low-latency circuit of the representative coordinate
// function f1 of the 6-bit S-box,
//   f1 = ~z0&z1&z4 ^ z0&~z1&z5 ^ z0&z1 ^ z2&z3.
//
// It is the depth-4 NAND/NOR tree of f1 with the top three gates folded
// into an OAI22 cell. Its four inputs are the complements of the four
// depth-2 sub-trees:
//   s0 = NAND(NOR(~z2,~z3), NAND(z0,z5))   plain 2-input gates
//   s1 = AOI21(~z0, ~z4, ~z1)              leaves ~z1 ~z4 ~z0 ~z1 of the tree
//   s2 = AOI21( z0,  z5,  z1)              leaves  z1  z5  z0  z1
//   s3 = OAI22( z0,  z4, ~z2, ~z3)
//   y  = OAI22(s0, s1, s2, s3)
// The two AOI21 cells exist because z1 appears twice under the same level-2
// gate: (a|b)&(c|a) = a | (b&c).
//
// Interface: z[0:5] in (z0 first), y out. Purely combinational: at most
// two compound cells on every path, four NAND/NOR levels when IMPL is
// IMPL_NAND_NOR. Leaf order and cell kinds follow the published optimised
// circuit; the inversions were solved so the tree computes f1.
module f1_oai
  import ll_pkg::*;
#(
  parameter impl_e IMPL = IMPL_LIBRARY
) (
  input  logic [0:5] z,
  output logic       y
);

  logic [0:3] s;

  assign s[0] = ~(~(~z[2] | ~z[3]) & ~(z[0] & z[5]));

  ll_compound_gate #(.CELL(C_AOI21), .IMPL(IMPL)) u_aoi2 (.x({~z[0], ~z[4], ~z[1], 1'b0}), .y(s[1]));
  ll_compound_gate #(.CELL(C_AOI21), .IMPL(IMPL)) u_aoi3 (.x({ z[0],  z[5],  z[1], 1'b0}), .y(s[2]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai4 (.x({ z[0],  z[4], ~z[2], ~z[3]}), .y(s[3]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai0 (.x(s), .y(y));

endmodule
