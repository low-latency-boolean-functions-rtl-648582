// f0_oai: optimised low-latency circuit of the representative coordinate
// function f0 of the 6-bit S-box,
//   f0 = z0&~z4 ^ z1&~z5 ^ z2&z5 ^ z3&z4.
//
// It is the depth-4 NAND/NOR tree of f0 with each 3-gate sub-tree folded
// into one OAI22 cell: four OAI22 cells on the 16 tree leaves, feeding one
// OAI22 cell at the output. The leaves, in tree order, are
//   (z1, z5, z4, ~z0) (z2, ~z5, ~z3, ~z4) (z0, z4, z5, ~z1) (z3, ~z4, ~z2, ~z5)
// with the same inversions as in the tree: the tree has NOR gates on levels
// 1 and 2 and NAND gates on levels 3 and 4, so NOR(NOR(a,b),NOR(c,d)) is
// ~OAI22(a,b,c,d) and NAND(NAND(p,q),NAND(r,s)) of those is OAI22 of the
// four OAI22 outputs.
//
// Interface: z[0:5] in (z0 first), y out. Purely combinational: two
// compound cells on every path, four NAND/NOR levels when IMPL is
// IMPL_NAND_NOR. Leaf order and the OAI22 grouping follow the published
// optimised circuit; the inversions were solved so the tree computes f0.
module f0_oai
  import ll_pkg::*;
#(
  parameter impl_e IMPL = IMPL_LIBRARY
) (
  input  logic [0:5] z,
  output logic       y
);

  logic [0:3] o;  // OAI22_1 .. OAI22_4

  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai1 (.x({ z[1],  z[5],  z[4], ~z[0]}), .y(o[0]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai2 (.x({ z[2], ~z[5], ~z[3], ~z[4]}), .y(o[1]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai3 (.x({ z[0],  z[4],  z[5], ~z[1]}), .y(o[2]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai4 (.x({ z[3], ~z[4], ~z[2], ~z[5]}), .y(o[3]));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai0 (.x(o), .y(y));

endmodule
