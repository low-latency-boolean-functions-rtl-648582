// f0_xor: circuit of the representative coordinate function f0 with an
// XOR at the output,
//   f0 = (z0&~z4 ^ z3&z4) ^ (z1&~z5 ^ z2&z5).
//
// Each bracket is a 2:1 multiplexer (z4 picks z3 or z0, z5 picks z2 or
// z1), and the complement of a multiplexer is one OAI22 cell:
//   OAI22_1 = OAI22(z0, z4, z3, ~z4) = ~(z4 ? z3 : z0)
//   OAI22_2 = OAI22(z1, z5, z2, ~z5) = ~(z5 ? z2 : z1)
//   y       = OAI22_1 ^ OAI22_2
// This needs far less area than the full tree and has fewer loads on the
// input buffers and inverters, at the price of an XOR on the output path.
//
// Interface: z[0:5] in (z0 first), y out. Purely combinational. With
// IMPL_NAND_NOR the XOR is the depth-2 NAND sub-circuit and the OAI22 cells
// are depth-2 NAND sub-circuits, four NAND/NOR levels in all. The leaf
// order and the OAI22-plus-XOR shape follow the published circuit; the
// inversions were solved so the circuit computes f0.
module f0_xor
  import ll_pkg::*;
#(
  parameter impl_e IMPL = IMPL_LIBRARY
) (
  input  logic [0:5] z,
  output logic       y
);

  logic o1, o2;

  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai1 (.x({z[0], z[4], z[3], ~z[4]}), .y(o1));
  ll_compound_gate #(.CELL(C_OAI22), .IMPL(IMPL)) u_oai2 (.x({z[1], z[5], z[2], ~z[5]}), .y(o2));
  ll_xor2 #(.XNOR(1'b0), .FORM(G_NAND), .IMPL(IMPL)) u_xor (.x0(o1), .x1(o2), .y(y));

endmodule
