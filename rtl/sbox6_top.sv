// sbox6_top: the low-latency 6-bit S-box in all of its circuit styles, side
// by side, together with the low-latency 2:1 multiplexer.
//
// One input x[0:5] drives three copies of the S-box: y_tree from the plain
// depth-4 NAND/NOR trees, y_oai from the OAI22/AOI21 optimised circuits
// (library cells), y_xor from the circuit whose f0 part ends in an XOR,
// here with every compound cell and the XOR built as NAND/NOR
// sub-circuits. All three compute the same permutation; they differ only
// in gate structure, which is what decides delay and area after synthesis.
// The multiplexer (mux_sel, mux_a, mux_b -> mux_y; mux_a passes when
// mux_sel is 1) and the AND-OR function ao_y = ao_x0 & (ao_x1 | ao_x2), in
// its faster minimum-depth structure, are small examples of the same
// technique and stand apart from the S-box.
//
// Purely combinational, no clock or reset. Placing the styles side by side
// is this design's own arrangement for comparing them; a user who needs one
// S-box instantiates sbox6_ll4 directly.
module sbox6_top
  import ll_pkg::*;
(
  input  logic [0:SBOX_N-1] x,
  output logic [0:SBOX_N-1] y_tree,
  output logic [0:SBOX_N-1] y_oai,
  output logic [0:SBOX_N-1] y_xor,
  input  logic              mux_sel,
  input  logic              mux_a,
  input  logic              mux_b,
  output logic              mux_y,
  input  logic              ao_x0,
  input  logic              ao_x1,
  input  logic              ao_x2,
  output logic              ao_y
);

  sbox6_ll4 #(.STYLE(STYLE_TREE), .IMPL(IMPL_NAND_NOR)) u_sbox_tree (.x(x), .y(y_tree));
  sbox6_ll4 #(.STYLE(STYLE_OAI),  .IMPL(IMPL_LIBRARY))  u_sbox_oai  (.x(x), .y(y_oai));
  sbox6_ll4 #(.STYLE(STYLE_XOR),  .IMPL(IMPL_NAND_NOR)) u_sbox_xor  (.x(x), .y(y_xor));

  ll_mux2 #(.FORM(2)) u_mux (.x0(mux_sel), .x1(mux_a), .x2(mux_b), .y(mux_y));

  ll_and_or #(.FORM(0)) u_and_or (.x0(ao_x0), .x1(ao_x1), .x2(ao_x2), .y(ao_y));

endmodule
