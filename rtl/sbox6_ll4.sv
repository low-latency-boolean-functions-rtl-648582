// sbox6_ll4: 6-bit bijective S-box of latency complexity 4, linearity 16
// and differential uniformity 4, built structurally.
//
// As a table (input 0..63, x0 the most significant bit):
//   00 01 02 03 04 06 3e 3c 08 11 0e 17 2b 33 35 2d 19 1c 09 0c 15 13 3d 3b
//   31 2c 25 38 3a 26 36 2a 34 1d 37 1e 30 1a 0b 21 2e 1f 29 18 0f 3f 10 20
//   28 05 39 14 24 0a 0d 23 12 27 07 32 1b 2f 16 22
// Every output bit y_i is, up to a permutation and inversion of its inputs,
// one of two representative functions:
//   f0(z) = z0&~z4 ^ z1&~z5 ^ z2&z5 ^ z3&z4          (y1, y2, y3, y5)
//   f1(z) = ~z0&z1&z4 ^ z0&~z1&z5 ^ z0&z1 ^ z2&z3    (y0, y4)
// so the S-box is six copies of two small circuits. Coordinate i forms
// z_j = x_COORD_PERM[i][j] ^ COORD_CFG[i].inv[j] by wiring and level-0
// inverters, and feeds z to the circuit of its representative. The
// circuits come in three styles (STYLE):
//   STYLE_TREE  depth-4 NAND/NOR trees (lc_tree) for both f0 and f1;
//   STYLE_OAI   the OAI22/AOI21 circuits f0_oai and f1_oai;
//   STYLE_XOR   f0_xor for f0 and f1_oai for f1.
// IMPL picks library compound cells or their NAND/NOR sub-circuits inside
// the OAI and XOR styles.
//
// Interface: x[0:5] in, y[0:5] out, x0/y0 most significant. Purely
// combinational, no clock: every input-to-output path crosses four
// NAND/NOR levels in the tree style.
//
// The table, the two representatives and the circuit shapes are the
// published ones. The wiring of each coordinate was solved from the table
// (see ll_pkg); the style and cell parameters and their defaults are this
// design's own choice.
module sbox6_ll4
  import ll_pkg::*;
#(
  parameter style_e STYLE = STYLE_OAI,
  parameter impl_e  IMPL  = IMPL_LIBRARY
) (
  input  logic [0:SBOX_N-1] x,
  output logic [0:SBOX_N-1] y
);

  for (genvar i = 0; i < SBOX_N; i++) begin : g_coord
    logic [0:SBOX_N-1] z;

    for (genvar j = 0; j < SBOX_N; j++) begin : g_in
      assign z[j] = x[COORD_PERM[i][j]] ^ COORD_CFG[i].inv[j];
    end

    if (COORD_CFG[i].rep == 1'b0) begin : g_f0
      if (STYLE == STYLE_TREE) begin : g_tree
        lc_tree #(.N(SBOX_N), .D(TREE_D), .G(F0_G), .ALPHA(F0_ALPHA), .PI(F0_PI))
          u_f (.x(z), .y(y[i]));
      end else if (STYLE == STYLE_XOR) begin : g_xor
        f0_xor #(.IMPL(IMPL)) u_f (.z(z), .y(y[i]));
      end else begin : g_oai
        f0_oai #(.IMPL(IMPL)) u_f (.z(z), .y(y[i]));
      end
    end else begin : g_f1
      if (STYLE == STYLE_TREE) begin : g_tree
        lc_tree #(.N(SBOX_N), .D(TREE_D), .G(F1_G), .ALPHA(F1_ALPHA), .PI(F1_PI))
          u_f (.x(z), .y(y[i]));
      end else begin : g_oai
        f1_oai #(.IMPL(IMPL)) u_f (.z(z), .y(y[i]));
      end
    end
  end

endmodule
