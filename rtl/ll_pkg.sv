// ll_pkg: shared types and constants of the low-latency S-box library.
//
// Gate types of the NAND/NOR tree (a NAND is coded 0, a NOR 1), the
// compound cells that the optimised circuits use, the realisation styles of
// the 6-bit S-box, and the constants that fix the tree circuits of the two
// representative coordinate functions f0 and f1 and the wiring that turns
// them into the six output bits of the S-box.
//
// Bit order follows the usual convention of the S-box tables: in an n-bit
// vector declared [0:n-1], element 0 (x0) is the most significant bit of
// the integer value, so a vector read as a number is the table index.
//
// The leaf order of the f0/f1 trees is the one printed in the published
// circuit drawings; the gate types follow the text that derives the
// optimised circuits (levels 1 and 2 NOR, except the first level-1 gate of
// f1, which is a NAND; levels 3 and 4 NAND). The inverter masks were solved
// so that each tree computes its function; for f0 two masks do, and the one
// that inverts leaves 3,5,6,7,11,13,14,15 is used. The coordinate wiring
// (which representative, which input permutation and which input
// inversions) was likewise solved from the S-box table; of the 16 (f0) and
// 4 (f1) wirings that realise each coordinate, the first in lexicographic
// order of the permutation is used.
package ll_pkg;

  // Gate type of a level-1..d gate in the tree.
  typedef enum logic {
    G_NAND = 1'b0,
    G_NOR  = 1'b1
  } gate_e;

  // Compound cells with fan-in 3 or 4.
  typedef enum logic [2:0] {
    C_NAND3 = 3'd0,
    C_NOR3  = 3'd1,
    C_AOI21 = 3'd2,
    C_OAI21 = 3'd3,
    C_NAND4 = 3'd4,
    C_NOR4  = 3'd5,
    C_AOI22 = 3'd6,
    C_OAI22 = 3'd7
  } cell_e;

  // How a compound cell or XOR is built: as one library gate, or as its
  // equivalent sub-circuit of 2-input NAND/NOR gates and inverters.
  typedef enum logic {
    IMPL_LIBRARY  = 1'b0,
    IMPL_NAND_NOR = 1'b1
  } impl_e;

  // Realisation of one representative coordinate function.
  typedef enum logic [1:0] {
    STYLE_TREE = 2'd0,  // plain depth-4 NAND/NOR trees
    STYLE_OAI  = 2'd1,  // OAI22/AOI21 optimised circuits
    STYLE_XOR  = 2'd2   // as STYLE_OAI, but f0 uses two OAI22 and an XOR
  } style_e;

  localparam int unsigned SBOX_N = 6;
  localparam int unsigned TREE_D = 4;
  localparam int unsigned TREE_LEAVES = 16;  // 2**TREE_D
  localparam int unsigned TREE_GATES  = 15;  // 2**TREE_D - 1

  // Gate vector G = (g1,0 .. g1,7, g2,0 .. g2,3, g3,0, g3,1, g4,0); bit k is
  // the k-th gate in that order.
  localparam logic [TREE_GATES-1:0] F0_G = 15'b000_1111_11111111;
  localparam logic [TREE_GATES-1:0] F1_G = 15'b000_1111_11111110;

  // Inverter mask alpha: bit i set means leaf a_i enters inverted.
  localparam logic [TREE_LEAVES-1:0] F0_ALPHA = 16'b1110_1000_1110_1000;
  localparam logic [TREE_LEAVES-1:0] F1_ALPHA = 16'b1100_0000_1111_1100;

  // Leaf selection pi: leaf a_i = x_pi[i]. A tree's leaf map is passed as a
  // packed vector with PI_W bits per leaf, leaf i in bits [PI_W*i +: PI_W].
  localparam int unsigned PI_W = 8;
  typedef int unsigned leaf_map_t [TREE_LEAVES];

  function automatic logic [PI_W*TREE_LEAVES-1:0] pack_leaves(input leaf_map_t m);
    logic [PI_W*TREE_LEAVES-1:0] v = '0;
    for (int unsigned i = 0; i < TREE_LEAVES; i++) v[PI_W*i +: PI_W] = PI_W'(m[i]);
    return v;
  endfunction

  localparam logic [PI_W*TREE_LEAVES-1:0] F0_PI =
    pack_leaves('{1, 5, 4, 0, 2, 5, 3, 4, 0, 4, 5, 1, 3, 4, 2, 5});
  localparam logic [PI_W*TREE_LEAVES-1:0] F1_PI =
    pack_leaves('{2, 3, 0, 5, 1, 4, 0, 1, 1, 5, 0, 1, 0, 4, 2, 3});

  // Wiring of output bit y_i: y_i = f_k(z) with z_j = x_perm[j] ^ inv[j].
  typedef int unsigned perm_t [SBOX_N];
  typedef struct packed {
    logic              rep;   // 0: f0, 1: f1
    logic [0:SBOX_N-1] inv;   // input inversions, element j for z_j
  } coord_cfg_t;

  localparam coord_cfg_t COORD_CFG [SBOX_N] = '{
    '{rep: 1'b1, inv: 6'b000100},  // y0
    '{rep: 1'b0, inv: 6'b000000},  // y1
    '{rep: 1'b0, inv: 6'b000010},  // y2
    '{rep: 1'b0, inv: 6'b000000},  // y3
    '{rep: 1'b1, inv: 6'b001000},  // y4
    '{rep: 1'b0, inv: 6'b000001}   // y5
  };

  localparam perm_t COORD_PERM [SBOX_N] = '{
    '{2, 3, 0, 5, 4, 1},  // y0
    '{0, 1, 3, 5, 2, 4},  // y1
    '{0, 1, 4, 2, 5, 3},  // y2
    '{0, 3, 4, 5, 1, 2},  // y3
    '{2, 3, 1, 4, 5, 0},  // y4
    '{1, 2, 5, 4, 0, 3}   // y5
  };

endpackage
