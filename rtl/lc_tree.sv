// lc_tree: general structure for a Boolean function of latency complexity D.
//
// Any n-bit Boolean function whose latency complexity (the depth of its
// best circuit, counting only 2-input NAND and NOR gates) is D can be built
// as a full binary tree of D levels of 2-input NAND/NOR gates. Each of the
// 2**D leaves a_i is one input bit x_PI[i], taken either straight (through a
// buffer) or through an inverter, as bit i of ALPHA says; inverters appear
// only at this level 0, and every gate output feeds exactly one gate of the
// next level. PI holds the leaf map packed, PI_W bits per leaf with leaf
// i in bits [PI_W*i +: PI_W]. Gate g_l,j (level l = 1..D, position j) takes the outputs of
// g_l-1,2j and g_l-1,2j+1 (the leaves a_2j and a_2j+1 for l = 1) and is a
// NAND when its bit of G is 0, a NOR when it is 1. G lists the gates level
// by level: g1,0 .. g1,2**(D-1)-1, g2,0, ..., gD,0.
//
// Interface: x[0:N-1] in, y out. Purely combinational; the path from any
// input to y crosses exactly D NAND/NOR gates plus one buffer or inverter.
//
// The structure, the G/ALPHA/PI description and the gate coding are those
// of the general low-latency structure; the defaults are the depth-4 tree
// of the representative coordinate function f0 of the 6-bit S-box.
module lc_tree
  import ll_pkg::*;
#(
  parameter int unsigned N = 6,
  parameter int unsigned D = 4,
  parameter logic [2**D-2:0] G = F0_G,
  parameter logic [2**D-1:0] ALPHA = F0_ALPHA,
  parameter logic [PI_W*2**D-1:0] PI = F0_PI
) (
  input  logic [0:N-1] x,
  output logic         y
);

  localparam int unsigned LEAVES = 2**D;
  localparam int unsigned NODES  = 2**(D+1) - 1;

  // node[0 .. LEAVES-1]: leaves; node[LEAVES + k]: output of gate k of G.
  logic [NODES-1:0] node;

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (ALPHA[i]) begin : g_inv
      assign node[i] = ~x[PI[PI_W*i +: PI_W]];
    end else begin : g_buf
      assign node[i] = x[PI[PI_W*i +: PI_W]];
    end
  end

  for (genvar l = 1; l <= D; l++) begin : g_level
    localparam int unsigned GBASE = LEAVES - 2**(D-l+1);      // first gate index of level l
    localparam int unsigned PBASE = 2*LEAVES - 2**(D-l+2);    // first node of level l-1
    for (genvar j = 0; j < 2**(D-l); j++) begin : g_gate
      localparam int unsigned K = GBASE + j;
      if (G[K] == G_NOR) begin : g_nor
        assign node[LEAVES+K] = ~(node[PBASE+2*j] | node[PBASE+2*j+1]);
      end else begin : g_nand
        assign node[LEAVES+K] = ~(node[PBASE+2*j] & node[PBASE+2*j+1]);
      end
    end
  end

  assign y = node[NODES-1];

endmodule
