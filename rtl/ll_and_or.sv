// ll_and_or: y = x0 & (x1 | x2) with latency complexity 2, in either of its
// two minimum-depth structures.
//
//   FORM 0:  y = NOR(~x0, NOR(x1, x2))          unbalanced: the x0 branch
//            has no gate before the output gate, and ~x0 is used once
//   FORM 1:  y = NAND(NAND(x0, x1), NAND(x0, x2))  balanced, but x0 drives
//            two gates
// Both have two NAND/NOR gates on their longest path, yet FORM 0 is the
// faster one in practice: its x0 path is one gate shorter and the x0
// input sees a single load instead of two. When several minimum-depth
// structures exist, one with an unbalanced, shorter branch is preferred.
//
// Interface: x0, x1, x2 in, y out; purely combinational. Both structures
// are the published ones; the FORM parameter and its default (the faster
// structure) are this design's own.
module ll_and_or #(
  parameter int unsigned FORM = 0  // 0: NOR structure, 1: NAND structure
) (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  output logic y
);

  logic nx0;  // level-0 inverter
  assign nx0 = ~x0;

  always_comb begin
    if (FORM == 0) begin
      y = ~(nx0 | ~(x1 | x2));
    end else begin
      y = ~(~(x0 & x1) & ~(x0 & x2));
    end
  end

endmodule
