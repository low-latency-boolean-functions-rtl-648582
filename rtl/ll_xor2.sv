// ll_xor2: 2-input XOR or XNOR, as a library gate or as a depth-2
// sub-circuit of 2-input NAND or NOR gates with input inverters.
//
// XNOR = 0 gives x0 ^ x1, XNOR = 1 gives ~(x0 ^ x1). With IMPL_NAND_NOR the
// function is built from three 2-input gates of the type FORM:
//   XOR,  NAND form: NAND(NAND(x0,~x1), NAND(~x0,x1))
//   XOR,  NOR form:  NOR(NOR(x0,x1),    NOR(~x0,~x1))
//   XNOR, NAND form: NAND(NAND(x0,x1),  NAND(~x0,~x1))
//   XNOR, NOR form:  NOR(NOR(x0,~x1),   NOR(~x0,x1))
// so each path crosses two NAND/NOR gates: XOR has latency complexity 2,
// while a library XOR2 is more than twice as slow as a NAND2. With
// IMPL_LIBRARY the function is one XOR/XNOR expression.
//
// Purely combinational. The four sub-circuits are the published ones; the
// parameters that select among them are this design's own.
module ll_xor2
  import ll_pkg::*;
#(
  parameter logic  XNOR = 1'b0,
  parameter gate_e FORM = G_NAND,
  parameter impl_e IMPL = IMPL_NAND_NOR
) (
  input  logic x0,
  input  logic x1,
  output logic y
);

  logic n0, n1;  // level-0 inverters
  assign n0 = ~x0;
  assign n1 = ~x1;

  always_comb begin
    if (IMPL == IMPL_LIBRARY) begin
      y = XNOR ? ~(x0 ^ x1) : (x0 ^ x1);
    end else if (FORM == G_NAND) begin
      if (XNOR) y = ~(~(x0 & x1) & ~(n0 & n1));
      else      y = ~(~(x0 & n1) & ~(n0 & x1));
    end else begin
      if (XNOR) y = ~(~(x0 | n1) | ~(n0 | x1));
      else      y = ~(~(x0 | x1) | ~(n0 | n1));
    end
  end

endmodule
