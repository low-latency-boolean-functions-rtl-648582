// tb_lc_tree: exhaustive check of the general NAND/NOR tree. Five trees are
// built: the depth-4 trees of f0 and f1 (compared with their algebraic
// normal forms), the depth-2 NAND tree of a 2:1 multiplexer, the depth-2
// NAND tree of XOR with inverted leaves, and a depth-1 NOR. Outputs are
// combinational and checked 1 ns after each input change.
module tb_lc_tree;
  import ll_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [0:5] x6;
  logic       y_f0, y_f1;
  logic [0:2] x3;
  logic       y_mux;
  logic [0:1] x2;
  logic       y_xor, y_nor;

  lc_tree dut_f0 (.x(x6), .y(y_f0));
  lc_tree #(.N(6), .D(4), .G(F1_G), .ALPHA(F1_ALPHA), .PI(F1_PI)) dut_f1 (.x(x6), .y(y_f1));
  // NAND(NAND(x0,x1), NAND(~x0,x2))
  lc_tree #(.N(3), .D(2), .G(3'b000), .ALPHA(4'b0100), .PI({8'd2, 8'd0, 8'd1, 8'd0})) dut_mux (.x(x3), .y(y_mux));
  // NAND(NAND(x0,~x1), NAND(~x0,x1))
  lc_tree #(.N(2), .D(2), .G(3'b000), .ALPHA(4'b0110), .PI({8'd1, 8'd0, 8'd1, 8'd0})) dut_xor (.x(x2), .y(y_xor));
  lc_tree #(.N(2), .D(1), .G(1'b1), .ALPHA(2'b00), .PI({8'd1, 8'd0})) dut_nor (.x(x2), .y(y_nor));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned v = 0; v < 64; v++) begin
      x6 = 6'(v);
      #1;
      check($sformatf("f0 tree x=%02h", v), y_f0, f0_ref(v));
      check($sformatf("f1 tree x=%02h", v), y_f1, f1_ref(v));
    end
    for (int unsigned v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      check($sformatf("mux tree x=%0d", v), y_mux, x3[0] ? x3[1] : x3[2]);
    end
    for (int unsigned v = 0; v < 4; v++) begin
      x2 = 2'(v);
      #1;
      check($sformatf("xor tree x=%0d", v), y_xor, x2[0] ^ x2[1]);
      check($sformatf("nor tree x=%0d", v), y_nor, !(x2[0] || x2[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
