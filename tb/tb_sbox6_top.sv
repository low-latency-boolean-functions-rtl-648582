// tb_sbox6_top: end-to-end test of the top level at its default (and only)
// configuration. All 64 S-box inputs are applied, together with every
// multiplexer input combination and every AND-OR input combination. Each
// of the three S-box outputs is compared with the lookup table and with
// the other two, and the two small examples with their functions. It
// counts how often each mechanism of the design was exercised: each
// circuit style producing a checked result, the f0 and f1 output bits
// toggling, the multiplexer selecting each data input, and the AND-OR
// output taking both values; a mechanism never exercised counts as a
// failure. Finally, linearity 16 and uniformity 4 are recomputed from the
// outputs of the tree style. Outputs are combinational and are checked
// 1 ns after each input change.
module tb_sbox6_top;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [0:5] x, y_tree, y_oai, y_xor;
  logic mux_sel, mux_a, mux_b, mux_y;
  logic ao_x0, ao_x1, ao_x2, ao_y;

  sbox6_top dut (
    .x(x), .y_tree(y_tree), .y_oai(y_oai), .y_xor(y_xor),
    .mux_sel(mux_sel), .mux_a(mux_a), .mux_b(mux_b), .mux_y(mux_y),
    .ao_x0(ao_x0), .ao_x1(ao_x1), .ao_x2(ao_x2), .ao_y(ao_y)
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    int unsigned tree_out [64];
    int n_tree = 0, n_oai = 0, n_xor = 0, n_mux_a = 0, n_mux_b = 0;
    int n_f0_toggle = 0, n_f1_toggle = 0, n_ao_true = 0, n_ao_false = 0;
    logic [0:5] prev = '0;
    for (int unsigned v = 0; v < 64; v++) begin
      logic exp_mux;
      x = 6'(v);
      {mux_sel, mux_a, mux_b} = 3'(v % 8);
      {ao_x0, ao_x1, ao_x2} = 3'(v / 8);
      #1;
      check($sformatf("tree x=%02h", v), int'(y_tree), int'(SBOX_TABLE[v]));
      check($sformatf("oai  x=%02h", v), int'(y_oai),  int'(SBOX_TABLE[v]));
      check($sformatf("xor  x=%02h", v), int'(y_xor),  int'(SBOX_TABLE[v]));
      check($sformatf("styles agree x=%02h", v), int'(y_tree ^ y_oai | y_tree ^ y_xor), 0);
      if (y_tree == 6'(SBOX_TABLE[v])) n_tree++;
      if (y_oai  == 6'(SBOX_TABLE[v])) n_oai++;
      if (y_xor  == 6'(SBOX_TABLE[v])) n_xor++;
      // y0 and y4 come from f1, the others from f0
      if (v > 0 && (y_tree[0] != prev[0] || y_tree[4] != prev[4])) n_f1_toggle++;
      if (v > 0 && (y_tree[1] != prev[1] || y_tree[2] != prev[2] ||
                    y_tree[3] != prev[3] || y_tree[5] != prev[5])) n_f0_toggle++;
      prev = y_tree;
      tree_out[v] = int'(y_tree);
      exp_mux = mux_sel ? mux_a : mux_b;
      check($sformatf("mux %03b", v % 8), int'(mux_y), int'(exp_mux));
      if (mux_sel) n_mux_a++; else n_mux_b++;
      // x0 & (x1 | x2) is true for (x0,x1,x2) = 101, 110, 111
      check($sformatf("and-or %03b", v / 8), int'(ao_y), int'(v / 8 >= 5));
      if (ao_y) n_ao_true++; else n_ao_false++;
    end
    check("linearity", linearity(tree_out), 16);
    check("uniformity", int'(uniformity(tree_out)), 4);
    $display("mechanisms: tree=%0d oai=%0d xor=%0d f0_toggles=%0d f1_toggles=%0d mux_a=%0d mux_b=%0d and_or_1=%0d and_or_0=%0d",
             n_tree, n_oai, n_xor, n_f0_toggle, n_f1_toggle, n_mux_a, n_mux_b, n_ao_true, n_ao_false);
    if (n_tree == 0 || n_oai == 0 || n_xor == 0 || n_f0_toggle == 0 || n_f1_toggle == 0 ||
        n_mux_a == 0 || n_mux_b == 0 || n_ao_true == 0 || n_ao_false == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
