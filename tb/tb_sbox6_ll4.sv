// tb_sbox6_ll4: the S-box in every style and cell realisation against its
// lookup table over all 64 inputs. From the outputs of each instance it
// then checks that the map is a permutation and recomputes its linearity
// (must be 16) and differential uniformity (must be 4). The S-box is
// combinational: the result is checked 1 ns after the input changes,
// with no clock edge in between.
module tb_sbox6_ll4;
  import ll_pkg::*;
  import tb_ref_pkg::*;

  localparam int NV = 6;  // (style, impl) variants
  localparam style_e VSTYLE [NV] = '{STYLE_TREE, STYLE_TREE, STYLE_OAI, STYLE_OAI, STYLE_XOR, STYLE_XOR};
  localparam impl_e  VIMPL  [NV] = '{IMPL_LIBRARY, IMPL_NAND_NOR, IMPL_LIBRARY, IMPL_NAND_NOR,
                                     IMPL_LIBRARY, IMPL_NAND_NOR};

  int checks = 0, failures = 0;
  logic [0:5] x;
  logic [0:5] y [NV];
  logic [0:5] y_def;

  for (genvar k = 0; k < NV; k++) begin : g_var
    sbox6_ll4 #(.STYLE(VSTYLE[k]), .IMPL(VIMPL[k])) u (.x(x), .y(y[k]));
  end
  sbox6_ll4 u_def (.x(x), .y(y_def));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int unsigned table_out [NV][64];
    for (int unsigned v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      for (int k = 0; k < NV; k++) begin
        table_out[k][v] = int'(y[k]);
        check($sformatf("variant %0d x=%02h", k, v), int'(y[k]), int'(SBOX_TABLE[v]));
      end
      check($sformatf("default x=%02h", v), int'(y_def), int'(SBOX_TABLE[v]));
    end
    for (int k = 0; k < NV; k++) begin
      bit [63:0] seen = '0;
      for (int v = 0; v < 64; v++) seen[table_out[k][v]] = 1'b1;
      check($sformatf("variant %0d bijective", k), int'(seen == '1), 1);
      check($sformatf("variant %0d linearity", k), int'(linearity(table_out[k])), 16);
      check($sformatf("variant %0d uniformity", k), int'(uniformity(table_out[k])), 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
