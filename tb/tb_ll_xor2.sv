// tb_ll_xor2: XOR and XNOR in the library form and in both NAND and NOR
// sub-circuit forms, over all four input combinations.
module tb_ll_xor2;
  import ll_pkg::*;

  int checks = 0, failures = 0;
  logic x0, x1;
  logic [7:0] y;  // index = {xnor, form, impl}

  for (genvar k = 0; k < 8; k++) begin : g_var
    ll_xor2 #(.XNOR(k[2]), .FORM(gate_e'(k[1])), .IMPL(impl_e'(k[0]))) u (.x0(x0), .x1(x1), .y(y[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic odd;
      {x0, x1} = 2'(v);
      odd = (v == 1) || (v == 2);
      #1;
      for (int k = 0; k < 8; k++) begin
        logic exp;
        exp = (k >= 4) ? !odd : odd;
        checks++;
        if (y[k] !== exp) begin
          failures++; $display("FAIL variant %0d x=%0d got %b", k, v, y[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
