// tb_ll_compound_gate: every compound cell, in both realisations, against
// its Boolean function over all 16 input combinations. The references are
// the cell definitions written as sums of products, independent of the
// RTL's expressions.
module tb_ll_compound_gate;
  import ll_pkg::*;

  int checks = 0, failures = 0;
  logic [0:3] x;
  logic [7:0] y_lib, y_nn;  // index = cell code

  for (genvar c = 0; c < 8; c++) begin : g_cell
    ll_compound_gate #(.CELL(cell_e'(c)), .IMPL(IMPL_LIBRARY))  u_lib (.x(x), .y(y_lib[c]));
    ll_compound_gate #(.CELL(cell_e'(c)), .IMPL(IMPL_NAND_NOR)) u_nn  (.x(x), .y(y_nn[c]));
  end

  function automatic logic ref_cell(input int c, input logic [0:3] v);
    logic a = v[0], b = v[1], d = v[2], e = v[3];
    case (c)
      0: return !(a && b && d);             // NAND3
      1: return !a && !b && !d;             // NOR3
      2: return !(a && b) && !d;            // AOI21
      3: return (!a && !b) || !d;           // OAI21
      4: return !a || !b || !d || !e;       // NAND4
      5: return !(a || b || d || e);        // NOR4
      6: return !(a && b) && !(d && e);     // AOI22
      default: return (!a && !b) || (!d && !e);  // OAI22
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int c = 0; c < 8; c++) begin
        // 3-input cells must not depend on x3: compare with x3 cleared
        logic [0:3] vv;
        vv = (c < 4) ? {x[0:2], 1'b0} : x;
        checks += 2;
        if (y_lib[c] !== ref_cell(c, vv)) begin
          failures++; $display("FAIL library cell %0d x=%b got %b", c, x, y_lib[c]);
        end
        if (y_nn[c] !== ref_cell(c, vv)) begin
          failures++; $display("FAIL nand/nor cell %0d x=%b got %b", c, x, y_nn[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
