// tb_f1_oai: the circuit, with library cells and with NAND/NOR sub-circuits,
// against the algebraic normal form of its function over all 64 inputs.
module tb_f1_oai;
  import ll_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [0:5] z;
  logic y_lib, y_nn;

  f1_oai #(.IMPL(IMPL_LIBRARY))  u_lib (.z(z), .y(y_lib));
  f1_oai #(.IMPL(IMPL_NAND_NOR)) u_nn  (.z(z), .y(y_nn));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    for (int unsigned v = 0; v < 64; v++) begin
      z = 6'(v);
      #1;
      checks += 2;
      if (y_lib !== f1_ref(v)) begin
        failures++; $display("FAIL library z=%02h got %b", v, y_lib);
      end
      if (y_nn !== f1_ref(v)) begin
        failures++; $display("FAIL nand/nor z=%02h got %b", v, y_nn);
      end
      ones += int'(y_lib);
    end
    // the function is balanced
    checks++;
    if (ones != 32) begin
      failures++; $display("FAIL weight %0d", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
