// tb_ll_mux2: the three multiplexer realisations over all eight input
// combinations; the select x0 must pass x1 when high and x2 when low.
module tb_ll_mux2;
  int checks = 0, failures = 0;
  logic x0, x1, x2;
  logic [2:0] y;

  for (genvar f = 0; f < 3; f++) begin : g_form
    ll_mux2 #(.FORM(f)) u (.x0(x0), .x1(x1), .x2(x2), .y(y[f]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel_hi = 0, sel_lo = 0;
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {x0, x1, x2} = 3'(v);
      // truth table of (x0 AND x1) OR (NOT x0 AND x2), listed by index
      exp = 1'(8'b0101_0011 >> (7 - v));
      if (x0) sel_hi++; else sel_lo++;
      #1;
      for (int f = 0; f < 3; f++) begin
        checks++;
        if (y[f] !== exp) begin
          failures++; $display("FAIL form %0d x=%03b got %b", f, v, y[f]);
        end
      end
    end
    if (sel_hi == 0 || sel_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
