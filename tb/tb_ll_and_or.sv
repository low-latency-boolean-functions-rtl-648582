// tb_ll_and_or: both structures of x0 & (x1 | x2) over all eight inputs,
// against the truth table of the function.
module tb_ll_and_or;
  int checks = 0, failures = 0;
  logic x0, x1, x2;
  logic [1:0] y;

  for (genvar f = 0; f < 2; f++) begin : g_form
    ll_and_or #(.FORM(f)) u (.x0(x0), .x1(x1), .x2(x2), .y(y[f]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {x0, x1, x2} = 3'(v);
      // true for (x0,x1,x2) = 101, 110, 111
      exp = (v == 5) || (v == 6) || (v == 7);
      #1;
      for (int f = 0; f < 2; f++) begin
        checks++;
        if (y[f] !== exp) begin
          failures++; $display("FAIL form %0d x=%03b got %b", f, v, y[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
