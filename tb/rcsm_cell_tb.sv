// rcsm_cell_tb: exhaustive check of the one-bit controlled subtract
// multiplexer. The borrow out must be that of x - y - bin whatever u is, and
// r must be the difference bit when u = 1 and x when u = 0.
module rcsm_cell_tb;
  logic x, y, bin, u, bout, r;
  int checks = 0, failures = 0;

  rcsm_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int d;
      logic exp_b, exp_r;
      {x, y, bin, u} = 4'(v);
      #1;
      d = int'(x) - int'(y) - int'(bin);
      exp_b = (d < 0);
      exp_r = u ? d[0] : x;
      checks++;
      if (bout !== exp_b || r !== exp_r) begin
        failures++;
        $display("FAIL x=%b y=%b bin=%b u=%b -> bout=%b (exp %b) r=%b (exp %b)",
                 x, y, bin, u, bout, exp_b, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
