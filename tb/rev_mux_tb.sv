// rev_mux_tb: exhaustive check of the reversible 2:1 multiplexer.
// q must equal b when s = 1 and a when s = 0, p must copy s, r must carry the
// other data input, and the eight output words must be distinct.
module rev_mux_tb;
  logic s, a, b, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  rev_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic exp_q, exp_r;
      {s, a, b} = 3'(v);
      #1;
      if (s) begin exp_q = b; exp_r = a; end
      else   begin exp_q = a; exp_r = b; end
      checks++;
      if (p !== s || q !== exp_q || r !== exp_r) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b -> p=%b q=%b r=%b", s, a, b, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not a bijection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
