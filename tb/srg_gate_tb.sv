// srg_gate_tb: exhaustive check of the Saimur Rahman Gate.
//
// All 16 input combinations are applied. For w4 = 0 the borrow and difference
// are compared with the full-subtractor truth table (w1 - w2 - w3, computed
// arithmetically here); for every combination the garbage outputs and the
// w4 = 1 difference are compared with their XOR definitions. The 16 output
// words must also be distinct, i.e. the gate must be reversible.
module srg_gate_tb;
  logic w1, w2, w3, w4, w5, w6, w7, w8;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  srg_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      int d;
      logic exp_b, exp_d;
      {w1, w2, w3, w4} = 4'(v);
      #1;
      d = int'(w1) - int'(w2) - int'(w3);
      exp_b = (d < 0);
      exp_d = d[0] ^ w4;
      checks++;
      if (w7 !== exp_b || w8 !== exp_d) begin
        failures++;
        $display("FAIL in=%b%b%b%b borrow=%b exp %b diff=%b exp %b", w1, w2, w3, w4, w7, exp_b, w8, exp_d);
      end
      checks++;
      if (w5 !== (w1 ^ w3) || w6 !== (w1 ^ w2)) begin
        failures++;
        $display("FAIL garbage in=%b%b%b%b w5=%b w6=%b", w1, w2, w3, w4, w5, w6);
      end
      seen[{w5, w6, w7, w8}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL gate is not a bijection: outputs seen %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
