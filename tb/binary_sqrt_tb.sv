// binary_sqrt_tb: end-to-end test of the square rooter at its default size
// (8-bit radicand, 4-bit root).
//
// 1. The two worked examples of the design: 1101.0000 (13) must give 11.10
//    and 0010.0011 (2.1875) must give 01.01.
// 2. Every one of the 256 radicands: u must equal floor(sqrt(p)), found here
//    by searching for the largest u with u*u <= p, and r must equal p - u*u.
// For each row the test counts how often the trial subtraction succeeded
// (root bit 1, difference passed on) and failed (root bit 0, input restored);
// each of the eight mechanisms must occur at least once.
module binary_sqrt_tb;
  localparam int N = 8;
  localparam int H = N / 2;

  logic [N-1:0] p;
  logic [H-1:0] u;
  logic [H:0]   r;
  int checks = 0, failures = 0;
  int kept [H];
  int restored [H];

  binary_sqrt dut (.p(p), .u(u), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_root(logic [N-1:0] radicand, logic [H-1:0] exp_u, string what);
    p = radicand;
    #1;
    checks++;
    if (u !== exp_u) begin
      failures++;
      $display("FAIL %s: p=%b -> u=%b, expected %b", what, radicand, u, exp_u);
    end else
      $display("%s: %b.%b -> %b.%b", what, radicand[7:4], radicand[3:0], u[3:2], u[1:0]);
  endtask

  initial begin
    foreach (kept[k]) begin kept[k] = 0; restored[k] = 0; end

    expect_root(8'b1101_0000, 4'b11_10, "sqrt(13)");
    expect_root(8'b0010_0011, 4'b01_01, "sqrt(2.2)");

    for (int v = 0; v < (1 << N); v++) begin
      int eu, er;
      p = N'(v);
      #1;
      eu = 0;
      while ((eu + 1) * (eu + 1) <= v) eu++;
      er = v - eu * eu;
      checks++;
      if (int'(u) != eu || int'(r) != er) begin
        failures++;
        $display("FAIL p=%0d -> u=%0d r=%0d, expected u=%0d r=%0d", v, u, r, eu, er);
      end
      for (int k = 0; k < H; k++) begin
        if (u[H-1-k]) kept[k]++;
        else          restored[k]++;
      end
    end

    for (int k = 0; k < H; k++) begin
      $display("row %0d: difference kept %0d times, input restored %0d times", k, kept[k], restored[k]);
      checks++;
      if (kept[k] == 0 || restored[k] == 0) begin
        failures++;
        $display("FAIL row %0d never showed one of its two outcomes", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
