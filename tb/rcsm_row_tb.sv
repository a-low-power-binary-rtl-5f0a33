// rcsm_row_tb: checks rows 0, 1 and 2 of the square-root array exhaustively
// over all inputs that can occur in the array (a remainder no larger than
// twice the root found so far), plus row 3 on random such inputs.
//
// Reference: with m = {rem_in, pair} and t = {root_in, 2'b01}, the row must
// give u = (m >= t) and rem_out = u ? m - t : m. Both outcomes of the trial
// subtraction (difference kept, input restored) are counted per row, and a
// row that never shows one of them counts as a failure.
module rcsm_row_tb;
  int checks = 0, failures = 0;

  logic [0:0] rem0;  logic [1:0] pair0;  logic [0:0] root0;  logic u0;  logic [1:0] out0;
  logic [1:0] rem1;  logic [1:0] pair1;  logic [0:0] root1;  logic u1;  logic [2:0] out1;
  logic [2:0] rem2;  logic [1:0] pair2;  logic [1:0] root2;  logic u2;  logic [3:0] out2;
  logic [3:0] rem3;  logic [1:0] pair3;  logic [2:0] root3;  logic u3;  logic [4:0] out3;

  rcsm_row #(.K(0)) dut0 (.rem_in(rem0), .pair(pair0), .root_in(root0), .u(u0), .rem_out(out0));
  rcsm_row #(.K(1)) dut1 (.rem_in(rem1), .pair(pair1), .root_in(root1), .u(u1), .rem_out(out1));
  rcsm_row #(.K(2)) dut2 (.rem_in(rem2), .pair(pair2), .root_in(root2), .u(u2), .rem_out(out2));
  rcsm_row #(.K(3)) dut3 (.rem_in(rem3), .pair(pair3), .root_in(root3), .u(u3), .rem_out(out3));

  int kept [4];
  int restored [4];

  task automatic compare(int k, int rem, int pair, int root, logic got_u, int got_rem);
    int m, t;
    logic eu;
    int er;
    m = rem * 4 + pair;
    t = (k == 0) ? 1 : root * 4 + 1;
    eu = (m >= t);
    er = eu ? m - t : m;
    checks++;
    if (got_u !== eu || got_rem != er) begin
      failures++;
      $display("FAIL row %0d rem=%0d pair=%0d root=%0d -> u=%b rem=%0d (exp u=%b rem=%0d)",
               k, rem, pair, root, got_u, got_rem, eu, er);
    end
    if (eu) kept[k]++;
    else    restored[k]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (kept[k]) begin kept[k] = 0; restored[k] = 0; end
    rem0 = '0; root0 = '0;
    rem1 = '0; pair1 = '0; root1 = '0;
    rem2 = '0; pair2 = '0; root2 = '0;
    rem3 = '0; pair3 = '0; root3 = '0;

    // Row 0: no remainder, no root yet.
    for (int pr = 0; pr < 4; pr++) begin
      pair0 = 2'(pr);
      #1;
      compare(0, 0, pr, 0, u0, int'(out0));
    end

    // Row 1: one root bit, remainder <= 2*root.
    for (int rt = 0; rt < 2; rt++)
      for (int rm = 0; rm <= 2 * rt; rm++)
        for (int pr = 0; pr < 4; pr++) begin
          root1 = 1'(rt); rem1 = 2'(rm); pair1 = 2'(pr);
          #1;
          compare(1, rm, pr, rt, u1, int'(out1));
        end

    // Row 2: two root bits.
    for (int rt = 0; rt < 4; rt++)
      for (int rm = 0; rm <= 2 * rt; rm++)
        for (int pr = 0; pr < 4; pr++) begin
          root2 = 2'(rt); rem2 = 3'(rm); pair2 = 2'(pr);
          #1;
          compare(2, rm, pr, rt, u2, int'(out2));
        end

    // Row 3: random legal inputs.
    for (int n = 0; n < 500; n++) begin
      int rt, rm, pr;
      rt = int'($urandom_range(7, 0));
      rm = int'($urandom_range(2 * rt, 0));
      pr = int'($urandom_range(3, 0));
      root3 = 3'(rt); rem3 = 4'(rm); pair3 = 2'(pr);
      #1;
      compare(3, rm, pr, rt, u3, int'(out3));
    end

    for (int k = 0; k < 4; k++) begin
      $display("row %0d: difference kept %0d times, input restored %0d times", k, kept[k], restored[k]);
      checks++;
      if (kept[k] == 0 || restored[k] == 0) begin
        failures++;
        $display("FAIL row %0d did not exercise both outcomes", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
