// tb_stream_cipher_pkg -- checks the tap tables and the redundant-port
// search.  Expected values are worked out by hand from the strand
// equations: strand t1(k) is unbalanced exactly for 67 <= k <= 93; for
// t1(67) the ports x2..x5 (taps 93, 91, 92, 78) get redundant modules and x1
// (tap 66) does not; the whole 288-round circuit holds 90 + 60 + 135 = 285
// redundant modules.
module tb_stream_cipher_pkg;
  import stream_cipher_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Register bits the first round reads (state before round 1).
    check(state_bit(src(0, 0), 1 - tap(0, 0)) == 66,  "t1 x1 -> s66");
    check(state_bit(src(0, 1), 1 - tap(0, 1)) == 93,  "t1 x2 -> s93");
    check(state_bit(src(0, 4), 1 - tap(0, 4)) == 171, "t1 x5 -> s171");
    check(state_bit(src(1, 0), 1 - tap(1, 0)) == 162, "t2 x1 -> s162");
    check(state_bit(src(1, 2), 1 - tap(1, 2)) == 175, "t2 x3 -> s175");
    check(state_bit(src(1, 4), 1 - tap(1, 4)) == 264, "t2 x5 -> s264");
    check(state_bit(src(2, 0), 1 - tap(2, 0)) == 243, "t3 x1 -> s243");
    check(state_bit(src(2, 1), 1 - tap(2, 1)) == 288, "t3 x2 -> s288");
    check(state_bit(src(2, 4), 1 - tap(2, 4)) == 69,  "t3 x5 -> s69");
    // Leaves of T1(66): s1, s28, s26, s27, s106.
    check(state_bit(src(0, 0), 66 - tap(0, 0)) == 1,   "T1(66) x1 = s1");
    check(state_bit(src(0, 1), 66 - tap(0, 1)) == 28,  "T1(66) x2 = s28");
    check(state_bit(src(0, 4), 66 - tap(0, 4)) == 106, "T1(66) x5 = s106");
    // Worked example t1(67).
    check(!port_needs_redundant(0, 67, 0), "t1(67) x1 direct");
    for (int p = 1; p < 5; p++) check(port_needs_redundant(0, 67, p), $sformatf("t1(67) x%0d redundant", p + 1));
    // Unbalanced ranges of each strand.
    for (int k = 1; k <= 288; k++) begin
      bit any0, any1, any2;
      any0 = 0; any1 = 0; any2 = 0;
      for (int p = 0; p < 5; p++) begin
        any0 |= port_needs_redundant(0, k, p);
        any1 |= port_needs_redundant(1, k, p);
        any2 |= port_needs_redundant(2, k, p);
      end
      check(any0 == (k >= 67 && k <= 93),  $sformatf("t1(%0d) balance", k));
      check(any1 == (k >= 70 && k <= 87),  $sformatf("t2(%0d) balance", k));
      check(any2 == (k >= 67 && k <= 111), $sformatf("t3(%0d) balance", k));
    end
    check(redundant_count(288) == 285, $sformatf("count(288) = %0d", redundant_count(288)));
    check(redundant_count(256) == 285, "count(256)");
    check(redundant_count(66) == 0,    "count(66)");
    check(redundant_count(67) == 8,    "count(67)");   // t1(67): 4, t3(67): 4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
