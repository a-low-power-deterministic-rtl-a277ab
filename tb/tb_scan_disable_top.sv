// tb_scan_disable_top: end-to-end test of the scan-chain-disable
// infrastructure on the four-flip-flop example (two chains of two).
//
// Five vectors are applied in three D-compatible subsets: cubes 1 and 2 with
// chain 0 active, cubes 3 and 4 with chain 1 active, and cube 3 again with
// chain 0 active so that a fault observable only there is caught. The test
// must take 3*2*1 + (4+1+1)*(2+1) - 1 = 23 clock cycles. Then a random test
// set runs on a 32-flip-flop, 3-chain instance (the size of s838 split
// three ways). Every mechanism (full reload, single-chain
// reload, one-chain capture, duplicated vector, disabled chain holding,
// normal-mode capture) must occur at least once.
module tb_scan_disable_top;
  int checks = 0, failures = 0;

  logic ex_done, rn_done;
  int   ex_cnt[8], rn_cnt[8];

  scan_bench #(.NUM_FF(4), .NUM_CHAINS(2), .DIRECTED(1'b1)) u_example (
    .done(ex_done), .cnt(ex_cnt));
  scan_bench #(.NUM_FF(32), .NUM_CHAINS(3), .NUM_SUBSETS(10), .SEED(7)) u_random (
    .done(rn_done), .cnt(rn_cnt));

  task automatic tally(string name, int cnt[8]);
    string mech[8] = '{"", "", "full reload", "single-chain reload", "one-chain capture",
                       "duplicated vector", "disabled chain hold", "normal-mode capture"};
    checks += cnt[0];
    failures += cnt[1];
    for (int i = 2; i < 8; i++) begin
      $display("%s: %s x%0d", name, mech[i], cnt[i]);
    end
  endtask

  initial begin
    #1;
    wait (ex_done && rn_done);
    #1;
    tally("example", ex_cnt);
    tally("random", rn_cnt);
    // the example must exercise every mechanism, with the exact counts
    checks++; if (ex_cnt[2] != 3) failures++;   // M = 3 subsets
    checks++; if (ex_cnt[3] != 2) failures++;   // n + r - M = 2
    checks++; if (ex_cnt[4] != 5) failures++;   // n + r = 5 captures
    checks++; if (ex_cnt[5] != 1) failures++;   // r = 1
    for (int i = 2; i < 8; i++) begin
      checks++;
      if (ex_cnt[i] == 0 && rn_cnt[i] == 0) begin
        failures++;
        $display("mechanism %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
