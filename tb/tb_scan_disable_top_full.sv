// tb_scan_disable_top_full: scan_disable_top at its default size, 669
// flip-flops in 4 chains (chains of 168, 168, 168 and 165), driven through a
// complete random test of 12 D-compatible subsets by scan_tester. Checks
// every Scan-out bit, the flip-flop contents around every capture, the
// normal-mode behaviour and the test time in clock cycles against
// M*L*(N-1) + (n+r+1)*(L+1) - 1 with L = 168.
module tb_scan_disable_top_full;
  localparam int unsigned CS_W = scan_pkg::cs_width(4);

  logic            clk, rst_n, tc, scan_en, scan_in, scan_out, done;
  logic [CS_W-1:0] cs;
  logic [668:0]    ff_q, ff_d;
  int              cnt[8];

  scan_disable_top u_dut (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ff_q, .ff_d
  );

  scan_tester #(.NUM_FF(669), .NUM_CHAINS(4), .NUM_SUBSETS(12), .SEED(13)) u_tester (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ff_q, .ff_d, .done,
    .checks(cnt[0]), .failures(cnt[1]), .n_full_loads(cnt[2]), .n_single_loads(cnt[3]),
    .n_captures(cnt[4]), .n_duplicates(cnt[5]), .n_hold_checks(cnt[6]),
    .n_normal_captures(cnt[7])
  );

  initial begin
    automatic int checks, failures;
    #1;
    wait (done);
    #1;
    checks = cnt[0];
    failures = cnt[1];
    $display("full reloads %0d, single-chain reloads %0d, captures %0d, duplicates %0d",
             cnt[2], cnt[3], cnt[4], cnt[5]);
    for (int i = 2; i < 8; i++) begin
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("mechanism counter %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", cnt[0], cnt[1] + 1);
    $finish;
  end
endmodule
