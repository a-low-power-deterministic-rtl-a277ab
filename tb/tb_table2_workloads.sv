// tb_table2_workloads: the scan infrastructure at every size of the
// benchmark evaluation: circuits with 32, 29, 18, 18, 74, 211 and 669 scan
// flip-flops (s838, s953, s1196, s1238, s1423, s9234, s13207), each split
// into 2, 3 and 4 chains. The benchmark logic is not available, so each
// instance runs a random test set of 8 D-compatible subsets through
// scan_tester with its behavioural circuit model; the test time of every run
// is checked against M*L*(N-1) + (n+r+1)*(L+1) - 1.
module tb_table2_workloads;
  localparam int NC = 7;
  localparam int unsigned FF[NC] = '{32, 29, 18, 18, 74, 211, 669};

  logic done[NC][3];
  int   cnt[NC][3][8];

  for (genvar c = 0; c < NC; c++) begin : g_ckt
    for (genvar nn = 2; nn <= 4; nn++) begin : g_n
      scan_bench #(.NUM_FF(FF[c]), .NUM_CHAINS(nn), .NUM_SUBSETS(8),
                   .SEED(100 * c + nn)) u_bench (
        .done(done[c][nn-2]), .cnt(cnt[c][nn-2])
      );
    end
  end

  function automatic bit all_done();
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < 3; j++)
        if (!done[c][j]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    automatic int checks = 0, failures = 0;
    #1;
    while (!all_done()) #100;
    #1;
    for (int c = 0; c < NC; c++) begin
      for (int j = 0; j < 3; j++) begin
        checks += cnt[c][j][0];
        failures += cnt[c][j][1];
        checks++;
        if (cnt[c][j][4] == 0) failures++;  // at least one capture ran
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
