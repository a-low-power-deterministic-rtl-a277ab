// tb_clock_controller: checks that in test mode (tc = 1) CLK reaches only the
// chain named by cs, that in normal mode (tc = 0) it reaches every chain, that
// an out-of-range cs (5 chains, 3-bit select) clocks no chain, and that
// changing tc or cs while CLK is high neither adds nor removes a pulse on any
// gated clock. Pulses are counted per gated clock and compared with the count
// worked out from the applied tc and cs.
module tb_clock_controller;
  localparam int unsigned N    = 5;
  localparam int unsigned CS_W = 3;

  logic            clk = 1'b0, tc = 1'b1;
  logic [CS_W-1:0] cs = '0;
  logic [N-1:0]    gclk;
  int              pulses[N];
  int              expected[N];
  int              checks = 0, failures = 0;
  int              n_test = 0, n_normal = 0, n_range = 0, n_glitch = 0;

  clock_controller #(.NUM_CHAINS(N), .CS_W(CS_W)) u_dut (.clk, .tc, .cs, .gclk);

  for (genvar k = 0; k < int'(N); k++) begin : g_cnt
    initial pulses[k] = 0;
    always @(posedge gclk[k]) pulses[k]++;
  end

  task automatic compare(string what);
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (pulses[k] != expected[k]) begin
        failures++;
        $display("FAIL %s: chain %0d got %0d pulses, expected %0d", what, k, pulses[k],
                 expected[k]);
      end
    end
  endtask

  // One clock period with the given controls, set while CLK is low. If
  // `flip` is set, tc and cs are changed to random values while CLK is high.
  task automatic period(logic t, int c, bit flip);
    tc = t;
    cs = CS_W'(c);
    #5 clk = 1'b1;
    for (int k = 0; k < int'(N); k++) if (!t || c == k) expected[k]++;
    if (flip) begin
      #2 tc = 1'($urandom()); cs = CS_W'($urandom());
      n_glitch++;
    end
    #5 clk = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < int'(N); k++) expected[k] = 0;
    #3;
    for (int i = 0; i < 400; i++) begin
      automatic int   c = $urandom_range(7);
      automatic logic t = ($urandom_range(3) != 0);
      if (t && c < int'(N)) n_test++;
      if (!t) n_normal++;
      if (t && c >= int'(N)) n_range++;
      period(t, c, $urandom_range(1) == 1);
      #1 compare($sformatf("period %0d tc=%0d cs=%0d", i, t, c));
    end
    checks++; if (n_test == 0 || n_normal == 0 || n_range == 0 || n_glitch == 0) failures++;
    $display("test-mode %0d, normal-mode %0d, out-of-range %0d, mid-pulse changes %0d",
             n_test, n_normal, n_range, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
