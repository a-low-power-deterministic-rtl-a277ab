// scan_tester: behavioural tester and circuit model for scan_disable_top.
//
// This module plays the two parts that surround the scan infrastructure: the
// external tester, which drives CLK, TC, Cs, Scan_En and Scan-in and watches
// Scan-out, and the circuit's combinational logic, which turns the flip-flop
// outputs ff_q into next-state values ff_d. The logic is an arbitrary fixed
// function (cut_next below); any function will do since the scan structure
// does not depend on it.
//
// The tester applies a test set by D-compatible subsets. A subset is a run of
// vectors that all capture into the same chain and agree on every bit of the
// other (disabled) chains. For the first vector of a subset every chain is
// loaded in turn (Cs = 0..N-1, L = ceil(F/N) shift cycles each); for each
// later vector only the active chain is shifted. After each load one capture
// cycle clocks the active chain alone. The final response is unloaded from
// the last active chain. Every bit that leaves Scan-out is compared with the
// value expected from the test set alone (response bits for the chain that
// captured, the previous vector's bits for chains that did not), ff_q is
// compared with the vector before every capture and with the expected mix of
// response and held bits after it, and the number of clock pulses is compared
// with M*L*(N-1) + (n+r+1)*(L+1) - 1. Flip-flop toggles are counted on every
// test-mode edge: a toggle outside the selected chain is an error, and the
// peak per cycle must not exceed L (the flip-flop side of the peak-power
// bound; power itself is not modelled). A short normal-mode phase (TC = 0)
// follows, in which all chains capture and shift together.
//
// DIRECTED = 1 applies the four-cube example with five vectors in three
// subsets on 4 flip-flops in 2 chains; otherwise NUM_SUBSETS random subsets
// are generated from SEED.
module scan_tester #(
  parameter int unsigned NUM_FF      = 669,
  parameter int unsigned NUM_CHAINS  = 4,
  parameter int unsigned CS_W        = scan_pkg::cs_width(NUM_CHAINS),
  parameter bit          DIRECTED    = 1'b0,
  parameter int unsigned NUM_SUBSETS = 12,
  parameter int unsigned SEED        = 1
) (
  output logic              clk,
  output logic              rst_n,
  output logic              tc,
  output logic              scan_en,
  output logic [CS_W-1:0]   cs,
  output logic              scan_in,
  input  logic              scan_out,
  input  logic [NUM_FF-1:0] ff_q,
  output logic [NUM_FF-1:0] ff_d,
  output logic              done,
  output int                checks,
  output int                failures,
  // how often each mechanism was exercised
  output int                n_full_loads,     // all chains loaded (first vector of a subset)
  output int                n_single_loads,   // only the active chain shifted
  output int                n_captures,       // one-chain capture cycles
  output int                n_duplicates,     // vectors re-applied with another chain
  output int                n_hold_checks,    // disabled chain seen holding through a capture
  output int                n_normal_captures // TC = 0 captures into all chains
);
  typedef logic [NUM_FF-1:0] vec_t;

  localparam int unsigned L = (NUM_FF + NUM_CHAINS - 1) / NUM_CHAINS;

  // Circuit model: next state of flip-flop i from its neighbours.
  function automatic vec_t cut_next(vec_t q);
    vec_t d;
    for (int i = 0; i < int'(NUM_FF); i++) begin
      d[i] = q[i] ^ q[(i + 1) % NUM_FF] ^ (q[(i + 2) % NUM_FF] & ~q[(i + 3) % NUM_FF])
             ^ logic'(i % 3 == 0);
    end
    return d;
  endfunction

  assign ff_d = cut_next(ff_q);

  function automatic int chain_base(int k);
    return k * int'(L);
  endfunction

  function automatic int chain_len(int k);
    int rest = int'(NUM_FF) - k * int'(L);
    return (rest < int'(L)) ? rest : int'(L);
  endfunction

  // Test set: vectors in application order, their active chain, whether each
  // starts a subset and whether it is a duplicate.
  vec_t vecs[$];
  int   act[$];
  bit   first_of_subset[$];
  bit   is_dup[$];

  longint pulses;
  vec_t   ff_before;
  longint test_toggles;
  int     max_toggles, stray_toggles;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("scan_tester F=%0d N=%0d: FAIL %s", NUM_FF, NUM_CHAINS, what);
    end
  endtask

  // One tester cycle: set inputs while CLK is low, return the Scan-out value
  // seen before the rising edge, then pulse CLK.
  task automatic cycle(logic t, logic se, int c, logic si, output logic so);
    tc      = t;
    scan_en = se;
    cs      = CS_W'(c);
    scan_in = si;
    #2;
    so = scan_out;
    ff_before = ff_q;
    #3 clk = 1'b1;
    pulses++;
    #1;
    // Flip-flop toggles of this edge: in test mode only the selected chain
    // may change, so at most L flip-flops toggle per cycle.
    if (t) begin
      automatic vec_t diff = ff_before ^ ff_q;
      automatic int   toggles = $countones(diff);
      test_toggles += longint'(toggles);
      if (toggles > max_toggles) max_toggles = toggles;
      for (int i = 0; i < int'(NUM_FF); i++)
        if (diff[i] && (i < chain_base(c) || i >= chain_base(c) + chain_len(c)))
          stray_toggles++;
    end
    #4 clk = 1'b0;
  endtask

  // Shift chain k for L cycles, loading the chain's bits of `load` and
  // comparing what comes out with the chain's bits of `expect_out`.
  task automatic shift_chain(int k, vec_t load, vec_t expect_out, bit check_out);
    int   len = chain_len(k);
    int   base = chain_base(k);
    logic so, si;
    for (int c = 0; c < int'(L); c++) begin
      int pin = len - 1 - (c - (int'(L) - len));
      si = (c < int'(L) - len) ? 1'b0 : load[base + pin];
      cycle(1'b1, 1'b1, k, si, so);
      if (check_out && c < len)
        check(so === expect_out[base + len - 1 - c],
              $sformatf("scan-out chain %0d bit %0d", k, len - 1 - c));
    end
  endtask

  function automatic vec_t merge_chain(vec_t base_v, vec_t src, int k);
    vec_t v = base_v;
    for (int p = 0; p < chain_len(k); p++) v[chain_base(k) + p] = src[chain_base(k) + p];
    return v;
  endfunction

  task automatic build_directed();
    // Flip-flops 1,2 form chain 0 and 3,4 chain 1; bit i of a vector is
    // flip-flop i+1. X's of cubes 2 and 3 take the value of the subset
    // partner; the X of the duplicated cube 3 is filled with 1.
    vecs = '{vec_t'(4'b0011), vec_t'(4'b0000), vec_t'(4'b0110), vec_t'(4'b1010),
            vec_t'(4'b0111)};
    act  = '{0, 0, 1, 1, 0};
    first_of_subset = '{1, 0, 1, 0, 1};
    is_dup = '{0, 0, 0, 0, 1};
  endtask

  task automatic build_random();
    process::self().srandom(SEED);
    for (int sub = 0; sub < int'(NUM_SUBSETS); sub++) begin
      int   k = $urandom_range(NUM_CHAINS - 1);
      int   nv = $urandom_range(1, 3);
      vec_t v;
      bit   dup = (vecs.size() > 0) && ($urandom_range(3) == 0) && (NUM_CHAINS > 1);
      if (dup) begin
        int j = $urandom_range(vecs.size() - 1);
        while (is_dup[j]) j = $urandom_range(vecs.size() - 1);
        v = vecs[j];
        k = (act[j] + 1 + $urandom_range(NUM_CHAINS - 2)) % NUM_CHAINS;
      end else begin
        for (int i = 0; i < int'(NUM_FF); i++) v[i] = 1'($urandom());
      end
      for (int j = 0; j < nv; j++) begin
        if (j > 0) begin
          vec_t fresh;
          for (int i = 0; i < int'(NUM_FF); i++) fresh[i] = 1'($urandom());
          v = merge_chain(v, fresh, k);
        end
        vecs.push_back(v);
        act.push_back(k);
        first_of_subset.push_back(j == 0);
        is_dup.push_back(dup && j == 0);
      end
    end
  endtask

  initial begin
    automatic vec_t contents, expect_after;
    automatic int m, n, r, prev;
    automatic logic so;
    automatic longint want;

    clk = 1'b0; rst_n = 1'b1; tc = 1'b1; scan_en = 1'b1; cs = '0; scan_in = 1'b0;
    done = 1'b0; checks = 0; failures = 0; pulses = 0;
    test_toggles = 0; max_toggles = 0; stray_toggles = 0;
    n_full_loads = 0; n_single_loads = 0; n_captures = 0; n_duplicates = 0;
    n_hold_checks = 0; n_normal_captures = 0;

    if (DIRECTED) build_directed(); else build_random();

    #5 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    #10;
    check(ff_q === '0, "reset clears all chains");

    // ---- test procedure, one-chain-at-a-time ----
    contents = '0;   // what the scan flip-flops hold
    prev = -1;       // chain that captured last
    m = 0; n = 0; r = 0;
    for (int v = 0; v < vecs.size(); v++) begin
      automatic int k = act[v];
      if (first_of_subset[v]) begin
        m++;
        n_full_loads++;
        for (int c = 0; c < int'(NUM_CHAINS); c++) shift_chain(c, vecs[v], contents, 1'b1);
      end else begin
        check(prev == k, "subset keeps its active chain");
        n_single_loads++;
        shift_chain(k, vecs[v], contents, 1'b1);
      end
      if (is_dup[v]) begin r++; n_duplicates++; end else n++;
      check(ff_q === vecs[v], $sformatf("vector %0d loaded", v));
      // capture into the active chain only
      expect_after = merge_chain(vecs[v], cut_next(vecs[v]), k);
      cycle(1'b1, 1'b0, k, 1'b0, so);
      n_captures++;
      check(ff_q === expect_after, $sformatf("vector %0d captured into chain %0d only", v, k));
      for (int c = 0; c < int'(NUM_CHAINS); c++) if (c != k) n_hold_checks++;
      contents = expect_after;
      prev = k;
    end
    // unload the last response
    shift_chain(prev, '0, contents, 1'b1);

    want = longint'(m) * longint'(L) * (longint'(NUM_CHAINS) - 1)
           + (longint'(n) + longint'(r) + 1) * (longint'(L) + 1) - 1;
    check(pulses == want, $sformatf("test time %0d cycles, expected %0d", pulses, want));
    check(pulses == longint'(scan_pkg::test_time(NUM_FF, NUM_CHAINS, n, r, m)),
          "test time matches the package formula");
    check(stray_toggles == 0, "only the selected chain toggles in test mode");
    check(max_toggles <= int'(L), "at most ceil(F/N) flip-flops toggle per test cycle");
    $display("scan_tester F=%0d N=%0d: n=%0d r=%0d M=%0d test time %0d cycles, flip-flop toggles %0d (peak %0d per cycle of %0d flip-flops)",
             NUM_FF, NUM_CHAINS, n, r, m, pulses, test_toggles, max_toggles, NUM_FF);

    // ---- normal mode: every chain captures and shifts ----
    contents = ff_q;
    cycle(1'b0, 1'b0, 0, 1'b0, so);
    n_normal_captures++;
    check(ff_q === cut_next(contents), "normal-mode capture into all chains");
    contents = ff_q;
    cycle(1'b0, 1'b1, 0, 1'b1, so);
    begin
      automatic vec_t shifted = contents;
      for (int c = 0; c < int'(NUM_CHAINS); c++) begin
        for (int p = chain_len(c) - 1; p > 0; p--)
          shifted[chain_base(c) + p] = contents[chain_base(c) + p - 1];
        shifted[chain_base(c)] = 1'b1;
      end
      check(ff_q === shifted, "normal-mode shift moves all chains");
    end

    done = 1'b1;
  end
endmodule
