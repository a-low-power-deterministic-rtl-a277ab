// scan_bench: one scan_disable_top of a given size wired to a scan_tester.
// Used by the testbenches that run several sizes side by side; its outputs
// are the tester's result and mechanism counters.
module scan_bench #(
  parameter int unsigned NUM_FF      = 32,
  parameter int unsigned NUM_CHAINS  = 2,
  parameter bit          DIRECTED    = 1'b0,
  parameter int unsigned NUM_SUBSETS = 12,
  parameter int unsigned SEED        = 1
) (
  output logic done,
  output int   cnt[8]  // checks, failures, then the six mechanism counters
);
  localparam int unsigned CS_W = scan_pkg::cs_width(NUM_CHAINS);

  logic              clk, rst_n, tc, scan_en, scan_in, scan_out;
  logic [CS_W-1:0]   cs;
  logic [NUM_FF-1:0] ff_q, ff_d;

  scan_disable_top #(.NUM_FF(NUM_FF), .NUM_CHAINS(NUM_CHAINS)) u_dut (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ff_q, .ff_d
  );

  scan_tester #(.NUM_FF(NUM_FF), .NUM_CHAINS(NUM_CHAINS), .DIRECTED(DIRECTED),
                .NUM_SUBSETS(NUM_SUBSETS), .SEED(SEED)) u_tester (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ff_q, .ff_d, .done,
    .checks(cnt[0]), .failures(cnt[1]), .n_full_loads(cnt[2]), .n_single_loads(cnt[3]),
    .n_captures(cnt[4]), .n_duplicates(cnt[5]), .n_hold_checks(cnt[6]),
    .n_normal_captures(cnt[7])
  );
endmodule
