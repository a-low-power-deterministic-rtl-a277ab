// scan_disable_top: low-power scan test infrastructure in which only one scan
// chain is clocked at a time, during shifting and during capture alike.
//
// The NUM_FF flip-flops of a circuit are split into NUM_CHAINS scan chains.
// Scan-in and Scan_En go to every chain. The clock controller passes CLK to
// the one chain chosen by Cs while TC = 1 (test mode) and to all chains while
// TC = 0 (normal mode). The output multiplexer, also steered by Cs, puts the
// active chain's last flip-flop on Scan-out. Since a disabled chain receives
// no clock edge, it neither shifts nor captures, so switching in the logic is
// confined to the fan-out of one chain and both average and peak power fall
// to roughly 1/N of conventional full scan.
//
// The circuit's combinational logic is not part of this module. Its flip-flop
// outputs leave as ff_q (pseudo-primary inputs of the logic) and its
// next-state values return as ff_d (pseudo-primary outputs). Chain k holds
// the flat indices [k*L +: len_k], with L = ceil(NUM_FF/NUM_CHAINS); index
// k*L is next to Scan-in and index k*L+len_k-1 drives Scan-out. Which circuit
// flip-flop sits in which chain is decided by how the logic is wired to
// ff_q/ff_d; the grouping is chosen offline to shorten test time. Primary
// inputs and outputs run between the tester and the logic and do not pass
// through this module.
//
// Test timing: the tester loads a vector chain by chain (Cs = 0..N-1, L shift
// cycles each with Scan_En = 1), captures with one chain (Scan_En = 0, one
// cycle), then for each further vector of the same D-compatible subset
// shifts only that chain for L cycles, which also unloads the response. A
// whole test takes M*L*(N-1) + (n+r+1)*(L+1) - 1 cycles (scan_pkg::test_time).
// A chain shorter than L is shifted L cycles as well; its first bits fall out.
//
// Parameter defaults: 669 flip-flops (the largest benchmark circuit
// evaluated, s13207) in 4 chains, the largest chain count evaluated. The
// asynchronous active-low rst_n clearing all chains is this design's own.
module scan_disable_top #(
  parameter int unsigned NUM_FF     = 669,
  parameter int unsigned NUM_CHAINS = 4,
  parameter int unsigned CS_W       = scan_pkg::cs_width(NUM_CHAINS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tc,
  input  logic              scan_en,
  input  logic [CS_W-1:0]   cs,
  input  logic              scan_in,
  output logic              scan_out,
  output logic [NUM_FF-1:0] ff_q,
  input  logic [NUM_FF-1:0] ff_d
);
  import scan_pkg::*;

  localparam int unsigned L = chain_stride(NUM_FF, NUM_CHAINS);

  if (NUM_CHAINS < 1 || (NUM_CHAINS - 1) * L >= NUM_FF) begin : g_bad_config
    $error("scan_disable_top: NUM_FF=%0d cannot be split into %0d non-empty chains",
           NUM_FF, NUM_CHAINS);
  end

  logic [NUM_CHAINS-1:0] gclk;
  logic [NUM_CHAINS-1:0] chain_out;

  clock_controller #(.NUM_CHAINS(NUM_CHAINS), .CS_W(CS_W)) u_clock_controller (
    .clk      (clk),
    .tc       (tc),
    .cs       (cs),
    .gclk     (gclk)
  );

  for (genvar k = 0; k < int'(NUM_CHAINS); k++) begin : g_chain
    localparam int unsigned LEN  = chain_len(NUM_FF, NUM_CHAINS, k);
    localparam int unsigned BASE = k * L;

    scan_chain #(.LEN(LEN)) u_chain (
      .clk      (gclk[k]),
      .rst_n    (rst_n),
      .scan_en  (scan_en),
      .scan_in  (scan_in),
      .d        (ff_d[BASE +: LEN]),
      .q        (ff_q[BASE +: LEN]),
      .scan_out (chain_out[k])
    );
  end

  scan_out_mux #(.NUM_CHAINS(NUM_CHAINS), .CS_W(CS_W)) u_scan_out_mux (
    .chain_out (chain_out),
    .cs        (cs),
    .scan_out  (scan_out)
  );

endmodule
