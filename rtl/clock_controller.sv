// clock_controller: gates the system clock CLK into the scan chains.
//
// In test mode (tc = 1) a decoder turns the chain select cs into a one-hot
// enable, so CLK reaches only the chain that cs names, for shifting and for
// capturing alike. In normal mode (tc = 0) every enable is on and CLK reaches
// all chains. This decoder-plus-gates structure is the one the scheme calls
// for; the enables drive one latch-based clock gate per chain (clock_gate),
// which is this design's own choice. A cs value of NUM_CHAINS or above in
// test mode enables no chain.
//
// Interface: clk, tc, cs in; gclk[NUM_CHAINS] out, one gated clock per chain.
// Timing: tc and cs must be stable before clk rises; the gated clocks carry
// the same edges as clk, with no added cycle.
module clock_controller #(
  parameter int unsigned NUM_CHAINS = 4,
  parameter int unsigned CS_W       = scan_pkg::cs_width(NUM_CHAINS)
) (
  input  logic                  clk,
  input  logic                  tc,
  input  logic [CS_W-1:0]       cs,
  output logic [NUM_CHAINS-1:0] gclk
);

  logic [NUM_CHAINS-1:0] chain_en;

  // Decoder: one-hot select in test mode, all ones in normal mode.
  always_comb begin
    for (int unsigned k = 0; k < NUM_CHAINS; k++) begin
      chain_en[k] = !tc || (32'(cs) == k);
    end
  end

  for (genvar k = 0; k < int'(NUM_CHAINS); k++) begin : g_gate
    clock_gate u_gate (.clk(clk), .en(chain_en[k]), .gclk(gclk[k]));
  end

  // In test mode at most one chain may receive the clock.
  a_one_chain_in_test : assert property (@(posedge clk) tc |-> $onehot0(chain_en))
    else $error("clock_controller: more than one chain enabled in test mode");

endmodule
