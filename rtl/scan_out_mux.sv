// scan_out_mux: routes the serial output of the chain selected by Cs to
// Scan-out.
//
// A plain NUM_CHAINS-to-1 multiplexer, combinational. A cs value of
// NUM_CHAINS or above (possible when NUM_CHAINS is not a power of two)
// yields 0; that choice is this design's own.
//
// Interface: chain_out[NUM_CHAINS] and cs in, scan_out out.
module scan_out_mux #(
  parameter int unsigned NUM_CHAINS = 4,
  parameter int unsigned CS_W       = scan_pkg::cs_width(NUM_CHAINS)
) (
  input  logic [NUM_CHAINS-1:0] chain_out,
  input  logic [CS_W-1:0]       cs,
  output logic                  scan_out
);
  always_comb begin
    scan_out = 1'b0;
    for (int unsigned k = 0; k < NUM_CHAINS; k++) begin
      if (32'(cs) == k) scan_out = chain_out[k];
    end
  end
endmodule
