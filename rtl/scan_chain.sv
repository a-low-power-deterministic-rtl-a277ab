// scan_chain: one scan chain of LEN mux-D scan flip-flops.
//
// Every flip-flop has a multiplexer in front of it. With scan_en = 1 the chain
// shifts: flip-flop 0 takes scan_in and flip-flop p takes flip-flop p-1.
// With scan_en = 0 every flip-flop captures its functional input d[p], the
// value the circuit's combinational logic computes for it. The chain only
// moves on a rising edge of its own clock, which the clock controller gates,
// so a disabled chain holds its contents in both shift and capture.
// scan_out is the last flip-flop, q[LEN-1].
//
// Interface: clk (the chain's gated clock), rst_n (asynchronous, active low,
// clears the chain), scan_en, scan_in, d[LEN] in; q[LEN] (to the circuit)
// and scan_out out. One bit moves per clock. The mux-D cell and the reset are
// this design's choices; the scheme names only shift and capture under
// Scan_En.
module scan_chain #(
  parameter int unsigned LEN = 168
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           scan_out
);

  // Shift-path value for each flip-flop: scan_in for the first, the
  // preceding flip-flop for the rest.
  logic [LEN-1:0] shift_d;

  if (LEN == 1) begin : g_single
    assign shift_d = scan_in;
  end else begin : g_multi
    assign shift_d = {q[LEN-2:0], scan_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= shift_d;
    else              q <= d;
  end

  assign scan_out = q[LEN-1];

endmodule
