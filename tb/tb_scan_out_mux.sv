// tb_scan_out_mux: exhaustive check of a 3-input output multiplexer with a
// 2-bit select: for every select value and every input pattern, scan_out
// must equal the selected chain's bit, and 0 for the unused select value 3.
module tb_scan_out_mux;
  localparam int unsigned N = 3;

  logic [N-1:0] chain_out;
  logic [1:0]   cs;
  logic         scan_out;
  int           checks = 0, failures = 0;

  scan_out_mux #(.NUM_CHAINS(N), .CS_W(2)) u_dut (.chain_out, .cs, .scan_out);

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int v = 0; v < (1 << N); v++) begin
        automatic logic want;
        cs = 2'(c);
        chain_out = N'(v);
        want = (c < int'(N)) ? logic'((v >> c) & 1) : 1'b0;
        #1;
        checks++;
        if (scan_out !== want) begin
          failures++;
          $display("FAIL cs=%0d chains=%b: got %0b expected %0b", c, chain_out, scan_out, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
