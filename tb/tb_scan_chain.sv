// tb_scan_chain: drives a 7-flip-flop chain and a 1-flip-flop chain with
// random shift and capture cycles, and with cycles in which the clock is
// withheld (as the clock controller does for a disabled chain). After every
// cycle the chain contents and scan_out are compared with a reference kept as
// an array of bits in the testbench. Asynchronous reset is checked too.
module tb_scan_chain;
  localparam int unsigned LEN = 7;

  logic           clk = 1'b0, rst_n = 1'b1, scan_en = 1'b0, scan_in = 1'b0;
  logic [LEN-1:0] d = '0, q;
  logic           scan_out;
  logic [0:0]     d1 = '0, q1;
  logic           scan_out1;
  bit             ref_q[LEN];
  bit             ref_q1;
  int             checks = 0, failures = 0;
  int             n_shift = 0, n_capture = 0, n_hold = 0;

  scan_chain #(.LEN(LEN)) u_dut (.clk, .rst_n, .scan_en, .scan_in, .d, .q, .scan_out);
  scan_chain #(.LEN(1)) u_dut1 (.clk, .rst_n, .scan_en, .scan_in, .d(d1), .q(q1),
                                .scan_out(scan_out1));

  task automatic compare(string what);
    for (int p = 0; p < int'(LEN); p++) begin
      checks++;
      if (q[p] !== ref_q[p]) begin
        failures++;
        $display("FAIL %s: q[%0d]=%0b expected %0b", what, p, q[p], ref_q[p]);
      end
    end
    checks += 3;
    if (scan_out !== ref_q[LEN-1]) begin failures++; $display("FAIL %s: scan_out", what); end
    if (q1[0] !== ref_q1) begin failures++; $display("FAIL %s: 1-bit chain", what); end
    if (scan_out1 !== ref_q1) begin failures++; $display("FAIL %s: 1-bit scan_out", what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int p = 0; p < int'(LEN); p++) ref_q[p] = 0;
    ref_q1 = 0;
    #1 compare("after reset");
    for (int i = 0; i < 500; i++) begin
      automatic bit pulse = ($urandom_range(4) != 0);
      scan_en = 1'($urandom());
      scan_in = 1'($urandom());
      d       = LEN'($urandom());
      d1      = 1'($urandom());
      #4;
      if (pulse) begin
        clk = 1'b1;
        if (scan_en) begin
          for (int p = LEN - 1; p > 0; p--) ref_q[p] = ref_q[p-1];
          ref_q[0] = scan_in;
          ref_q1 = scan_in;
          n_shift++;
        end else begin
          for (int p = 0; p < int'(LEN); p++) ref_q[p] = d[p];
          ref_q1 = d1[0];
          n_capture++;
        end
      end else begin
        n_hold++;
      end
      #1 compare($sformatf("cycle %0d", i));
      #4 clk = 1'b0;
      #1;
    end
    // asynchronous reset clears the chain without a clock edge
    rst_n = 1'b0;
    #1;
    for (int p = 0; p < int'(LEN); p++) ref_q[p] = 0;
    ref_q1 = 0;
    compare("asynchronous reset");
    checks++; if (n_shift == 0 || n_capture == 0 || n_hold == 0) failures++;
    $display("shift %0d, capture %0d, clock withheld %0d", n_shift, n_capture, n_hold);
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
