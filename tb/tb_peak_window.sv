// tb_peak_window: checks the correlation peak search and lag gating.
// Each trial streams random low-level correlation samples with one strong
// peak at a random lag P (plus a tie of equal magnitude later, which must not
// win), then checks found, peak_idx = P and, for every lag of the block on
// the four query lanes, q_keep = (|lag - P| <= WIN).  clear between trials
// must reset found.  The peak register must be valid the cycle after the
// last sample.  A watchdog ends the run.
module tb_peak_window;
  localparam int W = 32, LW = 16, WIN = 4, LEN = 136;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, in_valid = 0; logic [LW-1:0] in_idx = 0; logic signed [W-1:0] in_re = 0, in_im = 0;
  logic [3:0][LW-1:0] q_idx = '0; logic [3:0] q_keep; logic [LW-1:0] peak_idx; logic found;
  peak_window #(.W(W), .LW(LW), .WIN(WIN)) dut (.*);

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int tr = 0; tr < 30; tr++) begin
      int p, p2;
      p = $urandom_range(LEN - 2); p2 = $urandom_range(LEN - 1, p + 1);
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      checks++;
      if (found) begin failures++; $display("FAIL found after clear"); end
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk) in_valid = 1; in_idx = LW'(i);
        if (i == p || i == p2) begin in_re = -32'sd50000000; in_im = 32'sd30000000; end
        else begin in_re = W'(int'($urandom_range(2000000)) - 1000000); in_im = W'(int'($urandom_range(2000000)) - 1000000); end
        if (i == p2) begin in_re = 32'sd30000000; in_im = 32'sd50000000; end   // equal magnitude, later
      end
      @(negedge clk) in_valid = 0;
      checks++;
      if (!found || peak_idx != LW'(p)) begin failures++; $display("FAIL peak %0d want %0d", peak_idx, p); end
      for (int b = 0; b < LEN; b += 4) begin
        for (int l = 0; l < 4; l++) q_idx[l] = LW'(b + l);
        #1;
        for (int l = 0; l < 4; l++) begin
          int d; d = b + l - p; if (d < 0) d = -d;
          checks++;
          if (q_keep[l] != (d <= WIN)) begin failures++; $display("FAIL keep lag %0d", b + l); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
