// tb_norm_shift: checks the block normalisation shift.
// Blocks of random complex samples whose largest magnitude has a random bit
// length are streamed in (clear before each block).  One cycle after the last
// sample, shl must equal the number of redundant sign bits of the largest
// sample minus GUARD (never negative), so that every sample shifted left by
// shl still fits the word.  Also checked: the fitted result and the all-zero
// block.  A watchdog ends the run.
module tb_norm_shift;
  localparam int W = 24, GUARD = 1, SW = $clog2(W);
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, in_valid = 0; logic signed [W-1:0] in_re = 0, in_im = 0; logic [SW-1:0] shl;
  norm_shift #(.W(W), .GUARD(GUARD)) dut (.*);

  function automatic int mag_bits(int v);   // bits needed for v's magnitude
    int m, n;
    m = (v < 0) ? ~v : v; n = 0;
    while (m != 0) begin m >>= 1; n++; end
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int blk = 0; blk < 200; blk++) begin
      int nb, want, len, mx;
      nb = (blk == 0) ? 0 : $urandom_range(W - 1, 1);
      len = $urandom_range(20, 1); mx = 0;
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      for (int i = 0; i < len; i++) begin
        int a, b;
        a = (nb == 0) ? 0 : int'($urandom_range((1 << nb) - 1)) - (1 << (nb - 1)) * int'($urandom_range(1));
        b = (nb == 0) ? 0 : int'($urandom_range((1 << nb) - 1)) * ((i % 2) ? 1 : -1);
        if (mag_bits(a) > mx) mx = mag_bits(a);
        if (mag_bits(b) > mx) mx = mag_bits(b);
        @(negedge clk) in_valid = 1; in_re = W'(a); in_im = W'(b);
      end
      @(negedge clk) in_valid = 0;
      want = (W - 1 - mx) - GUARD; if (want < 0) want = 0;
      checks++;
      if (int'(shl) != want) begin failures++; $display("FAIL block %0d: shl %0d want %0d (mag bits %0d)", blk, shl, want, mx); end
      checks++;
      if (mx + int'(shl) > W - 1) begin failures++; $display("FAIL shifted block overflows"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
