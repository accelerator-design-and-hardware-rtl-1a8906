// tb_diag_load: self-checking test of diagonal loading at NDIM = 8, TW = 4.
// Streams a random matrix in twice: once with a small noise-floor level (the
// trace rule must win) and once with a large one (the noise rule must win),
// then reads the whole matrix back and checks the diagonal increased by
// d = max(alpha*tr/TW, d2), everything else unchanged, the selected rule,
// the normalisation shift and the 2*NDIM+2 cycle loading time.
module tb_diag_load;
  localparam int NDIM = 8, TW = 4, W = 24, IW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, in_valid, start, busy, done, used_d2;
  logic [IW-1:0] in_row, in_col, rd_row; logic [IW-3:0] rd_quad;
  logic signed [3:0][W-1:0] in_re, in_im, rd_re, rd_im;
  logic [15:0] alpha_q; logic signed [W-1:0] d2_in, d_out;
  logic [$clog2(W)-1:0] norm_shl;
  diag_load #(.NDIM(NDIM), .TW(TW), .W(W)) dut (.*);
  longint mr [NDIM][NDIM], mi [NDIM][NDIM];

  task automatic run(input longint d2, input bit expect_d2);
    longint tr, d1, d, mx; int cyc, sh, bits;
    clear = 1; @(negedge clk); clear = 0;
    tr = 0; mx = 0;
    for (int r = 0; r < NDIM; r++)
      for (int q = 0; q < NDIM / 4; q++) begin
        in_valid = 1; in_row = IW'(r); in_col = IW'(4 * q);
        for (int l = 0; l < 4; l++) begin
          mr[r][4*q+l] = longint'($signed(20'($urandom))); mi[r][4*q+l] = longint'($signed(20'($urandom)));
          if (r == 4 * q + l) begin mr[r][r] = longint'($urandom % 200000); mi[r][r] = 0; tr += mr[r][r]; end
          in_re[l] = W'(mr[r][4*q+l]); in_im[l] = W'(mi[r][4*q+l]);
        end
        @(negedge clk);
      end
    in_valid = 0;
    d1 = ((tr * 16'd9830) >>> 16) / TW;   // alpha = 0.15
    d = (d2 > d1) ? d2 : d1;
    alpha_q = 16'd9830; d2_in = W'(d2);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++; if (cyc != 2 * NDIM + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
    checks++; if (used_d2 != expect_d2 || $signed(d_out) != d) begin failures++; $display("FAIL d %0d exp %0d", d_out, d); end
    for (int r = 0; r < NDIM; r++) begin
      mr[r][r] += d;
      for (int q = 0; q < NDIM / 4; q++) begin
        rd_row = IW'(r); rd_quad = (IW-2)'(q);
        @(negedge clk);
        for (int l = 0; l < 4; l++) begin
          checks++;
          if ($signed(rd_re[l]) != mr[r][4*q+l] || $signed(rd_im[l]) != mi[r][4*q+l]) begin
            failures++; $display("FAIL [%0d][%0d] %0d exp %0d", r, 4*q+l, $signed(rd_re[l]), mr[r][4*q+l]);
          end
        end
      end
    end
    foreach (mr[r, c]) begin
      longint a = mr[r][c] < 0 ? -mr[r][c] - 1 : mr[r][c];
      longint b = mi[r][c] < 0 ? -mi[r][c] - 1 : mi[r][c];
      if (a > mx) mx = a; if (b > mx) mx = b;
    end
    bits = 0; while ((longint'(1) <<< bits) <= mx) bits++;
    sh = W - 2 - bits;
    checks++; if (int'(norm_shl) != sh) begin failures++; $display("FAIL shl %0d exp %0d", norm_shl, sh); end
  endtask

  initial begin
    clear = 0; in_valid = 0; start = 0; in_row = 0; in_col = 0; rd_row = 0; rd_quad = 0;
    in_re = '0; in_im = '0; alpha_q = 0; d2_in = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(100, 0);
    run(3000000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
