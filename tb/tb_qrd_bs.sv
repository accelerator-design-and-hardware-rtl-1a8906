// tb_qrd_bs: self-checking test of the folded QRD / back-substitution solver.
//
// A random, diagonally dominant complex N x N system C x = r (N = 8) is
// served through the solver's read ports with one cycle of latency, as the
// covariance and cross-correlation memories do.  The testbench solves the
// same system with complex Gaussian elimination in real arithmetic and
// compares every streamed x[i] with a tolerance that allows for the 20-bit
// solver format.  It also checks that all N outputs appear exactly once, in
// descending index order (back-substitution order), and that the start-to-done
// cycle count does not exceed the solver's documented bound.  Three systems are
// solved, the last one with a non-zero input shift.  A watchdog ends the run.
module tb_qrd_bs;
  localparam int N = 8, W_IN = 24, QW = 20, QF = 14;
  localparam int IW = $clog2(N + 1), SHW = $clog2(W_IN), NQ1 = (N + 4) / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0; logic [SHW-1:0] a_shl = 0, b_shl = 0;
  logic busy, done, x_valid; logic [IW-1:0] a_rd_row, b_rd_addr, x_idx; logic [IW-3:0] a_rd_quad;
  logic signed [3:0][W_IN-1:0] a_rd_re, a_rd_im; logic signed [W_IN-1:0] b_rd_re, b_rd_im;
  logic signed [QW-1:0] x_re, x_im;

  qrd_bs #(.N(N), .W_IN(W_IN), .QW(QW), .QF(QF)) dut (.*);

  int am_re [N][N], am_im [N][N], bv_re [N], bv_im [N];
  always_ff @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      a_rd_re[l] <= W_IN'(am_re[a_rd_row % N][(a_rd_quad * 4 + l) % N]);
      a_rd_im[l] <= W_IN'(am_im[a_rd_row % N][(a_rd_quad * 4 + l) % N]);
    end
    b_rd_re <= W_IN'(bv_re[b_rd_addr % N]); b_rd_im <= W_IN'(bv_im[b_rd_addr % N]);
  end

  real xr [N], xi [N];
  task automatic ref_solve(input int sh);
    real mr [N][N+1], mi [N][N+1], scale;
    scale = real'(1 << sh) / real'(1 << 22);   // input LSB in solver units
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin mr[i][j] = am_re[i][j] * scale; mi[i][j] = am_im[i][j] * scale; end
      mr[i][N] = bv_re[i] * scale; mi[i][N] = bv_im[i] * scale;
    end
    for (int p = 0; p < N; p++) begin
      for (int i = p + 1; i < N; i++) begin
        real d, fr, fi;
        d = mr[p][p] * mr[p][p] + mi[p][p] * mi[p][p];
        fr = (mr[i][p] * mr[p][p] + mi[i][p] * mi[p][p]) / d;
        fi = (mi[i][p] * mr[p][p] - mr[i][p] * mi[p][p]) / d;
        for (int j = p; j <= N; j++) begin
          real tr, ti;
          tr = fr * mr[p][j] - fi * mi[p][j]; ti = fr * mi[p][j] + fi * mr[p][j];
          mr[i][j] -= tr; mi[i][j] -= ti;
        end
      end
    end
    for (int i = N - 1; i >= 0; i--) begin
      real sr, si, d;
      sr = mr[i][N]; si = mi[i][N];
      for (int j = i + 1; j < N; j++) begin
        sr -= mr[i][j] * xr[j] - mi[i][j] * xi[j];
        si -= mr[i][j] * xi[j] + mi[i][j] * xr[j];
      end
      d = mr[i][i] * mr[i][i] + mi[i][i] * mi[i][i];
      xr[i] = (sr * mr[i][i] + si * mi[i][i]) / d;
      xi[i] = (si * mr[i][i] - sr * mi[i][i]) / d;
    end
  endtask

  function automatic int rnd(int m); return int'($urandom_range(2 * m)) - m; endfunction

  int seen, expect_idx, cyc;
  real maxerr;
  task automatic run_case(input int sh);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        am_re[i][j] = rnd(200000) >>> sh; am_im[i][j] = (i == j) ? 0 : rnd(200000) >>> sh;
      end
      am_re[i][i] = (2000000 + rnd(300000)) >>> sh;
      bv_re[i] = rnd(400000) >>> sh; bv_im[i] = rnd(400000) >>> sh;
    end
    ref_solve(sh);
    a_shl = SHW'(sh); b_shl = SHW'(sh);
    seen = 0; expect_idx = N - 1; maxerr = 0; cyc = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk); #1; cyc++;
      if (x_valid) begin
        real er, ei, e;
        checks++;
        if (int'(x_idx) != expect_idx) begin failures++; $display("FAIL order idx=%0d expected %0d", x_idx, expect_idx); end
        er = real'(x_re) / real'(1 << QF) - xr[x_idx]; ei = real'(x_im) / real'(1 << QF) - xi[x_idx];
        e = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 0.01) begin failures++; $display("FAIL x[%0d] = (%f,%f), reference (%f,%f)", x_idx,
          real'(x_re) / real'(1 << QF), real'(x_im) / real'(1 << QF), xr[x_idx], xi[x_idx]); end
        seen++; expect_idx--;
      end
    end
    checks++;
    if (seen != N) begin failures++; $display("FAIL %0d outputs", seen); end
    checks++;
    if (cyc > N * (N / 4 + 3) + N * (12 * N + N * NQ1 - N * (N - 4) / 8) + N * (16 + N / 4) + N * NQ1 + 20) begin
      failures++; $display("FAIL cycle count %0d over bound", cyc);
    end
    $display("case sh=%0d: %0d cycles, max error %f", sh, cyc, maxerr);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin bv_re[i] = 0; bv_im[i] = 0; for (int j = 0; j < N; j++) begin am_re[i][j] = 0; am_im[i][j] = 0; end end
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    run_case(0); run_case(0); run_case(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $display("watchdog"); $finish; end
endmodule
