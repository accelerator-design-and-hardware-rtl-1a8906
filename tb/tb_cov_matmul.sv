// tb_cov_matmul: self-checking test of the implicit-Toeplitz covariance unit
// at a reduced size (3 tiles, 8 taps, 20-sample vectors, 24 x 24 output).
// Random vectors are written, the expected normalisation shift and every
// element of C = Ytilde Ytilde^H are computed here from an explicitly built
// Ytilde, and the whole streamed output (each element exactly once) and the
// cycle count (NB^2 * (YL + TW + 7) + 1) are checked.
module tb_cov_matmul;
  localparam int NT = 3, TW = 8, YL = 20, W = 24, ACCW = 64, NDIM = NT * TW;
  localparam int IW = $clog2(NDIM), YAW = $clog2(YL + TW), TILW = 2, NB = NDIM / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic y_clear, y_we, start, busy, done, c_valid;
  logic [TILW-1:0] y_tile; logic [YAW-1:0] y_idx;
  logic signed [W-1:0] y_re, y_im;
  logic [6:0] out_shift;
  logic [$clog2(W)-1:0] norm_shl;
  logic [IW-1:0] c_row, c_col;
  logic signed [3:0][W-1:0] c_re, c_im;

  cov_matmul #(.NT(NT), .TW(TW), .YL(YL), .W(W), .ACCW(ACCW)) dut (.*);

  longint yr [NT][YL], yi [NT][YL];
  longint got_r [NDIM][NDIM], got_i [NDIM][NDIM];
  int seen [NDIM][NDIM];

  always @(posedge clk) if (c_valid) for (int b = 0; b < 4; b++) begin
    got_r[c_row][c_col + b] = $signed(c_re[b]); got_i[c_row][c_col + b] = $signed(c_im[b]);
    seen[c_row][c_col + b]++;
  end

  function automatic longint ytl_r(int row, int t, int sh);
    int n = row / TW, i = row % TW;
    if (t - i < 0 || t - i >= YL) return 0;
    return yr[n][t - i] <<< sh;
  endfunction
  function automatic longint ytl_i(int row, int t, int sh);
    int n = row / TW, i = row % TW;
    if (t - i < 0 || t - i >= YL) return 0;
    return yi[n][t - i] <<< sh;
  endfunction

  initial begin
    int cyc, sh, maxbits;
    longint mx, er, ei;
    y_clear = 0; y_we = 0; y_tile = 0; y_idx = 0; y_re = 0; y_im = 0; start = 0; out_shift = 20;
    foreach (seen[r, c]) seen[r][c] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    y_clear = 1; @(negedge clk); y_clear = 0;
    mx = 0;
    for (int n = 0; n < NT; n++)
      for (int t = 0; t < YL; t++) begin
        yr[n][t] = longint'($signed(18'($urandom))) >>> 3;   // |v| < 2^14
        yi[n][t] = longint'($signed(18'($urandom))) >>> 3;
        if ((yr[n][t] < 0 ? -yr[n][t] - 1 : yr[n][t]) > mx) mx = (yr[n][t] < 0 ? -yr[n][t] - 1 : yr[n][t]);
        if ((yi[n][t] < 0 ? -yi[n][t] - 1 : yi[n][t]) > mx) mx = (yi[n][t] < 0 ? -yi[n][t] - 1 : yi[n][t]);
        y_we = 1; y_tile = TILW'(n); y_idx = YAW'(t); y_re = W'(yr[n][t]); y_im = W'(yi[n][t]);
        @(negedge clk);
      end
    y_we = 0;
    maxbits = 0;
    while ((longint'(1) <<< maxbits) <= mx) maxbits++;
    sh = (W - 1 - maxbits) - 1;   // one guard bit below the sign
    @(negedge clk);
    checks++;
    if (int'(norm_shl) != sh) begin failures++; $display("FAIL shift %0d exp %0d", norm_shl, sh); end
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NB * NB * (YL + TW + 7) + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    for (int r = 0; r < NDIM; r++)
      for (int c = 0; c < NDIM; c++) begin
        er = 0; ei = 0;
        for (int t = 0; t < YL + TW - 1; t++) begin
          er += ytl_r(r, t, sh) * ytl_r(c, t, sh) + ytl_i(r, t, sh) * ytl_i(c, t, sh);
          ei += ytl_i(r, t, sh) * ytl_r(c, t, sh) - ytl_r(r, t, sh) * ytl_i(c, t, sh);
        end
        er = er >>> 20; ei = ei >>> 20;
        if (er > 8388607) er = 8388607; if (er < -8388608) er = -8388608;
        if (ei > 8388607) ei = 8388607; if (ei < -8388608) ei = -8388608;
        checks++;
        if (seen[r][c] != 1 || got_r[r][c] != er || got_i[r][c] != ei) begin
          failures++;
          if (failures < 10) $display("FAIL C[%0d][%0d] got %0d,%0d exp %0d,%0d seen %0d", r, c, got_r[r][c], got_i[r][c], er, ei, seen[r][c]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
