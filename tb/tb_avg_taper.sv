// tb_avg_taper: self-checking test of the average/taper unit at NDIM = 8.
// Loads a random taper matrix, runs three epochs of random covariance
// estimates (the first with first_epoch set, the others with two different
// forgetting factors), and compares every output with the exponential
// moving average and taper computed here.  Checks the 3-cycle latency.
module tb_avg_taper;
  localparam int NDIM = 8, W = 24, BF = 16, TCW = 18, IW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [BF:0] avg_b; logic first_epoch;
  logic t_we; logic [IW-1:0] t_row, t_col; logic signed [TCW-1:0] t_data;
  logic in_valid, out_valid; logic [IW-1:0] in_row, in_col, out_row, out_col;
  logic signed [3:0][W-1:0] in_re, in_im, out_re, out_im;
  avg_taper #(.NDIM(NDIM), .W(W), .BF(BF), .TCW(TCW)) dut (.*);

  longint T [NDIM][NDIM], H_r [NDIM][NDIM], H_i [NDIM][NDIM], E_r [NDIM][NDIM], E_i [NDIM][NDIM];
  int issue [NDIM][NDIM / 4];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic longint satw(longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction

  always @(negedge clk) if (out_valid) for (int b = 0; b < 4; b++) begin
    checks++;
    if ($signed(out_re[b]) != E_r[out_row][out_col + b] || $signed(out_im[b]) != E_i[out_row][out_col + b]
        || cyc - issue[out_row][out_col / 4] != 3) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d][%0d] got %0d exp %0d", out_row, out_col + b, $signed(out_re[b]), E_r[out_row][out_col + b]);
    end
  end

  task automatic epoch(input bit first, input int b);
    longint xr, xi, ar, ai;
    avg_b = (BF+1)'(b); first_epoch = first;
    for (int r = 0; r < NDIM; r++)
      for (int q = 0; q < NDIM / 4; q++) begin
        @(negedge clk);
        in_valid = 1; in_row = IW'(r); in_col = IW'(4 * q); issue[r][q] = cyc;
        for (int l = 0; l < 4; l++) begin
          int c = 4 * q + l;
          xr = longint'($signed(22'($urandom))); xi = longint'($signed(22'($urandom)));
          in_re[l] = W'(xr); in_im[l] = W'(xi);
          if (first) begin ar = xr; ai = xi; end
          else begin
            ar = ((longint'(65536 - b) * H_r[r][c]) + longint'(b) * xr) >>> BF;
            ai = ((longint'(65536 - b) * H_i[r][c]) + longint'(b) * xi) >>> BF;
          end
          H_r[r][c] = ar; H_i[r][c] = ai;
          E_r[r][c] = satw((ar * T[r][c]) >>> (TCW - 2));
          E_i[r][c] = satw((ai * T[r][c]) >>> (TCW - 2));
        end
      end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    avg_b = 0; first_epoch = 0; t_we = 0; t_row = 0; t_col = 0; t_data = 0;
    in_valid = 0; in_row = 0; in_col = 0; in_re = '0; in_im = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < NDIM; r++)
      for (int c = 0; c < NDIM; c++) begin
        @(negedge clk);
        T[r][c] = (r == c) ? 65536 : longint'($urandom % 65537);   // taper in [0, 1]
        t_we = 1; t_row = IW'(r); t_col = IW'(c); t_data = TCW'(T[r][c]);
      end
    @(negedge clk); t_we = 0;
    epoch(1, 0);
    epoch(0, 16384);   // b = 0.25
    epoch(0, 52429);   // b = 0.8
    if (checks != 3 * NDIM * NDIM) failures++;
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
