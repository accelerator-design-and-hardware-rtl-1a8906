// tb_dcmb_beamformer_top_full: the end-to-end test of tb_dcmb_beamformer_top
// at the block's default sizes (10 tiles x 16 taps, 125-sample z', 11-tap
// h_B, decimation 8, 16 anti-alias taps, 30000 training samples), with no
// parameter overrides on the top.  Stimulus and checks are the same: exact
// z' against a reference decimation, correlation peak at DELAY, exact SM1
// phase cycle counts, 16 filter taps per update, d2 floor in the first and
// alpha*trace loading in the second update, and every mechanism on ev[] at
// least once.  Shifts are chosen for the longer correlation.  Two updates are
// about 5 M cycles; a watchdog ends the run.
module tb_dcmb_beamformer_top_full;
  localparam int NT = 10, TW = 16, ZL = 125, HB = 11, DEC = 8, AA = 16, LS = 30000, WIN = 4;
  localparam int NDIM = NT * TW, RHL = DEC * (TW - 1) + AA, ZHL = DEC * (ZL - 1) + AA, CAPL = LS + RHL - 1;
  localparam int DELAY = 3, NODE = 1, NEV = 24;
  localparam int TILW = $clog2(NT), TIW = $clog2(TW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_valid = 0; logic [3:0] ld_sel = 0; logic [15:0] ld_addr = 0;
  logic signed [31:0] ld_re = 0, ld_im = 0;
  logic [TILW-1:0] node_id = TILW'(NODE);
  logic [16:0] avg_b = 17'd16384; logic first_epoch = 1; logic [15:0] alpha_q = 16'h0800;
  logic signed [23:0] d2 = 0;
  logic [6:0] xc_shift = 7'd30, dec_shift = 7'd16, cv_shift = 7'd12, cov_shift = 7'd30;
  logic [4:0] w_shift = 5'd0;
  logic go = 0;
  logic busy, epoch_done, ex_valid, ex_is_r, w_valid, used_d2;
  logic [3:0] state; logic [15:0] ex_idx, peak_idx; logic [TIW-1:0] w_idx;
  logic signed [23:0] ex_re, ex_im, d_load; logic signed [11:0] w_re, w_im;
  logic [23:0] ev;

  dcmb_beamformer_top dut (.*);

  // mechanism counters
  int evc [NEV];
  string evname [NEV] = '{"load capture", "load training", "load AA coef", "load taper", "receive z'k",
    "receive r'k", "load h_B", "decimate z", "cross-correlate", "peak window gating", "decimate r",
    "exchange out", "convolve z'k", "convolve r'k", "write y'k", "covariance matmul", "average (running)",
    "average (first epoch)", "diag load alpha*tr", "diag load d2 floor", "QRD+back-substitution",
    "filter tap out", "epoch done", "wait for tiles"};
  always @(posedge clk) if (rst_n) for (int b = 0; b < NEV; b++) if (ev[b]) evc[b]++;

  int s_re [LS], s_im [LS], z_re [CAPL], z_im [CAPL];
  int g [AA];

  task automatic load(input int sel, input int addr, input int re, input int im);
    @(negedge clk); ld_valid = 1; ld_sel = 4'(sel); ld_addr = 16'(addr); ld_re = re; ld_im = im;
    @(negedge clk); ld_valid = 0;
  endtask

  function automatic int rnd(int m); return int'($urandom_range(2 * m)) - m; endfunction

  // exchange monitor: z' against the reference decimation
  int zc = 0, rc = 0;
  always @(posedge clk) if (rst_n && ex_valid) begin
    if (!ex_is_r) begin
      longint ar, ai; int er, ei;
      ar = 0; ai = 0;
      for (int k = 0; k < AA; k++) begin
        ar += longint'(g[k]) * z_re[DEC * ex_idx + AA - 1 - k];
        ai += longint'(g[k]) * z_im[DEC * ex_idx + AA - 1 - k];
      end
      er = int'(ar >>> 16); ei = int'(ai >>> 16);
      checks++;
      if (er != ex_re || ei != ex_im) begin
        failures++; $display("FAIL z'[%0d] = (%0d,%0d), expected (%0d,%0d)", ex_idx, ex_re, ex_im, er, ei);
      end
      zc++;
    end else rc++;
  end

  // filter tap monitor
  int wseen [TW];
  always @(posedge clk) if (rst_n && w_valid) wseen[w_idx]++;

  // phase durations
  int ph_cnt [16];
  logic [3:0] st_d;
  int ph_len [16];
  always @(posedge clk) begin
    st_d <= state;
    if (state != st_d) begin ph_len[st_d] = ph_cnt[st_d]; ph_cnt[state] = 1; end
    else ph_cnt[state]++;
  end

  task automatic send_tiles();
    for (int k = 0; k < NT; k++) if (k != NODE) begin
      for (int t = 0; t < ZL; t++) load(4, k * ZL + t, rnd(30000), rnd(30000));
      for (int t = 0; t < TW; t++) load(5, k * TW + t, (t == 1) ? 3000000 : rnd(200000), rnd(200000));
    end
  endtask

  task automatic run_epoch(input int ep);
    int cyc;
    for (int t = 0; t < TW; t++) wseen[t] = 0;
    @(negedge clk) go = 1; @(negedge clk) go = 0;
    cyc = 0;
    while (state != 4'd4) begin @(posedge clk); cyc++; end   // SM1 finished, waiting for tiles
    repeat (5) @(posedge clk);
    send_tiles();
    while (!epoch_done) @(posedge clk);
    @(posedge clk); #1;
    for (int t = 0; t < TW; t++) begin
      checks++;
      if (wseen[t] != 1) begin failures++; $display("FAIL epoch %0d tap %0d seen %0d times", ep, t, wseen[t]); end
    end
    checks++;
    if (peak_idx != 16'(DELAY)) begin failures++; $display("FAIL peak at %0d", peak_idx); end
    checks++;
    if (used_d2 != (ep == 0)) begin failures++; $display("FAIL epoch %0d used_d2=%0d", ep, used_d2); end
    // SM1 phase cycle counts (state 1: decimate z, 2: correlate, 3: decimate r)
    checks++;
    if (ph_len[1] != (AA + 3) / 4 * (ZL + 8) + 1 + 1) begin failures++; $display("FAIL decimation z took %0d", ph_len[1]); end
    checks++;
    if (ph_len[2] != (LS + 3) / 4 * (RHL + 9) + 1 + 1) begin failures++; $display("FAIL correlation took %0d", ph_len[2]); end
    checks++;
    if (ph_len[3] != (AA + 3) / 4 * (TW + 8) + 1 + 1) begin failures++; $display("FAIL decimation r took %0d", ph_len[3]); end
    $display("epoch %0d: d=%0d used_d2=%0d peak=%0d phases dz=%0d xc=%0d dr=%0d", ep, d_load, used_d2, peak_idx,
             ph_len[1], ph_len[2], ph_len[3]);
  endtask

  initial begin
    for (int b = 0; b < NEV; b++) evc[b] = 0;
    for (int i = 0; i < 16; i++) begin ph_cnt[i] = 0; ph_len[i] = 0; end
    for (int k = 0; k < AA; k++) g[k] = 4096;
    for (int t = 0; t < LS; t++) begin
      s_re[t] = ($urandom_range(1) != 0) ? 1000000 : -1000000;
      s_im[t] = ($urandom_range(1) != 0) ? 1000000 : -1000000;
    end
    for (int t = 0; t < CAPL; t++) begin
      z_re[t] = (t >= DELAY && t - DELAY < LS) ? s_re[t - DELAY] : 0;
      z_im[t] = (t >= DELAY && t - DELAY < LS) ? s_im[t - DELAY] : 0;
    end
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    for (int k = 0; k < AA; k++) load(2, k, g[k], 0);
    for (int t = 0; t < LS; t++) load(1, t, s_re[t], s_im[t]);
    for (int t = 0; t < CAPL; t++) load(0, t, z_re[t], z_im[t]);
    for (int r = 0; r < NDIM; r++) for (int c = 0; c < NDIM; c++) load(3, (r << $clog2(NDIM)) | c, 65536, 0);
    for (int k = 0; k < NT; k++) for (int t = 0; t < HB; t++) load(6, k * HB + t, (t == 0) ? 2000 : rnd(500), rnd(500));
    // update 1: first epoch, floor d2 dominates
    first_epoch = 1; d2 = 24'sd4000000;
    run_epoch(0);
    // update 2: running average, alpha * tr(C) / TW dominates
    first_epoch = 0; d2 = 24'sd1;
    run_epoch(1);
    checks++;
    if (zc != 2 * ZL || rc != 2 * TW) begin failures++; $display("FAIL exchange counts z=%0d r=%0d", zc, rc); end
    for (int b = 0; b < NEV; b++) begin
      checks++;
      if (evc[b] == 0) begin failures++; $display("FAIL mechanism never happened: %s", evname[b]); end
      else $display("mechanism %-24s : %0d", evname[b], evc[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #300ms; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
