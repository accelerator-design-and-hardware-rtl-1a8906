// tb_fir_decim: self-checking test of the filter-and-decimate unit.  Loads a
// random real filter and random complex input into a four-bank memory,
// decimates by 8 with 16 and with 13 taps (the second exercising a partial
// last fold) and compares every output with the direct sum
// y[m] = sum_k g[k] x[8m + K - 1 - k].  Checks the cycle count
// ceil(K/4) * (n_out + 8) + 1.
module tb_fir_decim;
  localparam int XW = 16, CW = 14, OW = 24, ACCW = 48, AW = 12, LW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic xwe; logic [AW-1:0] xwa; logic signed [XW-1:0] xwr, xwi;
  logic [AW-1:0] x_rd_base;
  logic signed [3:0][XW-1:0] x_rd_re, x_rd_im;
  bank4_ram #(.DEPTH(1100), .W(XW), .AW(AW)) u_xm (.clk, .we(xwe), .waddr(xwa), .wre(xwr), .wim(xwi),
    .rd_base(x_rd_base), .rd_re(x_rd_re), .rd_im(x_rd_im));

  logic coef_we; logic [5:0] coef_addr; logic signed [CW-1:0] coef_data;
  logic start, busy, done, o_valid;
  logic [LW-1:0] x_len, n_out, o_idx;
  logic [6:0] n_taps;
  logic [AW-1:0] x_base;
  logic [6:0] out_shift;
  logic signed [OW-1:0] o_re, o_im;

  fir_decim #(.XW(XW), .CW(CW), .OW(OW), .ACCW(ACCW), .AW(AW), .DEC(8), .AAMAX(64), .OMAX(128), .LW(LW)) dut (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data, .start, .x_len, .n_out, .n_taps, .x_base,
    .out_shift, .busy, .done, .x_rd_base, .x_rd_re, .x_rd_im, .o_valid, .o_idx, .o_re, .o_im);

  longint xr [1100], xi [1100], g [64], got_r [128], got_i [128];
  int got_n;
  always @(posedge clk) if (o_valid) begin got_r[o_idx] = o_re; got_i[o_idx] = o_im; got_n++; end

  function automatic longint satw(longint v);
    longint mx = (longint'(1) <<< (OW-1)) - 1;
    if (v > mx) return mx;
    if (v < -mx-1) return -mx-1;
    return v;
  endfunction

  task automatic run(input int xl, input int no, input int k, input int xb, input int sh);
    int cyc; longint er, ei; int idx;
    for (int a = 0; a < k; a++) begin
      @(negedge clk); coef_we = 1; coef_addr = 6'(a); coef_data = CW'(g[a]);
    end
    @(negedge clk); coef_we = 0;
    x_len = LW'(xl); n_out = LW'(no); n_taps = 7'(k); x_base = AW'(xb); out_shift = 7'(sh);
    start = 1; got_n = 0;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (got_n != no) begin failures++; $display("FAIL count %0d", got_n); end
    checks++;
    if (cyc != ((k + 3) / 4) * (no + 8) + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    for (int m = 0; m < no; m++) begin
      er = 0; ei = 0;
      for (int t = 0; t < k; t++) begin
        idx = 8 * m + k - 1 - t;
        if (idx >= 0 && idx < xl) begin er += g[t] * xr[xb + idx]; ei += g[t] * xi[xb + idx]; end
      end
      er = satw(er >>> sh); ei = satw(ei >>> sh);
      checks++;
      if (got_r[m] != er || got_i[m] != ei) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d got %0d,%0d exp %0d,%0d", m, got_r[m], got_i[m], er, ei);
      end
    end
  endtask

  initial begin
    start = 0; xwe = 0; xwa = 0; xwr = 0; xwi = 0; coef_we = 0; coef_addr = 0; coef_data = 0;
    x_len = 0; n_out = 0; n_taps = 0; x_base = 0; out_shift = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 1100; a++) begin
      xr[a] = longint'($signed(16'($urandom))); xi[a] = longint'($signed(16'($urandom)));
      xwe = 1; xwa = AW'(a); xwr = XW'(xr[a]); xwi = XW'(xi[a]); @(negedge clk);
    end
    xwe = 0;
    for (int a = 0; a < 64; a++) g[a] = longint'($signed(14'($urandom)));
    run(1008, 125, 16, 0, 8);   // z_HIGH excerpt -> 125 samples
    run(136, 16, 16, 40, 8);    // r'_HIGH -> 16 lags
    run(120, 14, 13, 7, 4);     // partial last fold
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
