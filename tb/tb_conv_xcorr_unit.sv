// tb_conv_xcorr_unit: self-checking test of the folded convolution /
// cross-correlation unit.  Random complex x and h vectors sit in two
// four-bank memories; the testbench runs full convolutions, truncated
// windows (negative and positive start) and cross-correlation lag blocks,
// and compares every output with a direct sum computed here.  It also checks
// the cycle count against ceil(h_len/4) * (out_len + 9) + 1.
module tb_conv_xcorr_unit;
  localparam int XW = 16, HW = 16, OW = 24, ACCW = 48, AW = 12, LW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // memories
  logic xwe, hwe;
  logic [AW-1:0] xwa, hwa;
  logic signed [XW-1:0] xwr, xwi;
  logic signed [HW-1:0] hwr, hwi;
  logic [AW-1:0] x_rd_base, h_rd_base;
  logic signed [3:0][XW-1:0] x_rd_re, x_rd_im;
  logic signed [3:0][HW-1:0] h_rd_re, h_rd_im;
  bank4_ram #(.DEPTH(1024), .W(XW), .AW(AW)) u_xm (.clk, .we(xwe), .waddr(xwa), .wre(xwr), .wim(xwi),
    .rd_base(x_rd_base), .rd_re(x_rd_re), .rd_im(x_rd_im));
  bank4_ram #(.DEPTH(1024), .W(HW), .AW(AW)) u_hm (.clk, .we(hwe), .waddr(hwa), .wre(hwr), .wim(hwi),
    .rd_base(h_rd_base), .rd_re(h_rd_re), .rd_im(h_rd_im));

  logic start, mode, busy, done, o_valid;
  logic [LW-1:0] x_len, h_len, out_len, o_idx;
  logic signed [LW:0] out_start;
  logic [AW-1:0] x_base, h_base;
  logic [6:0] out_shift;
  logic signed [OW-1:0] o_re, o_im;

  conv_xcorr_unit #(.XW(XW), .HW(HW), .OW(OW), .ACCW(ACCW), .AW(AW), .OMAX(256), .LW(LW)) dut (
    .clk, .rst_n, .start, .mode_xcorr(mode), .x_len, .h_len, .out_len, .out_start, .x_base, .h_base,
    .out_shift, .busy, .done, .x_rd_base, .x_rd_re, .x_rd_im, .h_rd_base, .h_rd_re, .h_rd_im,
    .o_valid, .o_idx, .o_re, .o_im);

  longint xr [1024], xi [1024], hr [1024], hi [1024];
  longint got_r [256], got_i [256];
  int     got_n;

  always @(posedge clk) if (o_valid) begin
    got_r[o_idx] = o_re; got_i[o_idx] = o_im; got_n++;
  end

  function automatic longint satw(longint v, int w);
    longint mx = (longint'(1) <<< (w-1)) - 1;
    if (v > mx) return mx;
    if (v < -mx-1) return -mx-1;
    return v;
  endfunction

  task automatic run(input bit m, input int xl, input int hl, input int os, input int ol,
                     input int xb, input int hb, input int sh);
    int cyc;
    longint er, ei, gr, gi, xv_r, xv_i;
    int xi_;
    @(negedge clk);
    mode = m; x_len = LW'(xl); h_len = LW'(hl); out_start = (LW+1)'(os); out_len = LW'(ol);
    x_base = AW'(xb); h_base = AW'(hb); out_shift = 7'(sh); start = 1; got_n = 0;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (got_n != ol) begin failures++; $display("FAIL count %0d vs %0d", got_n, ol); end
    checks++;
    if (cyc != ((hl + 3) / 4) * (ol + 9) + 1) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, ((hl + 3) / 4) * (ol + 9) + 1);
    end
    for (int o = 0; o < ol; o++) begin
      er = 0; ei = 0;
      for (int k = 0; k < hl; k++) begin
        if (m) begin gr = hr[hb + hl - 1 - k]; gi = -hi[hb + hl - 1 - k]; end
        else   begin gr = hr[hb + k];          gi =  hi[hb + k]; end
        xi_ = os + o - k;
        if (xi_ >= 0 && xi_ < xl) begin xv_r = xr[xb + xi_]; xv_i = xi[xb + xi_]; end
        else begin xv_r = 0; xv_i = 0; end
        er += gr * xv_r - gi * xv_i;
        ei += gr * xv_i + gi * xv_r;
      end
      er = satw(er >>> sh, OW); ei = satw(ei >>> sh, OW);
      checks++;
      if (got_r[o] != er || got_i[o] != ei) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d o=%0d got %0d,%0d exp %0d,%0d", m, o, got_r[o], got_i[o], er, ei);
      end
    end
  endtask

  initial begin
    start = 0; xwe = 0; hwe = 0; xwa = 0; hwa = 0; xwr = 0; xwi = 0; hwr = 0; hwi = 0;
    mode = 0; x_len = 0; h_len = 0; out_len = 0; out_start = 0; x_base = 0; h_base = 0; out_shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      xr[a] = longint'($signed(16'($urandom))); xi[a] = longint'($signed(16'($urandom)));
      hr[a] = longint'($signed(16'($urandom))); hi[a] = longint'($signed(16'($urandom)));
      xwe = 1; xwa = AW'(a); xwr = XW'(xr[a]); xwi = XW'(xi[a]);
      hwe = 1; hwa = AW'(a); hwr = HW'(hr[a]); hwi = HW'(hi[a]);
      @(negedge clk);
    end
    xwe = 0; hwe = 0;
    run(0, 125, 11, 0, 135, 0, 0, 8);      // full convolution z' * h_B
    run(0, 16, 11, 2, 16, 250, 500, 8);    // truncated r' * h_B with delay compensation
    run(0, 30, 7, -3, 40, 3, 17, 10);      // negative window start, odd offsets
    run(1, 200, 50, 49, 60, 100, 600, 12); // cross-correlation lags 0..59
    run(1, 64, 13, 12, 10, 0, 33, 30);     // saturation-free large shift, odd h length
    run(0, 20, 9, 0, 28, 5, 9, 0);         // no shift: saturation path exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
