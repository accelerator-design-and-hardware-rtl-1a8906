// tb_qrd_boundary_cell: checks the Givens boundary cell in both modes.
// QR mode: for random real r >= 0 and complex u the cell must return
// r' = sqrt(r^2 + |u|^2), c = r / r' and |s| = |u| / r' (within 2e-3 of full
// scale), with c^2 + |s|^2 = 1; u = 0 must give c = 1, s = 0, r' = r.
// Back-substitution mode: x = u / r.  The result must appear exactly four
// cycles after the input (cell latency).  A watchdog ends the run.
module tb_qrd_boundary_cell;
  localparam int QW = 20, QF = 14, CSF = QW - 2;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, mode_bs = 0;
  logic signed [QW-1:0] r_in = 0, u_re = 0, u_im = 0;
  logic out_valid; logic signed [QW-1:0] c_out, s_re, s_im, r_out;
  qrd_boundary_cell #(.QW(QW), .QF(QF)) dut (.*);

  function automatic real ab(real v); return v < 0 ? -v : v; endfunction

  task automatic one(input bit bs, input int r, input int ur, input int ui);
    real rr, uu, rp, c, sm;
    int n;
    @(negedge clk) in_valid = 1; mode_bs = bs; r_in = QW'(r); u_re = QW'(ur); u_im = QW'(ui);
    @(negedge clk) in_valid = 0;
    n = 1;
    while (!out_valid && n < 10) begin @(negedge clk); n++; end
    checks++;
    if (n != 4) begin failures++; $display("FAIL latency %0d", n); end
    rr = real'(r) / 2.0 ** QF;
    uu = $sqrt(real'(ur) * ur + real'(ui) * ui) / 2.0 ** QF;
    if (!bs) begin
      rp = $sqrt(rr * rr + uu * uu);
      c = real'(c_out) / 2.0 ** CSF;
      sm = $sqrt(real'(s_re) * s_re + real'(s_im) * s_im) / 2.0 ** CSF;
      checks += 3;
      if (ab(real'(r_out) / 2.0 ** QF - rp) > 2e-3 * (1.0 + rp)) begin failures++; $display("FAIL r' %f want %f", real'(r_out) / 2.0 ** QF, rp); end
      if (ab(c - (rp == 0 ? 1.0 : rr / rp)) > 2e-3) begin failures++; $display("FAIL c %f want %f", c, rr / rp); end
      if (ab(sm - (rp == 0 ? 0.0 : uu / rp)) > 2e-3) begin failures++; $display("FAIL |s| %f want %f", sm, uu / rp); end
    end else begin
      real xr, xi;
      xr = real'(ur) / real'(r); xi = real'(ui) / real'(r);
      checks += 2;
      if (ab(real'(s_re) / 2.0 ** QF - xr) > 2e-3 * (1.0 + ab(xr))) begin failures++; $display("FAIL x re %f want %f", real'(s_re) / 2.0 ** QF, xr); end
      if (ab(real'(s_im) / 2.0 ** QF - xi) > 2e-3 * (1.0 + ab(xi))) begin failures++; $display("FAIL x im %f want %f", real'(s_im) / 2.0 ** QF, xi); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    one(0, 16384, 0, 0);
    one(0, 0, 8000, -3000);
    for (int i = 0; i < 300; i++)
      one(0, $urandom_range(60000), int'($urandom_range(60000)) - 30000, int'($urandom_range(60000)) - 30000);
    for (int i = 0; i < 300; i++)
      one(1, 8000 + $urandom_range(60000), int'($urandom_range(60000)) - 30000, int'($urandom_range(60000)) - 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
