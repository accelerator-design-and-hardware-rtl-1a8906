// tb_qrd_internal_cell: checks the Givens internal cell bit-exactly.
// Random rotations (c, s) and operands (u, r) are applied every cycle in both
// modes.  QR mode reference: u' = (c u - s r) >> CSF and
// r' = (conj(s) u + c r) >> CSF; back-substitution mode: u' = u - (x r) >> QF
// with x on the s port and r passed through.  Both saturate to QW bits.  The
// output must follow its input by exactly LAT = 2 cycles.  A watchdog ends
// the run.
module tb_qrd_internal_cell;
  localparam int QW = 20, QF = 14, CSF = QW - 2;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, mode_bs = 0;
  logic signed [QW-1:0] c_in = 0, s_re = 0, s_im = 0, u_re = 0, u_im = 0, r_re = 0, r_im = 0;
  logic out_valid; logic signed [QW-1:0] u_out_re, u_out_im, r_out_re, r_out_im;
  qrd_internal_cell #(.QW(QW), .QF(QF)) dut (.*);

  function automatic longint satq(longint v);
    longint hi;
    hi = (longint'(1) <<< (QW - 1)) - 1;
    return v > hi ? hi : (v < -hi - 1 ? -hi - 1 : v);
  endfunction

  longint e_ur [$], e_ui [$], e_rr [$], e_ri [$];
  int vq [$];
  always @(negedge clk) if (rst_n) begin
    // expectation for the input applied in this cycle
    if (in_valid) begin
      longint cc, sr, si, ur, ui, rr, ri;
      cc = c_in; sr = s_re; si = s_im; ur = u_re; ui = u_im; rr = r_re; ri = r_im;
      if (mode_bs) begin
        e_ur.push_back(satq(ur - ((sr * rr - si * ri) >>> QF)));
        e_ui.push_back(satq(ui - ((sr * ri + si * rr) >>> QF)));
        e_rr.push_back(rr); e_ri.push_back(ri);
      end else begin
        e_ur.push_back(satq((cc * ur - sr * rr + si * ri) >>> CSF));
        e_ui.push_back(satq((cc * ui - sr * ri - si * rr) >>> CSF));
        e_rr.push_back(satq((sr * ur + si * ui + cc * rr) >>> CSF));
        e_ri.push_back(satq((sr * ui - si * ur + cc * ri) >>> CSF));
      end
    end
  end
  // latency: out_valid two cycles after in_valid
  logic v1, v2;
  always @(posedge clk) begin v1 <= in_valid; v2 <= v1; end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== v2) begin failures++; $display("FAIL latency"); end
    if (out_valid && e_ur.size() > 0) begin
      longint a, b, c, d;
      a = e_ur.pop_front(); b = e_ui.pop_front(); c = e_rr.pop_front(); d = e_ri.pop_front();
      checks++;
      if (u_out_re != a || u_out_im != b || r_out_re != c || r_out_im != d) begin
        failures++; $display("FAIL got %0d %0d %0d %0d want %0d %0d %0d %0d", u_out_re, u_out_im, r_out_re, r_out_im, a, b, c, d);
      end
    end
  end

  function automatic int rs(int m); return int'($urandom_range(2 * m)) - m; endfunction
  initial begin
    v1 = 0; v2 = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0); mode_bs = (i >= 500);
      c_in = QW'($urandom_range(1 << CSF)); s_re = QW'(rs(1 << (CSF - 1))); s_im = QW'(rs(1 << (CSF - 1)));
      u_re = QW'(rs(200000)); u_im = QW'(rs(200000)); r_re = QW'(rs(200000)); r_im = QW'(rs(200000));
      if (i % 97 == 0) begin u_re = QW'(524287); r_re = QW'(524287); s_re = QW'(-(1 << CSF)); end  // saturation
    end
    @(negedge clk) in_valid = 0; repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
