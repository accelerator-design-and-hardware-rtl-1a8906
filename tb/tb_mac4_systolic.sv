// tb_mac4_systolic: drives one random operand vector per cycle into the 4x1
// systolic array and checks every result (psum + sum a[k]*b[k]) and that it
// appears exactly four cycles after its inputs.
module tb_mac4_systolic;
  localparam int AW = 16, BW = 16, ACCW = 48, TAGW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  logic [TAGW-1:0] in_tag, out_tag;
  logic signed [3:0][AW-1:0] a_re, a_im;
  logic signed [3:0][BW-1:0] b_re, b_im;
  logic signed [ACCW-1:0] psum_re, psum_im, out_re, out_im;
  mac4_systolic #(.AW(AW), .BW(BW), .ACCW(ACCW), .TAGW(TAGW)) dut (.*);
  longint exp_r [256], exp_i [256];
  int issue_cyc [256];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_re != exp_r[out_tag[7:0]] || out_im != exp_i[out_tag[7:0]] || cyc - issue_cyc[out_tag[7:0]] != 4) begin
      failures++;
      if (failures < 10) $display("FAIL tag %0d got %0d,%0d exp %0d,%0d lat %0d", out_tag, out_re, out_im,
                                  exp_r[out_tag[7:0]], exp_i[out_tag[7:0]], cyc - issue_cyc[out_tag[7:0]]);
    end
  end
  initial begin
    in_valid = 0; in_tag = 0; a_re = '0; a_im = '0; b_re = '0; b_im = '0; psum_re = '0; psum_im = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 256; n++) begin
      longint er, ei;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0; in_tag = TAGW'(n);
      psum_re = ACCW'($signed(32'($urandom))); psum_im = ACCW'($signed(32'($urandom)));
      er = psum_re; ei = psum_im;
      for (int k = 0; k < 4; k++) begin
        a_re[k] = AW'($urandom); a_im[k] = AW'($urandom); b_re[k] = BW'($urandom); b_im[k] = BW'($urandom);
        er += longint'($signed(a_re[k])) * $signed(b_re[k]) - longint'($signed(a_im[k])) * $signed(b_im[k]);
        ei += longint'($signed(a_re[k])) * $signed(b_im[k]) + longint'($signed(a_im[k])) * $signed(b_re[k]);
      end
      exp_r[n] = er; exp_i[n] = ei; issue_cyc[n] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    if (checks < 150) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
