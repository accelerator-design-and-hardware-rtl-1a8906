// tb_rsqrt_lut2: checks the two-table inverse square root.
// Random inputs spread over the whole input range (random bit length) and a
// few edge values are applied one per cycle; every result is compared with
// 1/sqrt(S) computed in real arithmetic (relative error bound 2e-4), the
// zero flag is checked for S = 0, and the result must appear exactly two
// cycles after its input (pipeline latency).  A watchdog ends the run.
module tb_rsqrt_lut2;
  localparam int SW = 42, G = 16, EW = $clog2(SW);
  logic clk = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0; logic [SW-1:0] s = 0;
  logic out_valid; logic [G:0] rsm; logic [EW-1:0] e2; logic zero;
  rsqrt_lut2 #(.SW(SW), .G(G)) dut (.*);

  logic [SW-1:0] hist [3];
  logic          hv [3];
  always @(posedge clk) begin
    hist[2] <= hist[1]; hist[1] <= hist[0]; hist[0] <= s;
    hv[2] <= hv[1]; hv[1] <= hv[0]; hv[0] <= in_valid;
  end
  logic armed = 0;   // pipeline flushed after the first cycles
  always @(negedge clk) if (armed) begin
    checks++;
    if (out_valid !== hv[1]) begin failures++; $display("FAIL latency: out_valid=%0d", out_valid); end
    if (out_valid) begin
      real want, got, rel;
      checks++;
      if (hist[1] == 0) begin
        if (!zero) begin failures++; $display("FAIL zero flag"); end
      end else begin
        want = 1.0 / $sqrt(real'(hist[1]));
        got = real'(rsm) / (2.0 ** real'(G + int'(e2)));
        rel = (got - want) / want; if (rel < 0) rel = -rel;
        if (rel > 2e-4 || zero) begin failures++; $display("FAIL S=%0d got %e want %e", hist[1], got, want); end
      end
    end
  end
  initial begin
    hv[0] = 0; hv[1] = 0; hv[2] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) armed = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      case (i)
        0: s = 0; 1: s = 1; 2: s = 2; 3: s = 3; 4: s = '1;
        default: s = {$urandom, $urandom} >> (64 - $urandom_range(SW, 1));
      endcase
    end
    @(negedge clk) in_valid = 0; repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
