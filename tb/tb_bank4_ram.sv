// tb_bank4_ram: writes random samples to the four-bank memory and reads
// four consecutive samples from every base address (all four alignments),
// checking each lane one cycle later and that addresses past the end read 0.
module tb_bank4_ram;
  localparam int DEPTH = 203, W = 16, AW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [AW-1:0] waddr, rd_base;
  logic signed [W-1:0] wre, wim;
  logic signed [3:0][W-1:0] rd_re, rd_im;
  bank4_ram #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);
  logic signed [W-1:0] mr [DEPTH], mi [DEPTH];
  initial begin
    we = 0; waddr = 0; rd_base = 0; wre = 0; wim = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wre = W'($urandom); wim = W'($urandom); mr[a] = wre; mi[a] = wim;
    end
    @(negedge clk); we = 0;
    for (int b = 0; b < DEPTH + 2; b++) begin
      rd_base = AW'(b);
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        logic signed [W-1:0] er, ei;
        er = (b + k < DEPTH) ? mr[b+k] : '0;
        ei = (b + k < DEPTH) ? mi[b+k] : '0;
        if (b + k >= 4 * ((DEPTH + 3) / 4)) begin er = '0; ei = '0; end
        if (b + k < DEPTH || b + k >= 4 * ((DEPTH + 3) / 4)) begin
          checks++;
          if (rd_re[k] != er || rd_im[k] != ei) begin
            failures++;
            if (failures < 10) $display("FAIL base %0d lane %0d", b, k);
          end
        end
      end
    end
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
