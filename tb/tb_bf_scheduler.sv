// tb_bf_scheduler: checks the phase sequence of one update.
// Behavioural unit models answer each start pulse with done after a random
// delay.  The testbench records the order of the start pulses and checks it
// against the design's sequence (decimate z, correlate, decimate r, wait for
// all tiles, NT x (convolve z'_k, convolve r'_k) with k counting up, covariance,
// loading, QRD, epoch_done), checks that each start follows the previous
// unit's done by exactly one clock (start is high in the cycle after done), that nothing starts while tiles are
// missing, and that the clear pulses and busy behave.  Two updates are run.
// A watchdog ends the run.
module tb_bf_scheduler;
  localparam int NT = 10, TILW = $clog2(NT);
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic go = 0; logic [NT-1:0] rx_ready = '0;
  logic dec_done = 0, xc_done = 0, cv_done = 0, mm_done = 0, dl_done = 0, qr_done = 0;
  logic dec_start, dec_sel_r, xc_start, cv_start, cv_sel_r, mm_start, dl_start, qr_start;
  logic epoch_clear, sm2_clear, busy, epoch_done; logic [TILW-1:0] cv_k; logic [3:0] state;
  bf_scheduler #(.NT(NT)) dut (.*);

  string seq [$];
  int last_done_cyc = -100, cyc = 0;
  always @(posedge clk) cyc++;

  // unit models
  task automatic unit(ref logic d, input int lo, input int hi);
    repeat ($urandom_range(hi, lo)) @(posedge clk);
    @(negedge clk) d = 1; last_done_cyc = cyc; @(negedge clk) d = 0;
  endtask
  always @(posedge clk) if (rst_n) begin
    string tag;
    tag = "";
    if (dec_start) tag = dec_sel_r ? "DR" : "DZ";
    if (xc_start)  tag = "XC";
    if (cv_start)  tag = $sformatf("%s%0d", cv_sel_r ? "CR" : "CZ", cv_k);
    if (mm_start)  tag = "MM";
    if (dl_start)  tag = "DL";
    if (qr_start)  tag = "QR";
    if (epoch_done) tag = "END";
    if (tag != "") begin
      seq.push_back(tag);
      if (tag != "DZ") begin
        checks++;
        if (cyc - last_done_cyc != 2) begin failures++; $display("FAIL %s started %0d cycles after done", tag, cyc - last_done_cyc); end
      end
      if (tag.substr(0, 0) == "C" && rx_ready != '1) begin failures++; $display("FAIL convolution before all tiles"); end
    end
  end
  // dones arrive a few cycles after the matching start (sampled at posedge)
  always @(posedge clk) begin
    if (dec_start) fork unit(dec_done, 2, 20); join_none
    if (xc_start)  fork unit(xc_done, 2, 30);  join_none
    if (cv_start)  fork unit(cv_done, 2, 10);  join_none
    if (mm_start)  fork unit(mm_done, 2, 30);  join_none
    if (dl_start)  fork unit(dl_done, 2, 10);  join_none
    if (qr_start)  fork unit(qr_done, 2, 40);  join_none
  end

  initial begin
    string want [$];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int ep = 0; ep < 2; ep++) begin
      seq.delete();
      @(negedge clk) go = 1; @(negedge clk) go = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); end
      wait (state == 4'd4);
      repeat (30) @(posedge clk);
      checks++;
      if (state != 4'd4) begin failures++; $display("FAIL left the wait without tiles"); end
      for (int k = 0; k < NT; k++) begin @(negedge clk) rx_ready[k] = 1; end
      last_done_cyc = cyc;
      wait (epoch_done); @(negedge clk) rx_ready = '0;
      repeat (2) @(posedge clk);
      want = '{"DZ", "XC", "DR"};
      for (int k = 0; k < NT; k++) begin want.push_back($sformatf("CZ%0d", k)); want.push_back($sformatf("CR%0d", k)); end
      want.push_back("MM"); want.push_back("DL"); want.push_back("QR"); want.push_back("END");
      checks++;
      if (seq.size() != want.size()) begin failures++; $display("FAIL %0d steps, want %0d", seq.size(), want.size()); end
      else for (int i = 0; i < want.size(); i++) begin
        checks++;
        if (seq[i] != want[i]) begin failures++; $display("FAIL step %0d: %s want %s", i, seq[i], want[i]); end
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int nclr = 0, nclr2 = 0;
  always @(posedge clk) begin if (epoch_clear) nclr++; if (sm2_clear) nclr2++; end
  final if (nclr != 2 || nclr2 != 2) $display("note: clears %0d %0d", nclr, nclr2);
  initial begin #1ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
