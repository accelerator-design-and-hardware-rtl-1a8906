// peak_window: locates the main peak of the cross-correlation r'_HIGH and
// gates the samples around it.
//
// The cross-correlator's output stream (in_valid, in_idx, in_re/in_im) is
// watched while it is written to memory; the index with the largest
// |r|^2 = re^2 + im^2 is kept (the first one wins on ties).  Afterwards the
// four query lanes q_idx[l] return q_keep[l] = 1 when |q_idx - peak| <= WIN,
// so the reader of the stored correlation (the r'_n decimator) can zero
// every lag outside the window: the channel estimate then contains only the
// direct path taps and not correlation side lobes.  clear starts a new search.
//
// Timing: one-cycle update per input sample; q_keep is combinational from the
// registered peak.  The use of a peak window is this design's reading of the
// correlation step (the window half-width WIN is a free parameter); the
// squared-magnitude search is the implementation's choice.
module peak_window #(
  parameter int unsigned W   = 32,
  parameter int unsigned LW  = 16,
  parameter int unsigned WIN = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [LW-1:0]        in_idx,
  input  logic signed [W-1:0]  in_re, in_im,
  input  logic [3:0][LW-1:0]   q_idx,
  output logic [3:0]           q_keep,
  output logic [LW-1:0]        peak_idx,
  output logic                 found
);
  logic [2*W:0] best, mag;
  always_comb mag = (2*W+1)'(in_re * in_re) + (2*W+1)'(in_im * in_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best <= '0; peak_idx <= '0; found <= 1'b0;
    end else if (clear) begin
      best <= '0; peak_idx <= '0; found <= 1'b0;
    end else if (in_valid && (!found || mag > best)) begin
      best <= mag; peak_idx <= in_idx; found <= 1'b1;
    end
  end

  always_comb
    for (int l = 0; l < 4; l++)
      q_keep[l] = found && ((q_idx[l] >= peak_idx) ? (q_idx[l] - peak_idx <= LW'(WIN))
                                                   : (peak_idx - q_idx[l] <= LW'(WIN)));
endmodule
