// mac4_systolic: 4x1 complex vector-vector multiply-accumulate systolic array.
//
// Computes  psum_out = psum_in + sum_{k=0..3} a[k] * b[k]  (complex).  The array
// is a chain of four processing elements; element k adds a[k]*b[k] to the
// partial sum arriving from element k-1 and registers it.  Operands of element
// k are delayed k cycles inside the array, so the caller presents all four
// operand pairs and the incoming partial sum in the same cycle.  This is the
// arithmetic core shared by the convolution, cross-correlation and
// filter-decimate units, which fold longer sequences onto it four taps at a
// time (the partial-sum input carries the previous fold).  The skew registers
// and the operand widths are this design's choices.
//
// Timing: fully pipelined, one vector per cycle, LAT = 4 cycles from in_valid
// to out_valid.  The tag travels with the data.
module mac4_systolic #(
  parameter int unsigned AW   = 32,  // operand a width (each of re/im)
  parameter int unsigned BW   = 32,  // operand b width
  parameter int unsigned ACCW = 80,  // partial-sum width
  parameter int unsigned TAGW = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [TAGW-1:0]               in_tag,
  input  logic signed [3:0][AW-1:0]     a_re, a_im,
  input  logic signed [3:0][BW-1:0]     b_re, b_im,
  input  logic signed [ACCW-1:0]        psum_re, psum_im,
  output logic                          out_valid,
  output logic [TAGW-1:0]               out_tag,
  output logic signed [ACCW-1:0]        out_re, out_im
);
  localparam int unsigned PW = AW + BW + 1;

  logic signed [ACCW-1:0] ps_re [5], ps_im [5];
  logic [4:0]             vld;
  logic [TAGW-1:0]        tag [5];

  assign ps_re[0] = psum_re;
  assign ps_im[0] = psum_im;
  assign vld[0]   = in_valid;
  assign tag[0]   = in_tag;

  for (genvar k = 0; k < 4; k++) begin : g_pe
    // operand skew: element k uses operands delayed by k cycles
    logic signed [AW-1:0] ar_s [k+1], ai_s [k+1];
    logic signed [BW-1:0] br_s [k+1], bi_s [k+1];
    assign ar_s[0] = a_re[k];
    assign ai_s[0] = a_im[k];
    assign br_s[0] = b_re[k];
    assign bi_s[0] = b_im[k];
    for (genvar d = 1; d <= k; d++) begin : g_skew
      always_ff @(posedge clk) begin
        ar_s[d] <= ar_s[d-1]; ai_s[d] <= ai_s[d-1];
        br_s[d] <= br_s[d-1]; bi_s[d] <= bi_s[d-1];
      end
    end
    logic signed [PW-1:0] pr, pi;
    always_comb begin
      pr = PW'(ar_s[k] * br_s[k]) - PW'(ai_s[k] * bi_s[k]);
      pi = PW'(ar_s[k] * bi_s[k]) + PW'(ai_s[k] * br_s[k]);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[k+1] <= 1'b0;
      else        vld[k+1] <= vld[k];
    end
    always_ff @(posedge clk) begin
      ps_re[k+1] <= ps_re[k] + ACCW'(pr);
      ps_im[k+1] <= ps_im[k] + ACCW'(pi);
      tag[k+1]   <= tag[k];
    end
  end

  assign out_valid = vld[4];
  assign out_tag   = tag[4];
  assign out_re    = ps_re[4];
  assign out_im    = ps_im[4];
endmodule
