// avg_taper: exponential moving average and tapering of the covariance matrix.
//
// For every element of the current estimate C arriving on the input stream
// (four elements of one row per cycle, lane b at column col+b) the unit forms
//   C_t = (1 - b) * C_{t-1} + b * C           (forgetting factor b = avg_b / 2^BF)
//   out = C_t * T                             (T: taper coefficient, real)
// stores C_t back as the history for the next epoch and sends the tapered
// value on.  Four identical lanes work in parallel on four columns.  The
// history C_{t-1} and the taper matrix T (the space-time sinc taper of the
// design, precomputed and written through the t_* port, one coefficient per
// element, value t_data / 2^(TCW-2); t_row/t_col address it) live in memories of the unit.  With
// first_epoch set the history is ignored (C_t = C), which starts the average.
//
// Averaging as a weighted sum followed by the taper multiply, four parallel
// units and the three memories follow the design; the fixed-point formats,
// the truncating rounding and the first-epoch rule are this implementation's
// choices.  Timing: fully pipelined, one input row-quad per cycle, output
// LAT = 3 cycles later with the same row/column tags.
module avg_taper #(
  parameter int unsigned NDIM = 160,
  parameter int unsigned W    = 24,
  parameter int unsigned BF   = 16,   // forgetting-factor fraction bits
  parameter int unsigned TCW  = 18,   // taper coefficient width, 2 integer bits
  parameter int unsigned IW   = $clog2(NDIM)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration
  input  logic [BF:0]               avg_b,        // b * 2^BF, 0 .. 2^BF
  input  logic                      first_epoch,
  // taper matrix load (row-major element address)
  input  logic                      t_we,
  input  logic [IW-1:0]             t_row, t_col,
  input  logic signed [TCW-1:0]     t_data,
  // input stream
  input  logic                      in_valid,
  input  logic [IW-1:0]             in_row, in_col,
  input  logic signed [3:0][W-1:0]  in_re, in_im,
  // output stream
  output logic                      out_valid,
  output logic [IW-1:0]             out_row, out_col,
  output logic signed [3:0][W-1:0]  out_re, out_im
);
  import dcmb_pkg::sat;
  localparam int unsigned NQ  = NDIM / 4;           // row-quads per row
  localparam int unsigned QAW = $clog2(NDIM * NQ);

  logic [QAW-1:0] qa_in;
  assign qa_in = QAW'(in_row) * QAW'(NQ) + QAW'(in_col >> 2);

  // stage 1: memory reads
  logic                 v1, v2;
  logic [IW-1:0]        r1, c1, r2, c2;
  logic [QAW-1:0]       a1;
  logic signed [3:0][W-1:0] x1_re, x1_im;
  logic [2*W-1:0]       h1 [4];
  logic signed [TCW-1:0] t1 [4], t2 [4];
  logic signed [W-1:0]  avg_re [4], avg_im [4];

  for (genvar b = 0; b < 4; b++) begin : g_lane
    logic [2*W-1:0]        hist  [NDIM * NQ];
    logic signed [TCW-1:0] taper [NDIM * NQ];
    logic [QAW-1:0]        qa_t;
    assign qa_t = QAW'(t_row) * QAW'(NQ) + QAW'(t_col >> 2);
    always_ff @(posedge clk) begin
      if (t_we && t_col[1:0] == 2'(b)) taper[qa_t] <= t_data;
      h1[b] <= hist[qa_in];
      t1[b] <= taper[qa_in];
    end

    // stage 2: weighted average, written back to the history
    logic signed [W+BF+2:0] sr, si;
    logic signed [W-1:0]    hr, hi;
    assign hr = first_epoch ? x1_re[b] : signed'(h1[b][2*W-1:W]);
    assign hi = first_epoch ? x1_im[b] : signed'(h1[b][W-1:0]);
    always_comb begin
      sr = (W+BF+3)'(hr) * signed'({2'b0, ((BF+1)'(1) << BF) - avg_b})
         + (W+BF+3)'($signed(x1_re[b])) * signed'({2'b0, avg_b});
      si = (W+BF+3)'(hi) * signed'({2'b0, ((BF+1)'(1) << BF) - avg_b})
         + (W+BF+3)'($signed(x1_im[b])) * signed'({2'b0, avg_b});
    end
    always_ff @(posedge clk) begin
      if (v1) begin
        avg_re[b] <= W'(sr >>> BF);
        avg_im[b] <= W'(si >>> BF);
        hist[a1] <= {W'(sr >>> BF), W'(si >>> BF)};
      end
      t2[b] <= t1[b];
    end

    // stage 3: taper
    logic signed [W+TCW-1:0] pr, pi;
    always_comb begin
      pr = (W+TCW)'(avg_re[b]) * (W+TCW)'(t2[b]);
      pi = (W+TCW)'(avg_im[b]) * (W+TCW)'(t2[b]);
    end
    always_ff @(posedge clk) begin
      out_re[b] <= W'(sat(128'(pr >>> (TCW - 2)), W));
      out_im[b] <= W'(sat(128'(pi >>> (TCW - 2)), W));
    end
  end

  always_ff @(posedge clk) begin
    a1 <= qa_in; r1 <= in_row; c1 <= in_col; x1_re <= in_re; x1_im <= in_im;
    r2 <= r1; c2 <= c1; out_row <= r2; out_col <= c2;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0; end
    else begin v1 <= in_valid; v2 <= v1; out_valid <= v2; end
  end
endmodule
