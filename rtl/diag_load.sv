// diag_load: diagonal loading of the post-processed covariance matrix.
//
// The averaged and tapered matrix arrives on the input stream (four elements
// of one row per cycle) and is stored in four column-interleaved memories;
// the real parts of the diagonal are summed on the way in.  On start the unit
// computes the two candidate loading levels
//   d1 = alpha * tr(C) / TW      (alpha = alpha_q / 2^16)
//   d2 = d2_in                   (calibrated noise floor, already in the
//                                 matrix format)
// takes d = max(d1, d2), adds d to the real part of every diagonal element
// (read-modify-write, two cycles per element) and pulses done.  The matrix is
// then read by the solver through rd_row / rd_quad (four elements, one cycle
// of latency).  A norm_shift instance follows every value written and offers
// the common left shift (norm_shl) that normalises the matrix before the
// solver.  used_d2 tells which rule set the level.
//
// Both loading rules and the max() switch follow the design; the formats of
// alpha and d2, truncating arithmetic and the memory organisation are this
// implementation's choices.  Timing: start to done = 2*NDIM + 2 cycles.
module diag_load #(
  parameter int unsigned NDIM = 160,
  parameter int unsigned TW   = 16,
  parameter int unsigned W    = 24,
  parameter int unsigned IW   = $clog2(NDIM)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,          // new epoch: trace and norm reset
  // matrix stream in
  input  logic                      in_valid,
  input  logic [IW-1:0]             in_row, in_col,
  input  logic signed [3:0][W-1:0]  in_re, in_im,
  // loading
  input  logic                      start,
  input  logic [15:0]               alpha_q,
  input  logic signed [W-1:0]       d2_in,
  output logic                      busy,
  output logic                      done,
  output logic signed [W-1:0]       d_out,
  output logic                      used_d2,
  output logic [$clog2(W)-1:0]      norm_shl,
  // solver read port
  input  logic [IW-1:0]             rd_row,
  input  logic [IW-3:0]             rd_quad,
  output logic signed [3:0][W-1:0]  rd_re, rd_im
);
  import dcmb_pkg::sat;
  localparam int unsigned NQ  = NDIM / 4;
  localparam int unsigned QAW = $clog2(NDIM * NQ);
  localparam int unsigned TRW = W + IW + 1;

  typedef enum logic [2:0] {S_IDLE, S_LEVEL, S_RD, S_WR} state_e;
  state_e st;

  logic signed [TRW-1:0] trace;
  logic [IW-1:0]         r_q;
  logic signed [W-1:0]   d_q;

  // writes: stream, or the loaded diagonal element
  logic                  nv;
  logic [QAW-1:0]        wa, ra, rmw_a;
  assign wa    = QAW'(in_row) * QAW'(NQ) + QAW'(in_col >> 2);
  assign rmw_a = QAW'(r_q) * QAW'(NQ) + QAW'(r_q >> 2);
  assign ra    = (st == S_IDLE) ? QAW'(rd_row) * QAW'(NQ) + QAW'(rd_quad) : rmw_a;

  logic signed [W-1:0] q_re [4], q_im [4];
  logic signed [W-1:0] dg_re, dg_im;
  assign dg_re = W'(sat(128'(q_re[r_q[1:0]]) + 128'(d_q), W));
  assign dg_im = q_im[r_q[1:0]];

  for (genvar b = 0; b < 4; b++) begin : g_lane
    logic [2*W-1:0] mem [NDIM * NQ];
    always_ff @(posedge clk) begin
      if (in_valid)
        mem[wa] <= {in_re[b], in_im[b]};
      else if (st == S_WR && r_q[1:0] == 2'(b))
        mem[rmw_a] <= {dg_re, dg_im};
      {q_re[b], q_im[b]} <= mem[ra];
    end
    assign rd_re[b] = q_re[b];
    assign rd_im[b] = q_im[b];
  end

  // normalisation follows every written value
  logic signed [W-1:0] nr_all, ni_all;
  always_comb begin
    nv = 1'b0; nr_all = '0; ni_all = '0;
    if (st == S_WR) begin nv = 1'b1; nr_all = dg_re; ni_all = dg_im; end
  end
  logic [$clog2(W)-1:0] shl_l [5];
  for (genvar b = 0; b < 4; b++) begin : g_norm
    norm_shift #(.W(W), .GUARD(1)) u_norm (.clk, .rst_n, .clear, .in_valid(in_valid),
      .in_re(in_re[b]), .in_im(in_im[b]), .shl(shl_l[b]));
  end
  norm_shift #(.W(W), .GUARD(1)) u_norm_d (.clk, .rst_n, .clear, .in_valid(nv),
    .in_re(nr_all), .in_im(ni_all), .shl(shl_l[4]));
  always_comb begin
    norm_shl = shl_l[0];
    for (int b = 1; b < 5; b++) if (shl_l[b] < norm_shl) norm_shl = shl_l[b];
  end

  // d1 = alpha * trace / TW
  logic signed [TRW+17:0] d1_w;
  logic signed [W-1:0]    d1;
  always_comb begin
    d1_w = (TRW+18)'(trace) * signed'({2'b0, alpha_q});
    d1   = W'(sat(128'(d1_w >>> 16) / 128'(TW), W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; trace <= '0; r_q <= '0; d_q <= '0;
      d_out <= '0; used_d2 <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) trace <= '0;
      else if (in_valid) begin
        logic signed [TRW-1:0] tsum;
        tsum = trace;
        for (int b = 0; b < 4; b++)
          if (32'(in_row) == 32'(in_col) + b) tsum = tsum + TRW'($signed(in_re[b]));
        trace <= tsum;
      end
      unique case (st)
        S_IDLE: if (start) begin busy <= 1'b1; st <= S_LEVEL; end
        S_LEVEL: begin
          if (d2_in > d1) begin d_q <= d2_in; used_d2 <= 1'b1; d_out <= d2_in; end
          else            begin d_q <= d1;    used_d2 <= 1'b0; d_out <= d1;    end
          r_q <= '0; st <= S_RD;
        end
        S_RD: st <= S_WR;          // diagonal element read this cycle
        S_WR: begin
          if (r_q == IW'(NDIM - 1)) begin busy <= 1'b0; done <= 1'b1; st <= S_IDLE; end
          else begin r_q <= r_q + 1; st <= S_RD; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_stream_while_loading: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> st == S_IDLE);
endmodule
