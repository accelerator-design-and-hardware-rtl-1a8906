// qrd_bs: folded QR decomposition with back-substitution, solving C w = r.
//
// The augmented rows [C(row) | r(row)] enter one at a time (read from the
// loaded covariance memory through a_rd_* and from the cross-correlation
// memory through b_rd_*, both with one cycle of latency, each scaled by its
// normalisation left shift and reduced to the QW-bit solver format).  Each
// row is rotated into the stored upper-triangular factor R (never forming Q):
// for every diagonal position i the boundary cell turns (R[i][i], u[i]) into
// a Givens rotation, then four internal cells apply that rotation to
// R[i][j], u[j] for four columns j per cycle, j = i+1 .. N (column N holds
// the rotated right-hand side b' = Q^H r).  After the last row the same cells
// run backwards: for i = N-1 down to 0 the internal cells, switched to
// back-substitution mode, form R[i][j] * x[j] four terms per cycle, an adder
// accumulates b'[i] minus those terms, and the boundary cell divides by
// R[i][i] to give x[i].  Each x[i] is stored (x memory) and sent on the
// x_* stream.
//
// The boundary/internal cell algorithms, the folding of the triangular array
// onto one boundary cell and a row of four internal cells backed by the R
// memory, the reuse of the cells for back-substitution under a mode signal,
// the two-cycle internal cell and the lookup-table inverse square root follow
// the design.  The exact schedule (one diagonal position at a time, waiting
// for the pipeline before the next) is this implementation's own and simpler
// than the interleaved schedule of the original accelerator.
//
// Formats: QW-bit words with QF fraction bits inside; input words of W_IN
// bits are left-shifted by a_shl / b_shl, then right-shifted by
// W_IN - 2 - QF.  N must be a multiple of 4.  Timing (NQ1 = N/4 + 1): at
// most N*(N/4+3) cycles of row loading, N*(12N + N*NQ1 - N(N-4)/8) cycles of
// rotations, N*(16 + N/4) cycles of back-substitution and N*NQ1 cycles of
// clearing R: about 0.88 M cycles (6.3 ms at 140 MHz) for N = 160;
// done pulses once, busy is high from the cycle after start until done.
module qrd_bs #(
  parameter int unsigned N    = 160,
  parameter int unsigned W_IN = 24,
  parameter int unsigned QW   = 20,
  parameter int unsigned QF   = 14,
  parameter int unsigned IW   = $clog2(N + 1),
  parameter int unsigned SHW  = $clog2(W_IN)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [SHW-1:0]               a_shl, b_shl,
  output logic                         busy,
  output logic                         done,
  // matrix read port: row, column quad -> 4 elements next cycle
  output logic [IW-1:0]                a_rd_row,
  output logic [IW-3:0]                a_rd_quad,
  input  logic signed [3:0][W_IN-1:0]  a_rd_re, a_rd_im,
  // right-hand side read port
  output logic [IW-1:0]                b_rd_addr,
  input  logic signed [W_IN-1:0]       b_rd_re, b_rd_im,
  // solution stream
  output logic                         x_valid,
  output logic [IW-1:0]                x_idx,
  output logic signed [QW-1:0]         x_re, x_im
);
  import dcmb_pkg::sat;
  localparam int unsigned NQA = N / 4;              // quads of a matrix row
  localparam int unsigned NQ1 = (N + 1 + 3) / 4;    // quads of an augmented row
  localparam int unsigned RD  = N * NQ1;            // R memory words per lane
  localparam int unsigned RAW = $clog2(RD);
  localparam int unsigned QAW = $clog2(NQ1 + 1);
  localparam int unsigned ISH = W_IN - 2 - QF;       // input rescale

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_LD_A, S_LD_W, S_BND, S_BND_W, S_INT, S_INT_W,
    S_BS_INIT, S_BS_INT, S_BS_W, S_BS_DIV, S_BS_DIV_W, S_DONE
  } state_e;
  state_e st;

  // R memory (four lanes, lane l holds columns 4q+l) and the row buffer u
  // row buffer u and solution store x: one memory per lane, one write port
  logic                 u_we [4], x_we [4];
  logic [QAW-1:0]       u_wa [4], x_wa [4];
  logic signed [QW-1:0] u_wre [4], u_wim [4];
  logic signed [QW-1:0] u0_re [4], u0_im [4], u1_re [4], u1_im [4], xm_re [4], xm_im [4];

  logic [IW-1:0]  row_q, i_q;
  logic [QAW-1:0] q_q;
  logic [3:0]     wt_q;
  logic [SHW-1:0] ash_q, bsh_q;
  logic [RAW:0]   clr_q;

  // R memory ports
  logic            r_we [4];
  logic [RAW-1:0]  r_wa [4];
  logic signed [QW-1:0] r_wre [4], r_wim [4];
  logic [RAW-1:0]  r_ra;
  logic signed [QW-1:0] r_qre [4], r_qim [4];

  for (genvar l = 0; l < 4; l++) begin : g_rmem
    logic [2*QW-1:0] mem [RD];
    always_ff @(posedge clk) begin
      if (r_we[l]) mem[r_wa[l]] <= {r_wre[l], r_wim[l]};
      {r_qre[l], r_qim[l]} <= mem[r_ra];
    end
  end

  // input conversion
  function automatic logic signed [QW-1:0] conv_in(input logic signed [W_IN-1:0] v, input logic [SHW-1:0] sh);
    logic signed [127:0] t;
    t = (128'(v) <<< sh) >>> ISH;
    return QW'(sat(t, QW));
  endfunction

  // boundary cell
  logic                 bc_v, bc_ov, bc_mode;
  logic signed [QW-1:0] bc_r, bc_ure, bc_uim, bc_c, bc_sre, bc_sim, bc_rout;
  qrd_boundary_cell #(.QW(QW), .QF(QF)) u_bc (
    .clk, .rst_n, .in_valid(bc_v), .mode_bs(bc_mode), .r_in(bc_r), .u_re(bc_ure), .u_im(bc_uim),
    .out_valid(bc_ov), .c_out(bc_c), .s_re(bc_sre), .s_im(bc_sim), .r_out(bc_rout));

  // latched rotation of the current diagonal position
  logic signed [QW-1:0] rc, rs_re, rs_im;

  // four internal cells
  logic                 ic_v, ic_mode;
  logic signed [QW-1:0] ic_c [4], ic_sre [4], ic_sim [4], ic_ure [4], ic_uim [4], ic_rre [4], ic_rim [4];
  logic                 ic_ov [4];  // cell valid flags; the quad pipeline vp[] tracks the same timing
  logic signed [QW-1:0] ic_oure [4], ic_ouim [4], ic_orre [4], ic_orim [4];
  for (genvar l = 0; l < 4; l++) begin : g_ic
    qrd_internal_cell #(.QW(QW), .QF(QF)) u_ic (
      .clk, .rst_n, .in_valid(ic_v), .mode_bs(ic_mode), .c_in(ic_c[l]), .s_re(ic_sre[l]), .s_im(ic_sim[l]),
      .u_re(ic_ure[l]), .u_im(ic_uim[l]), .r_re(ic_rre[l]), .r_im(ic_rim[l]),
      .out_valid(ic_ov[l]), .u_out_re(ic_oure[l]), .u_out_im(ic_ouim[l]),
      .r_out_re(ic_orre[l]), .r_out_im(ic_orim[l]));
  end

  // column mask of the quad in flight (two cycles of cell latency + one of read)
  logic [QAW-1:0] qp [3];
  logic           vp [3];
  logic [IW-1:0]  ip [3];

  // back-substitution accumulator
  logic signed [QW+3:0] acc_re, acc_im;

  for (genvar l = 0; l < 4; l++) begin : g_umem
    logic [2*QW-1:0] umem [NQ1];
    logic [2*QW-1:0] xmem [NQ1];
    always_ff @(posedge clk) begin
      if (u_we[l]) umem[u_wa[l]] <= {u_wre[l], u_wim[l]};
      if (x_we[l]) xmem[x_wa[l]] <= {bc_sre, bc_sim};
    end
    assign {u0_re[l], u0_im[l]} = umem[qp[0]];              // internal-cell operand
    assign {u1_re[l], u1_im[l]} = umem[QAW'(i_q >> 2)];     // boundary-cell operand
    assign {xm_re[l], xm_im[l]} = xmem[qp[0]];
  end

  assign ic_v = vp[0];

  logic [IW-1:0] col_lane [4];
  always_comb for (int l = 0; l < 4; l++) col_lane[l] = IW'(32'(qp[2]) * 4 + l);

  always_comb begin
    // defaults
    for (int l = 0; l < 4; l++) begin
      r_we[l] = 1'b0; r_wa[l] = '0; r_wre[l] = '0; r_wim[l] = '0;
      ic_c[l] = rc; ic_sre[l] = rs_re; ic_sim[l] = rs_im;
      ic_ure[l] = u0_re[l]; ic_uim[l] = u0_im[l];
      ic_rre[l] = r_qre[l]; ic_rim[l] = r_qim[l];
    end
    r_ra = RAW'(32'(i_q) * NQ1 + 32'(q_q));
    if (st == S_BND) r_ra = RAW'(32'(i_q) * NQ1 + 32'(i_q) / 4);
    if (st == S_BS_INIT) r_ra = RAW'(32'(i_q) * NQ1 + N / 4);
    if (st == S_CLR) begin
      for (int l = 0; l < 4; l++) begin r_we[l] = 1'b1; r_wa[l] = RAW'(clr_q); end
    end
    // write back rotated R elements
    if (vp[2] && !ic_mode) begin
      for (int l = 0; l < 4; l++) begin
        if (col_lane[l] > ip[2] && col_lane[l] <= IW'(N)) begin
          r_we[l] = 1'b1; r_wa[l] = RAW'(32'(ip[2]) * NQ1 + 32'(qp[2]));
          r_wre[l] = ic_orre[l]; r_wim[l] = ic_orim[l];
        end
      end
    end
    // write back the new diagonal element
    if (bc_ov && !bc_mode) begin
      r_we[i_q[1:0]] = 1'b1; r_wa[i_q[1:0]] = RAW'(32'(i_q) * NQ1 + 32'(i_q) / 4);
      r_wre[i_q[1:0]] = bc_rout; r_wim[i_q[1:0]] = '0;
    end
    if (ic_mode) begin
      for (int l = 0; l < 4; l++) begin
        ic_ure[l] = '0; ic_uim[l] = '0;
        ic_sre[l] = xm_re[l]; ic_sim[l] = xm_im[l];
      end
    end
    // row buffer writes: rotated elements, or the row being loaded
    for (int l = 0; l < 4; l++) begin
      u_we[l] = 1'b0; u_wa[l] = '0; u_wre[l] = '0; u_wim[l] = '0;
      x_we[l] = 1'b0; x_wa[l] = QAW'(i_q >> 2);
      if (vp[2] && !ic_mode && col_lane[l] > ip[2] && col_lane[l] <= IW'(N)) begin
        u_we[l] = 1'b1; u_wa[l] = qp[2]; u_wre[l] = ic_oure[l]; u_wim[l] = ic_ouim[l];
      end else if ((st == S_LD_A && q_q != '0) || st == S_LD_W) begin
        if (q_q - 1'b1 < QAW'(NQA)) begin
          u_we[l] = 1'b1; u_wa[l] = q_q - 1'b1;
          u_wre[l] = conv_in(a_rd_re[l], ash_q); u_wim[l] = conv_in(a_rd_im[l], ash_q);
        end else if (st == S_LD_W && l == N % 4) begin
          u_we[l] = 1'b1; u_wa[l] = QAW'(N / 4);
          u_wre[l] = conv_in(b_rd_re, bsh_q); u_wim[l] = conv_in(b_rd_im, bsh_q);
        end
      end
      if (st == S_BS_DIV_W && bc_ov && i_q[1:0] == 2'(l)) x_we[l] = 1'b1;
    end
  end

  assign a_rd_row  = row_q;
  assign a_rd_quad = (IW-2)'(q_q);
  assign b_rd_addr = row_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      row_q <= '0; i_q <= '0; q_q <= '0; wt_q <= '0; clr_q <= '0; ash_q <= '0; bsh_q <= '0;
      bc_v <= 1'b0; bc_mode <= 1'b0; bc_r <= '0; bc_ure <= '0; bc_uim <= '0;
      ic_mode <= 1'b0; rc <= '0; rs_re <= '0; rs_im <= '0;
      for (int k = 0; k < 3; k++) begin qp[k] <= '0; vp[k] <= 1'b0; ip[k] <= '0; end
      acc_re <= '0; acc_im <= '0;
      x_valid <= 1'b0; x_idx <= '0; x_re <= '0; x_im <= '0;
    end else begin
      done <= 1'b0; bc_v <= 1'b0; x_valid <= 1'b0;
      // quad pipeline: read (0) -> cell stage 1 (1) -> cell stage 2 (2)
      vp[1] <= vp[0]; qp[1] <= qp[0]; ip[1] <= ip[0];
      vp[2] <= vp[1]; qp[2] <= qp[1]; ip[2] <= ip[1];
      vp[0] <= 1'b0;
      // back-substitution terms
      if (vp[2] && ic_mode) begin
        logic signed [QW+3:0] sr, si;
        sr = acc_re; si = acc_im;
        for (int l = 0; l < 4; l++)
          if (col_lane[l] > ip[2] && col_lane[l] < IW'(N)) begin
            sr = sr + (QW+4)'(ic_oure[l]); si = si + (QW+4)'(ic_ouim[l]);
          end
        acc_re <= sr; acc_im <= si;
      end

      unique case (st)
        S_IDLE: if (start) begin
          busy <= 1'b1; ash_q <= a_shl; bsh_q <= b_shl; clr_q <= '0; st <= S_CLR;
        end
        S_CLR: begin
          clr_q <= clr_q + 1;
          if (clr_q == (RAW+1)'(RD - 1)) begin row_q <= '0; q_q <= '0; st <= S_LD_A; end
        end
        // load row row_q of [C | r] into u (one quad per cycle)
        S_LD_A: begin
          q_q <= q_q + 1;
          wt_q <= '0;
          if (q_q == QAW'(NQA)) st <= S_LD_W;
        end
        S_LD_W: begin
          i_q <= '0; q_q <= '0; st <= S_BND;
        end
        // diagonal position i: boundary cell
        S_BND: begin
          wt_q <= '0; st <= S_BND_W;
        end
        S_BND_W: begin
          wt_q <= wt_q + 1;
          if (wt_q == 4'd0) begin
            bc_v <= 1'b1; bc_mode <= 1'b0; bc_r <= r_qre[i_q[1:0]];
            bc_ure <= u1_re[i_q[1:0]]; bc_uim <= u1_im[i_q[1:0]];
          end
          if (bc_ov) begin
            rc <= bc_c; rs_re <= bc_sre; rs_im <= bc_sim;
            q_q <= QAW'(i_q >> 2);
            st <= S_INT;
          end
        end
        // internal cells over the rest of row i
        S_INT: begin
          vp[0] <= 1'b1; qp[0] <= q_q; ip[0] <= i_q;
          if (q_q == QAW'(NQ1 - 1)) begin wt_q <= '0; st <= S_INT_W; end
          else q_q <= q_q + 1;
        end
        S_INT_W: begin
          wt_q <= wt_q + 1;
          if (wt_q == 4'd3) begin
            if (i_q == IW'(N - 1)) begin
              if (row_q == IW'(N - 1)) begin
                i_q <= IW'(N - 1); st <= S_BS_INIT; ic_mode <= 1'b1;
              end else begin
                row_q <= row_q + 1; q_q <= '0; st <= S_LD_A;
              end
            end else begin
              i_q <= i_q + 1; st <= S_BND;
            end
          end
        end
        // back-substitution, row i
        S_BS_INIT: begin
          q_q <= QAW'(IW'(i_q + 1) >> 2); wt_q <= '0; st <= S_BS_INT;
        end
        S_BS_INT: begin
          if (wt_q == 4'd0) begin
            // b'[i] arrives from the R memory (column N)
            acc_re <= (QW+4)'(r_qre[N % 4]); acc_im <= (QW+4)'(r_qim[N % 4]);
            wt_q <= 4'd1;
          end
          if (32'(q_q) * 4 < N && i_q != IW'(N - 1)) begin
            vp[0] <= 1'b1; qp[0] <= q_q; ip[0] <= i_q;
            q_q <= q_q + 1;
          end else begin
            wt_q <= '0; st <= S_BS_W;
          end
        end
        S_BS_W: begin
          wt_q <= wt_q + 1;
          if (wt_q == 4'd4) begin q_q <= QAW'(i_q >> 2); st <= S_BS_DIV; end
        end
        S_BS_DIV: begin
          st <= S_BS_DIV_W; wt_q <= '0;
        end
        S_BS_DIV_W: begin
          wt_q <= wt_q + 1;
          if (wt_q == 4'd0) begin
            bc_v <= 1'b1; bc_mode <= 1'b1; bc_r <= r_qre[i_q[1:0]];
            bc_ure <= QW'(sat(128'(acc_re), QW)); bc_uim <= QW'(sat(128'(acc_im), QW));
          end
          if (bc_ov) begin
            x_valid <= 1'b1; x_idx <= i_q; x_re <= bc_sre; x_im <= bc_sim;
            if (i_q == '0) st <= S_DONE;
            else begin i_q <= i_q - 1; st <= S_BS_INIT; end
          end
        end
        S_DONE: begin
          busy <= 1'b0; done <= 1'b1; ic_mode <= 1'b0; bc_mode <= 1'b0; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase

    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);
endmodule
