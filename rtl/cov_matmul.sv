// cov_matmul: spatiotemporal covariance C = Ytilde * Ytilde^H without forming
// Ytilde.
//
// The NT convolved observation vectors y'_n (YL samples each, written through
// the y_* port) are the only stored data.  Row n*TW+i of Ytilde is y'_n
// delayed by i samples (Ytilde_n[i][t] = y'_n[t-i], zero outside), so the
// covariance element for rows (n,i) and (k,j) is
//   C[(n,i),(k,j)] = sum_{t=0}^{YL+TW-2} y'_n[t-i] * conj(y'_k[t-j]).
// For each 4x4 output block the unit streams y'_n and y'_k through two shift
// registers (register m holds y'[t-m] after sample t has entered); taps
// i0..i0+3 and j0..j0+3 of the two registers are the 4x4 sub-block of Ytilde
// and Ytilde^H for that time step, and a 4x4 array of complex MAC cells
// accumulates one time column per cycle (the conjugate is a sign flip of the
// imaginary part).  The block's sixteen sums then leave four per cycle on the
// c_* stream, row by row, scaled right by out_shift and saturated to W bits.
//
// Before use the stored vectors are normalised with one common binary shift
// (norm_shift) so the largest sample fills the word.  Shift-register
// generation of the Toeplitz structure, the 4x4 MAC array and the conjugate
// on the fly follow the design; accumulating each block over all time steps
// inside the cells (instead of folding partial sums through a memory), the
// full (not only upper-triangle) output and the block order are this
// implementation's choices.
//
// Timing: (NT*TW/4)^2 blocks of (YL + TW + 7) cycles plus one; done pulses once.
module cov_matmul #(
  parameter int unsigned NT   = 10,
  parameter int unsigned TW   = 16,
  parameter int unsigned YL   = 135,
  parameter int unsigned W    = 24,
  parameter int unsigned ACCW = 64,
  parameter int unsigned NDIM = NT * TW,
  parameter int unsigned IW   = $clog2(NDIM),
  parameter int unsigned TILW = (NT > 1) ? $clog2(NT) : 1,
  parameter int unsigned YAW  = $clog2(YL + TW)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // observation vectors y'_k
  input  logic                      y_clear,      // new epoch: restart normalisation
  input  logic                      y_we,
  input  logic [TILW-1:0]           y_tile,
  input  logic [YAW-1:0]            y_idx,
  input  logic signed [W-1:0]       y_re, y_im,
  // command
  input  logic                      start,
  input  logic [6:0]                out_shift,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(W)-1:0]      norm_shl,     // shift that was applied
  // result stream: four elements of one row per cycle
  output logic                      c_valid,
  output logic [IW-1:0]             c_row,
  output logic [IW-1:0]             c_col,        // column of lane 0
  output logic signed [3:0][W-1:0]  c_re, c_im
);
  import dcmb_pkg::sat;
  localparam int unsigned NB   = NDIM / 4;
  localparam int unsigned BW_  = $clog2(NB + 1);
  localparam int unsigned TLEN = YL + TW - 1;
  localparam int unsigned MD   = NT * YL;
  localparam int unsigned MAW  = $clog2(MD);
  localparam int unsigned PW   = 2 * W + 1;

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_STREAM, S_OUT, S_NEXT} state_e;
  state_e st;

  logic [2*W-1:0] ymem [MD];
  logic [$clog2(W)-1:0] shl;

  norm_shift #(.W(W), .GUARD(1)) u_norm (
    .clk, .rst_n, .clear(y_clear), .in_valid(y_we), .in_re(y_re), .in_im(y_im), .shl(shl));
  assign norm_shl = shl;

  always_ff @(posedge clk)
    if (y_we) ymem[MAW'(y_tile) * MAW'(YL) + MAW'(y_idx)] <= {y_re, y_im};

  logic [BW_-1:0] bi, bj;
  logic [YAW-1:0] t_q;
  logic [1:0]     oq;
  logic [TILW-1:0] tn, tk;
  logic [IW-1:0]  i0, j0;
  always_comb begin
    tn = TILW'((32'(bi) * 4) / TW);
    tk = TILW'((32'(bj) * 4) / TW);
    i0 = IW'((32'(bi) * 4) % TW);
    j0 = IW'((32'(bj) * 4) % TW);
  end

  // stage 1: memory read of sample t for both tiles
  logic [2*W-1:0] qa, qb;
  logic           s1_v, s1_zero;
  always_ff @(posedge clk) begin
    qa <= ymem[MAW'(tn) * MAW'(YL) + MAW'(t_q < YAW'(YL) ? t_q : '0)];
    qb <= ymem[MAW'(tk) * MAW'(YL) + MAW'(t_q < YAW'(YL) ? t_q : '0)];
  end

  // stage 2: shift registers
  logic signed [W-1:0] sa_re [TW], sa_im [TW], sb_re [TW], sb_im [TW];
  logic                s2_v;
  logic signed [W-1:0] na_re, na_im, nb_re, nb_im;
  always_comb begin
    na_re = s1_zero ? '0 : W'(signed'(qa[2*W-1:W]) <<< shl);
    na_im = s1_zero ? '0 : W'(signed'(qa[W-1:0])   <<< shl);
    nb_re = s1_zero ? '0 : W'(signed'(qb[2*W-1:W]) <<< shl);
    nb_im = s1_zero ? '0 : W'(signed'(qb[W-1:0])   <<< shl);
  end

  always_ff @(posedge clk) begin
    if (st == S_CLR) begin
      for (int m = 0; m < TW; m++) begin
        sa_re[m] <= '0; sa_im[m] <= '0; sb_re[m] <= '0; sb_im[m] <= '0;
      end
    end else if (s1_v) begin
      sa_re[0] <= na_re; sa_im[0] <= na_im; sb_re[0] <= nb_re; sb_im[0] <= nb_im;
      for (int m = 1; m < TW; m++) begin
        sa_re[m] <= sa_re[m-1]; sa_im[m] <= sa_im[m-1];
        sb_re[m] <= sb_re[m-1]; sb_im[m] <= sb_im[m-1];
      end
    end
  end

  // 4x4 MAC array: cell (a,b) accumulates Ytilde[i0+a][t] * conj(Ytilde[j0+b][t])
  logic signed [ACCW-1:0] acc_re [4][4], acc_im [4][4];
  for (genvar a = 0; a < 4; a++) begin : g_row
    for (genvar b = 0; b < 4; b++) begin : g_col
      logic signed [W-1:0] ar, ai, br, bim;
      logic signed [PW-1:0] pr, pi;
      assign ar  = sa_re[32'(i0) + a];
      assign ai  = sa_im[32'(i0) + a];
      assign br  = sb_re[32'(j0) + b];
      assign bim = sb_im[32'(j0) + b];
      always_comb begin
        pr = PW'(ar * br) + PW'(ai * bim);
        pi = PW'(ai * br) - PW'(ar * bim);
      end
      always_ff @(posedge clk) begin
        if (st == S_CLR) begin
          acc_re[a][b] <= '0; acc_im[a][b] <= '0;
        end else if (s2_v) begin
          acc_re[a][b] <= acc_re[a][b] + ACCW'(pr);
          acc_im[a][b] <= acc_im[a][b] + ACCW'(pi);
        end
      end
    end
  end

  logic [6:0] shift_q;
  logic [3:0] wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      bi <= '0; bj <= '0; t_q <= '0; oq <= '0; wait_q <= '0; shift_q <= '0;
      s1_v <= 1'b0; s1_zero <= 1'b0; s2_v <= 1'b0;
      c_valid <= 1'b0; c_row <= '0; c_col <= '0; c_re <= '0; c_im <= '0;
    end else begin
      done    <= 1'b0;
      c_valid <= 1'b0;
      s1_v    <= 1'b0;
      s2_v    <= s1_v;
      unique case (st)
        S_IDLE: if (start) begin
          bi <= '0; bj <= '0; shift_q <= out_shift; busy <= 1'b1; st <= S_CLR;
        end
        S_CLR: begin
          t_q <= '0; st <= S_STREAM;
        end
        S_STREAM: begin
          s1_v    <= 1'b1;
          s1_zero <= (t_q >= YAW'(YL));
          if (t_q == YAW'(TLEN - 1)) begin
            wait_q <= '0; st <= S_OUT; oq <= '0;
          end else t_q <= t_q + 1;
        end
        S_OUT: begin
          // two cycles for the last sample to reach the cells, then 4 rows
          if (wait_q < 4'd2) wait_q <= wait_q + 1;
          else begin
            c_valid <= 1'b1;
            c_row   <= IW'(32'(bi) * 4 + 32'(oq));
            c_col   <= IW'(32'(bj) * 4);
            for (int b = 0; b < 4; b++) begin
              c_re[b] <= W'(sat(128'(acc_re[oq][b]) >>> shift_q, W));
              c_im[b] <= W'(sat(128'(acc_im[oq][b]) >>> shift_q, W));
            end
            oq <= oq + 1;
            if (oq == 2'd3) st <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (bj == BW_'(NB - 1)) begin
            bj <= '0;
            if (bi == BW_'(NB - 1)) begin
              busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
            end else begin
              bi <= bi + 1; st <= S_CLR;
            end
          end else begin
            bj <= bj + 1; st <= S_CLR;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);
endmodule
