// dcmb_beamformer_top: one computation block of the distributed mesh MMSE
// beamformer (the block that computes the filter of one relay direction).
//
// Data path (all complex, re/im pairs):
//   load port -> capture memory z_HIGH, training memory s, anti-alias filter,
//                taper matrix, received z'_k / r'_k, channel-B estimates h_B,k
//   SM1: fir_decim(z_HIGH) -> z'_n  ; conv_xcorr_unit(z_HIGH, s) -> r'_HIGH
//        peak_window(r'_HIGH) gates the lags; fir_decim -> r'_n.
//        z'_n and r'_n are stored as tile node_id and sent on ex_*.
//   SM2: for every tile k: conv_xcorr_unit(z'_k, h_B,k) -> y'_k (YL samples,
//        into cov_matmul) and conv_xcorr_unit(r'_k, h_B,k) samples
//        R_START .. R_START+TW-1 -> r-hat (stored time reversed per tile).
//   SM3: cov_matmul (C = Ytilde Ytilde^H) -> avg_taper (exponential average,
//        Hadamard taper) -> diag_load (d = max(alpha tr(C)/TW, d2) on the
//        diagonal) -> qrd_bs (QRD + back-substitution of C w = r-hat) ->
//        w_*: the conjugated TW filter taps of this node's own tile,
//        shifted by w_shift and saturated to W_OUT bits, for the upsampler.
// bf_scheduler sequences the three phases; the phase is visible on state.
//
// Interface: the load port writes one sample per cycle (ld_sel selects the
// target, see dcmb_pkg::load_sel_e; taper address = row << IW | col).  Loads
// of received tiles must not coincide with the local decimator output
// (SM1 writes tile node_id).  Tile k counts as received when the last sample
// of both z'_k and r'_k has been written; the flags clear at epoch_done.
// go starts an update; epoch_done pulses at its end.  ev[] carries one pulse
// per occurrence of each mechanism (bit list at EV_*), for monitoring.
//
// Following the design: the partition into units, block sizes, word widths
// (32-bit correlation/decimation, 24-bit convolution/covariance, 20-bit
// solver, 12-bit output), normalising shifts before the matmul and the QRD,
// four-lane operand memories.  This implementation's choices: one
// convolution unit shared by z and r, serial phase order, the load port and
// the event outputs.  Timing at full size (140 MHz): see the README.
module dcmb_beamformer_top
  import dcmb_pkg::W_XC, dcmb_pkg::W_CV, dcmb_pkg::W_COV, dcmb_pkg::W_QR, dcmb_pkg::W_OUT,
         dcmb_pkg::R_START, dcmb_pkg::sat, dcmb_pkg::LD_CAPTURE, dcmb_pkg::LD_TRAIN,
         dcmb_pkg::LD_AACOEF, dcmb_pkg::LD_TAPER, dcmb_pkg::LD_ZK, dcmb_pkg::LD_RK, dcmb_pkg::LD_HB;
#(
  parameter int unsigned NT   = dcmb_pkg::NT,
  parameter int unsigned TW   = dcmb_pkg::TW,
  parameter int unsigned ZL   = dcmb_pkg::ZL,
  parameter int unsigned HB   = dcmb_pkg::HB,
  parameter int unsigned DEC  = dcmb_pkg::DEC,
  parameter int unsigned AA   = dcmb_pkg::AA,
  parameter int unsigned LS   = dcmb_pkg::LS,
  parameter int unsigned WIN  = 4,
  parameter int unsigned TILW = (NT > 1) ? $clog2(NT) : 1,
  parameter int unsigned NDIM = NT * TW,
  parameter int unsigned IW   = $clog2(NDIM),
  parameter int unsigned TIW  = $clog2(TW),
  parameter int unsigned QIW  = $clog2(NDIM + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // load port
  input  logic                      ld_valid,
  input  logic [3:0]                ld_sel,
  input  logic [15:0]               ld_addr,
  input  logic signed [W_XC-1:0]    ld_re, ld_im,
  // configuration
  input  logic [TILW-1:0]           node_id,
  input  logic [16:0]               avg_b,
  input  logic                      first_epoch,
  input  logic [15:0]               alpha_q,
  input  logic signed [W_COV-1:0]   d2,
  input  logic [6:0]                xc_shift, dec_shift, cv_shift, cov_shift,
  input  logic [4:0]                w_shift,
  // control
  input  logic                      go,
  output logic                      busy,
  output logic                      epoch_done,
  output logic [3:0]                state,
  // exchange stream (local z'_n, r'_n)
  output logic                      ex_valid,
  output logic                      ex_is_r,
  output logic [15:0]               ex_idx,
  output logic signed [W_CV-1:0]    ex_re, ex_im,
  // filter output to the upsampler
  output logic                      w_valid,
  output logic [TIW-1:0]            w_idx,
  output logic signed [W_OUT-1:0]   w_re, w_im,
  // status
  output logic signed [W_COV-1:0]   d_load,
  output logic                      used_d2,
  output logic [15:0]               peak_idx,
  output logic [23:0]               ev
);
  localparam int unsigned YLEN   = ZL + HB - 1;
  localparam int unsigned RHL    = DEC * (TW - 1) + AA;
  localparam int unsigned ZHL    = DEC * (ZL - 1) + AA;
  localparam int unsigned CAPL   = LS + RHL - 1;
  localparam int unsigned AA_MAX = (AA > 4) ? AA : 4;

  // ---------------------------------------------------------------- control
  logic [NT-1:0] rx_z, rx_r;
  logic dec_start, dec_sel_r, xc_start, cv_start, cv_sel_r, mm_start, dl_start, qr_start;
  logic epoch_clear, sm2_clear;
  logic [TILW-1:0] cv_k;
  logic dec_busy, dec_done, xc_busy, xc_done, cv_busy, cv_done, mm_busy, mm_done;
  logic dl_busy, dl_done, qr_busy, qr_done;
  // the covariance stream still passes the averaging pipeline after mm_done
  logic [3:0] mm_done_d;
  logic       mm_drained;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mm_done_d <= '0; else mm_done_d <= {mm_done_d[2:0], mm_done};
  assign mm_drained = mm_done_d[3];

  bf_scheduler #(.NT(NT)) u_sched (
    .clk, .rst_n, .go, .rx_ready(rx_z & rx_r),
    .dec_done, .xc_done, .cv_done, .mm_done(mm_drained), .dl_done, .qr_done,
    .dec_start, .dec_sel_r, .xc_start, .cv_start, .cv_sel_r, .cv_k,
    .mm_start, .dl_start, .qr_start, .epoch_clear, .sm2_clear,
    .busy, .epoch_done, .state);

  function automatic logic signed [W_CV-1:0] to_cv(input logic signed [W_XC-1:0] v);
    return W_CV'(sat(128'(v), W_CV));
  endfunction

  wire ld_cap = ld_valid && ld_sel == 4'(LD_CAPTURE);
  wire ld_trn = ld_valid && ld_sel == 4'(LD_TRAIN);
  wire ld_aac = ld_valid && ld_sel == 4'(LD_AACOEF);
  wire ld_tap = ld_valid && ld_sel == 4'(LD_TAPER);
  wire ld_zk  = ld_valid && ld_sel == 4'(LD_ZK);
  wire ld_rk  = ld_valid && ld_sel == 4'(LD_RK);
  wire ld_hb  = ld_valid && ld_sel == 4'(LD_HB);

  // ---------------------------------------------------------------- memories
  localparam int unsigned CAW = $clog2(CAPL + 4);
  localparam int unsigned SAW = $clog2(LS + 4);
  localparam int unsigned RAW = $clog2(RHL + 4);
  localparam int unsigned ZAW = $clog2(NT * ZL + 4);
  localparam int unsigned KAW = $clog2(NT * TW + 4);
  localparam int unsigned HAW = $clog2(NT * HB + 4);

  logic [15:0] xc_x_base, xc_h_base, dc_x_base, cv_x_base, cv_h_base;
  logic signed [3:0][W_XC-1:0] cap_re, cap_im, trn_re, trn_im, rh_re, rh_im, rhm_re, rhm_im;
  logic signed [3:0][W_CV-1:0] zk_re, zk_im, rk_re, rk_im, hb_re, hb_im;

  bank4_ram #(.DEPTH(CAPL), .W(W_XC)) u_cap (
    .clk, .we(ld_cap), .waddr(CAW'(ld_addr)), .wre(ld_re), .wim(ld_im),
    .rd_base(dec_busy ? CAW'(dc_x_base) : CAW'(xc_x_base)), .rd_re(cap_re), .rd_im(cap_im));

  bank4_ram #(.DEPTH(LS), .W(W_XC)) u_trn (
    .clk, .we(ld_trn), .waddr(SAW'(ld_addr)), .wre(ld_re), .wim(ld_im),
    .rd_base(SAW'(xc_h_base)), .rd_re(trn_re), .rd_im(trn_im));

  logic xc_ov; logic [15:0] xc_oidx; logic signed [W_XC-1:0] xc_ore, xc_oim;
  bank4_ram #(.DEPTH(RHL), .W(W_XC)) u_rh (
    .clk, .we(xc_ov), .waddr(RAW'(xc_oidx)), .wre(xc_ore), .wim(xc_oim),
    .rd_base(RAW'(dc_x_base)), .rd_re(rh_re), .rd_im(rh_im));

  logic dc_ov; logic [15:0] dc_oidx; logic signed [W_CV-1:0] dc_ore, dc_oim;
  wire dc_loc_z = dc_ov && !dec_sel_r;
  wire dc_loc_r = dc_ov &&  dec_sel_r;

  bank4_ram #(.DEPTH(NT * ZL), .W(W_CV)) u_zk (
    .clk, .we(dc_loc_z || ld_zk),
    .waddr(dc_loc_z ? ZAW'(32'(node_id) * ZL + 32'(dc_oidx)) : ZAW'(ld_addr)),
    .wre(dc_loc_z ? dc_ore : to_cv(ld_re)), .wim(dc_loc_z ? dc_oim : to_cv(ld_im)),
    .rd_base(ZAW'(cv_x_base)), .rd_re(zk_re), .rd_im(zk_im));

  bank4_ram #(.DEPTH(NT * TW), .W(W_CV)) u_rk (
    .clk, .we(dc_loc_r || ld_rk),
    .waddr(dc_loc_r ? KAW'(32'(node_id) * TW + 32'(dc_oidx)) : KAW'(ld_addr)),
    .wre(dc_loc_r ? dc_ore : to_cv(ld_re)), .wim(dc_loc_r ? dc_oim : to_cv(ld_im)),
    .rd_base(KAW'(cv_x_base)), .rd_re(rk_re), .rd_im(rk_im));

  bank4_ram #(.DEPTH(NT * HB), .W(W_CV)) u_hb (
    .clk, .we(ld_hb), .waddr(HAW'(ld_addr)), .wre(to_cv(ld_re)), .wim(to_cv(ld_im)),
    .rd_base(HAW'(cv_h_base)), .rd_re(hb_re), .rd_im(hb_im));

  // received-tile flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_z <= '0; rx_r <= '0;
    end else if (epoch_done) begin
      rx_z <= '0; rx_r <= '0;
    end else begin
      for (int k = 0; k < NT; k++) begin
        if (ld_zk && 32'(ld_addr) == k * ZL + ZL - 1) rx_z[k] <= 1'b1;
        if (ld_rk && 32'(ld_addr) == k * TW + TW - 1) rx_r[k] <= 1'b1;
      end
      if (dc_loc_z && 32'(dc_oidx) == ZL - 1) rx_z[node_id] <= 1'b1;
      if (dc_loc_r && 32'(dc_oidx) == TW - 1) rx_r[node_id] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- SM1
  conv_xcorr_unit #(.XW(W_XC), .HW(W_XC), .OW(W_XC), .ACCW(96), .OMAX(RHL)) u_xc (
    .clk, .rst_n, .start(xc_start), .mode_xcorr(1'b1),
    .x_len(16'(CAPL)), .h_len(16'(LS)), .out_len(16'(RHL)), .out_start(17'(LS - 1)),
    .x_base('0), .h_base('0), .out_shift(xc_shift), .busy(xc_busy), .done(xc_done),
    .x_rd_base(xc_x_base), .x_rd_re(cap_re), .x_rd_im(cap_im),
    .h_rd_base(xc_h_base), .h_rd_re(trn_re), .h_rd_im(trn_im),
    .o_valid(xc_ov), .o_idx(xc_oidx), .o_re(xc_ore), .o_im(xc_oim));

  // peak window over r'_HIGH, applied on the decimator's read lanes
  logic [15:0] rh_q_base;
  logic [3:0][15:0] rh_q_idx;
  logic [3:0] rh_keep;
  logic pk_found;
  always_ff @(posedge clk) rh_q_base <= dc_x_base;
  always_comb for (int l = 0; l < 4; l++) rh_q_idx[l] = rh_q_base + 16'(l);

  peak_window #(.W(W_XC), .LW(16), .WIN(WIN)) u_pk (
    .clk, .rst_n, .clear(epoch_clear), .in_valid(xc_ov), .in_idx(xc_oidx), .in_re(xc_ore), .in_im(xc_oim),
    .q_idx(rh_q_idx), .q_keep(rh_keep), .peak_idx, .found(pk_found));

  always_comb
    for (int l = 0; l < 4; l++) begin
      rhm_re[l] = rh_keep[l] ? rh_re[l] : '0;
      rhm_im[l] = rh_keep[l] ? rh_im[l] : '0;
    end

  fir_decim #(.XW(W_XC), .OW(W_CV), .DEC(DEC), .AAMAX(AA_MAX), .OMAX(ZL > TW ? ZL : TW)) u_dec (
    .clk, .rst_n, .coef_we(ld_aac), .coef_addr($clog2(AA_MAX)'(ld_addr)), .coef_data(18'(ld_re)),
    .start(dec_start), .x_len(16'(dec_sel_r ? RHL : ZHL)), .n_out(16'(dec_sel_r ? TW : ZL)),
    .n_taps(($clog2(AA_MAX)+1)'(AA)), .x_base('0), .out_shift(dec_shift),
    .busy(dec_busy), .done(dec_done), .x_rd_base(dc_x_base),
    .x_rd_re(dec_sel_r ? rhm_re : cap_re), .x_rd_im(dec_sel_r ? rhm_im : cap_im),
    .o_valid(dc_ov), .o_idx(dc_oidx), .o_re(dc_ore), .o_im(dc_oim));

  assign ex_valid = dc_ov;
  assign ex_is_r  = dec_sel_r;
  assign ex_idx   = dc_oidx;
  assign ex_re    = dc_ore;
  assign ex_im    = dc_oim;

  // ---------------------------------------------------------------- SM2
  logic cv_ov; logic [15:0] cv_oidx; logic signed [W_CV-1:0] cv_ore, cv_oim;
  conv_xcorr_unit #(.XW(W_CV), .HW(W_CV), .OW(W_CV), .ACCW(64), .OMAX(YLEN)) u_cv (
    .clk, .rst_n, .start(cv_start), .mode_xcorr(1'b0),
    .x_len(16'(cv_sel_r ? TW : ZL)), .h_len(16'(HB)), .out_len(16'(cv_sel_r ? TW : YLEN)),
    .out_start(17'(cv_sel_r ? R_START : 0)),
    .x_base(16'(cv_sel_r ? 32'(cv_k) * TW : 32'(cv_k) * ZL)), .h_base(16'(32'(cv_k) * HB)),
    .out_shift(cv_shift), .busy(cv_busy), .done(cv_done),
    .x_rd_base(cv_x_base), .x_rd_re(cv_sel_r ? rk_re : zk_re), .x_rd_im(cv_sel_r ? rk_im : zk_im),
    .h_rd_base(cv_h_base), .h_rd_re(hb_re), .h_rd_im(hb_im),
    .o_valid(cv_ov), .o_idx(cv_oidx), .o_re(cv_ore), .o_im(cv_oim));

  // r-hat memory, tile k stored time reversed: rhat[k*TW + TW-1-o]
  logic [2*W_CV-1:0] rhat_mem [NDIM];
  logic [QIW-1:0] qr_b_addr;
  logic signed [W_CV-1:0] rhat_re, rhat_im;
  wire rh_we = cv_ov && cv_sel_r;
  always_ff @(posedge clk) begin
    if (rh_we) rhat_mem[IW'(32'(cv_k) * TW + TW - 1 - 32'(cv_oidx))] <= {cv_ore, cv_oim};
    {rhat_re, rhat_im} <= rhat_mem[IW'(qr_b_addr)];
  end
  logic [$clog2(W_CV)-1:0] rhat_shl;
  norm_shift #(.W(W_CV)) u_rnorm (
    .clk, .rst_n, .clear(sm2_clear), .in_valid(rh_we), .in_re(cv_ore), .in_im(cv_oim), .shl(rhat_shl));

  // ---------------------------------------------------------------- SM3
  logic c_valid; logic [IW-1:0] c_row, c_col; logic signed [3:0][W_COV-1:0] c_re, c_im;
  logic [$clog2(W_COV)-1:0] mm_shl;
  cov_matmul #(.NT(NT), .TW(TW), .YL(YLEN), .W(W_COV)) u_mm (
    .clk, .rst_n, .y_clear(sm2_clear), .y_we(cv_ov && !cv_sel_r), .y_tile(cv_k),
    .y_idx($clog2(YLEN + TW)'(cv_oidx)), .y_re(cv_ore), .y_im(cv_oim),
    .start(mm_start), .out_shift(cov_shift), .busy(mm_busy), .done(mm_done), .norm_shl(mm_shl),
    .c_valid, .c_row, .c_col, .c_re, .c_im);

  logic a_valid; logic [IW-1:0] a_row, a_col; logic signed [3:0][W_COV-1:0] a_re, a_im;
  avg_taper #(.NDIM(NDIM), .W(W_COV)) u_avg (
    .clk, .rst_n, .avg_b, .first_epoch,
    .t_we(ld_tap), .t_row(IW'(ld_addr >> IW)), .t_col(IW'(ld_addr)), .t_data(18'(ld_re)),
    .in_valid(c_valid), .in_row(c_row), .in_col(c_col), .in_re(c_re), .in_im(c_im),
    .out_valid(a_valid), .out_row(a_row), .out_col(a_col), .out_re(a_re), .out_im(a_im));

  logic [QIW-1:0] qr_a_row; logic [QIW-3:0] qr_a_quad;
  logic signed [3:0][W_COV-1:0] dl_rd_re, dl_rd_im;
  logic [$clog2(W_COV)-1:0] dl_shl;
  diag_load #(.NDIM(NDIM), .TW(TW), .W(W_COV)) u_dl (
    .clk, .rst_n, .clear(mm_start), .in_valid(a_valid), .in_row(a_row), .in_col(a_col),
    .in_re(a_re), .in_im(a_im), .start(dl_start), .alpha_q, .d2_in(d2),
    .busy(dl_busy), .done(dl_done), .d_out(d_load), .used_d2, .norm_shl(dl_shl),
    .rd_row(IW'(qr_a_row)), .rd_quad((IW-2)'(qr_a_quad)), .rd_re(dl_rd_re), .rd_im(dl_rd_im));

  logic x_valid; logic [QIW-1:0] x_idx; logic signed [W_QR-1:0] x_re, x_im;
  qrd_bs #(.N(NDIM), .W_IN(W_COV), .QW(W_QR)) u_qr (
    .clk, .rst_n, .start(qr_start), .a_shl(dl_shl), .b_shl(rhat_shl),
    .busy(qr_busy), .done(qr_done),
    .a_rd_row(qr_a_row), .a_rd_quad(qr_a_quad), .a_rd_re(dl_rd_re), .a_rd_im(dl_rd_im),
    .b_rd_addr(qr_b_addr), .b_rd_re(rhat_re), .b_rd_im(rhat_im),
    .x_valid, .x_idx, .x_re, .x_im);

  // own tile's taps, conjugated, to the upsampler
  wire [31:0] own0 = 32'(node_id) * TW;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0; w_idx <= '0; w_re <= '0; w_im <= '0;
    end else begin
      w_valid <= x_valid && 32'(x_idx) >= own0 && 32'(x_idx) < own0 + TW;
      w_idx   <= TIW'(32'(x_idx) - own0);
      w_re    <= W_OUT'(sat(128'(x_re) >>> w_shift, W_OUT));
      w_im    <= W_OUT'(sat(-(128'(x_im) >>> w_shift), W_OUT));
    end
  end

  // ---------------------------------------------------------------- events
  localparam int EV_LD_CAP = 0, EV_LD_TRN = 1, EV_LD_AAC = 2, EV_LD_TAP = 3, EV_LD_ZK = 4,
                 EV_LD_RK = 5, EV_LD_HB = 6, EV_DEC_Z = 7, EV_XCORR = 8, EV_PEAK_GATE = 9,
                 EV_DEC_R = 10, EV_EXCH = 11, EV_CONV_Z = 12, EV_CONV_R = 13, EV_Y_WR = 14,
                 EV_MATMUL = 15, EV_AVG = 16, EV_AVG_FIRST = 17, EV_DL_ALPHA = 18, EV_DL_D2 = 19,
                 EV_QRD = 20, EV_W_OUT = 21, EV_EPOCH = 22, EV_RX_WAIT = 23;
  logic dl_fin;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dl_fin <= 1'b0; else dl_fin <= dl_done;
  always_comb begin
    ev = '0;
    ev[EV_LD_CAP] = ld_cap;  ev[EV_LD_TRN] = ld_trn; ev[EV_LD_AAC] = ld_aac; ev[EV_LD_TAP] = ld_tap;
    ev[EV_LD_ZK]  = ld_zk;   ev[EV_LD_RK]  = ld_rk;  ev[EV_LD_HB]  = ld_hb;
    ev[EV_DEC_Z]  = dec_done && !dec_sel_r;
    ev[EV_XCORR]  = xc_done;
    ev[EV_PEAK_GATE] = dec_busy && dec_sel_r && pk_found && (rh_keep != 4'hf);
    ev[EV_DEC_R]  = dec_done && dec_sel_r;
    ev[EV_EXCH]   = ex_valid;
    ev[EV_CONV_Z] = cv_done && !cv_sel_r;
    ev[EV_CONV_R] = cv_done && cv_sel_r;
    ev[EV_Y_WR]   = cv_ov && !cv_sel_r;
    ev[EV_MATMUL] = mm_done;
    ev[EV_AVG]    = a_valid && !first_epoch;
    ev[EV_AVG_FIRST] = a_valid && first_epoch;
    ev[EV_DL_ALPHA]  = dl_fin && !used_d2;
    ev[EV_DL_D2]     = dl_fin && used_d2;
    ev[EV_QRD]    = qr_done;
    ev[EV_W_OUT]  = w_valid;
    ev[EV_EPOCH]  = epoch_done;
    ev[EV_RX_WAIT] = (state == 4'd4) && !(&(rx_z & rx_r));
  end
endmodule
