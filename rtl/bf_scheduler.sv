// bf_scheduler: sequencing of one beamformer update in the computation block.
//
// The three state machines of the computation block are modelled as three
// phases of one controller that hand over through start/done pulses:
//   SM1  (go)   : decimate the captured z_HIGH to z'_n, cross-correlate z_HIGH
//                 with the training sequence (r'_HIGH), decimate the peak
//                 windowed r'_HIGH to r'_n.  z'_n and r'_n leave on the
//                 exchange stream of the top level.
//   SM2         : once every tile k has both z'_k and r'_k (rx_ready), for
//                 k = 0 .. NT-1 convolve z'_k and r'_k with h_B,k, giving y'_k
//                 (into the covariance unit) and r-hat_k.
//   SM3         : covariance product (whose stream passes through averaging,
//                 taper and the loading unit), diagonal loading, QRD and
//                 back-substitution; epoch_done pulses at the end.
// Every unit start is a one-cycle pulse issued in the cycle the controller
// enters the corresponding state; the controller waits in that state for
// the unit's done.  Clear pulses start a new epoch of the normalisation and
// trace accumulators.
//
// The partition into SM1/SM2/SM3 and their order follow the design; running
// them strictly one after the other (the original overlaps SM1 of the next
// epoch with later work) and the single-unit reuse for z and r convolutions
// are this implementation's choices.
module bf_scheduler #(
  parameter int unsigned NT   = 10,
  parameter int unsigned TILW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic [NT-1:0]    rx_ready,
  input  logic             dec_done, xc_done, cv_done, mm_done, dl_done, qr_done,
  output logic             dec_start, dec_sel_r,
  output logic             xc_start,
  output logic             cv_start, cv_sel_r,
  output logic [TILW-1:0]  cv_k,
  output logic             mm_start, dl_start, qr_start,
  output logic             epoch_clear,   // SM1 start: peak search, rx flags
  output logic             sm2_clear,     // SM2 start: covariance / r-hat normalisation
  output logic             busy,
  output logic             epoch_done,
  output logic [3:0]       state
);
  typedef enum logic [3:0] {
    S_IDLE, S_DEC_Z, S_XC, S_DEC_R, S_WAIT_RX, S_CV_Z, S_CV_R, S_MM, S_DL, S_QR, S_END
  } state_e;
  state_e st, nx;
  assign state = st;

  always_comb begin
    nx = st;
    unique case (st)
      S_IDLE:    if (go) nx = S_DEC_Z;
      S_DEC_Z:   if (dec_done) nx = S_XC;
      S_XC:      if (xc_done) nx = S_DEC_R;
      S_DEC_R:   if (dec_done) nx = S_WAIT_RX;
      S_WAIT_RX: if (&rx_ready) nx = S_CV_Z;
      S_CV_Z:    if (cv_done) nx = S_CV_R;
      S_CV_R:    if (cv_done) nx = (cv_k == TILW'(NT - 1)) ? S_MM : S_CV_Z;
      S_MM:      if (mm_done) nx = S_DL;
      S_DL:      if (dl_done) nx = S_QR;
      S_QR:      if (qr_done) nx = S_END;
      S_END:     nx = S_IDLE;
      default:   nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cv_k <= '0;
      dec_start <= 1'b0; xc_start <= 1'b0; cv_start <= 1'b0; mm_start <= 1'b0;
      dl_start <= 1'b0; qr_start <= 1'b0; epoch_clear <= 1'b0; sm2_clear <= 1'b0;
      epoch_done <= 1'b0;
    end else begin
      st <= nx;
      dec_start <= 1'b0; xc_start <= 1'b0; cv_start <= 1'b0; mm_start <= 1'b0;
      dl_start <= 1'b0; qr_start <= 1'b0; epoch_clear <= 1'b0; sm2_clear <= 1'b0;
      epoch_done <= 1'b0;
      if (nx != st) begin
        unique case (nx)
          S_DEC_Z:   begin dec_start <= 1'b1; epoch_clear <= 1'b1; end
          S_XC:      xc_start <= 1'b1;
          S_DEC_R:   dec_start <= 1'b1;
          S_WAIT_RX: ;
          S_CV_Z:    begin
                       cv_start <= 1'b1;
                       if (st == S_WAIT_RX) begin cv_k <= '0; sm2_clear <= 1'b1; end
                       else cv_k <= cv_k + 1'b1;
                     end
          S_CV_R:    cv_start <= 1'b1;
          S_MM:      mm_start <= 1'b1;
          S_DL:      dl_start <= 1'b1;
          S_QR:      qr_start <= 1'b1;
          S_END:     epoch_done <= 1'b1;
          default:   ;
        endcase
      end
    end
  end

  assign busy      = (st != S_IDLE);
  assign dec_sel_r = (st == S_DEC_R);
  assign cv_sel_r  = (st == S_CV_R);
endmodule
