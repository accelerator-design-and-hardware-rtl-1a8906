// dcmb_pkg: sizes, word widths and shared types of the distributed coherent
// mesh beamformer computation block.
//
// The sizes follow the main configuration of the design: ten mosaic tiles,
// 16 beamformer taps per tile (a 160 x 160 spatiotemporal covariance matrix),
// 125 downsampled training-observation samples per tile and a decimation of 8
// between the 1.5 B_U processing rate and the beamformer rate 3 B_U / 16.
// Word widths follow the per-block precisions of the design (32 bits for the
// cross-correlator and the decimator, 24 bits for the channel-B convolution,
// the covariance path and the diagonal loading, 20 bits inside the solver and
// 12 bits for the filter handed to the upsampler). The channel-B estimate
// length (11 taps) is derived from the 26-sample full convolution of a
// 16-sample cross-correlation; the anti-alias filter length (16) is this
// design's own choice.
package dcmb_pkg;

  localparam int unsigned NT      = 10;    // mosaic tiles
  localparam int unsigned TW      = 16;    // beamformer taps per tile
  localparam int unsigned ZL      = 125;   // downsampled observation samples
  localparam int unsigned HB      = 11;    // channel-B estimate taps
  localparam int unsigned DEC     = 8;     // f_U -> f_T decimation
  localparam int unsigned AA      = 16;    // anti-alias filter taps
  localparam int unsigned LS      = 30000; // training samples correlated
  localparam int unsigned YL      = ZL + HB - 1;          // y' length (135)
  localparam int unsigned RFULL   = TW + HB - 1;          // full r' * h_B (26)
  localparam int unsigned R_START = 2;                    // r-hat window start
  localparam int unsigned NDIM    = NT * TW;              // covariance size (160)
  localparam int unsigned RH_LEN  = DEC * (TW - 1) + AA;  // r'_HIGH lags (136)
  localparam int unsigned ZH_LEN  = DEC * (ZL - 1) + AA;  // z_HIGH excerpt (1008)

  // Word widths (real and imaginary part each).
  localparam int unsigned W_XC   = 32;  // cross-correlator and decimator
  localparam int unsigned W_CV   = 24;  // channel-B convolution
  localparam int unsigned W_COV  = 24;  // covariance, average/taper, loading
  localparam int unsigned W_QR   = 20;  // solver internal
  localparam int unsigned W_OUT  = 12;  // filter to the upsampler

  // Targets of the generic load port of the top level.
  typedef enum logic [3:0] {
    LD_CAPTURE = 4'd0,  // z_HIGH capture sample (1.5 B_U)
    LD_TRAIN   = 4'd1,  // training sequence s_U1
    LD_AACOEF  = 4'd2,  // anti-alias filter coefficient (real part used)
    LD_TAPER   = 4'd3,  // taper matrix element (real part used)
    LD_ZK      = 4'd4,  // received z'_k, address k*ZL + t
    LD_RK      = 4'd5,  // received r'_k, address k*TW + t
    LD_HB      = 4'd6   // channel-B estimate h_B,k, address k*HB + t
  } load_sel_e;

  // Saturate a wide signed value to w bits (w <= 64).
  function automatic logic signed [63:0] sat(input logic signed [127:0] v, input int unsigned w);
    logic signed [127:0] hi, lo;
    hi = (128'sd1 <<< (w - 1)) - 128'sd1;
    lo = -(128'sd1 <<< (w - 1));
    if (v > hi)      return 64'(hi);
    else if (v < lo) return 64'(lo);
    else             return 64'(v);
  endfunction

endpackage
