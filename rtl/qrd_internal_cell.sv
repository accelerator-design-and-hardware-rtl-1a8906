// qrd_internal_cell: internal (off-diagonal) cell of the Givens-rotation QRD
// array, in the two-cycle form that splits multiplication and addition.
//
// QR mode (mode_bs = 0), the design's internal-cell algorithm, applying the
// rotation (C, S) generated by the boundary cell of the same row:
//   U_out = C * U_in - S * R
//   R'    = conj(S) * U_in + C * R
// Back-substitution mode (mode_bs = 1): the cell forms one term of the
// back-substitution sum, U_out = U_in - R * X, with X (QF fraction bits)
// presented on the S input; R' = R.
//
// Cycle 1 registers all products, cycle 2 adds them, rescales and saturates:
// the two-cycle split is the design's fix for its critical path.  Formats as
// in qrd_boundary_cell (C, S: QW-2 fraction bits; R, U, X: QF).
// Timing: fully pipelined, LAT = 2.
module qrd_internal_cell #(
  parameter int unsigned QW = 20,
  parameter int unsigned QF = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 mode_bs,
  input  logic signed [QW-1:0] c_in,
  input  logic signed [QW-1:0] s_re, s_im,
  input  logic signed [QW-1:0] u_re, u_im,
  input  logic signed [QW-1:0] r_re, r_im,
  output logic                 out_valid,
  output logic signed [QW-1:0] u_out_re, u_out_im,
  output logic signed [QW-1:0] r_out_re, r_out_im
);
  import dcmb_pkg::sat;
  localparam int unsigned CSF = QW - 2;
  localparam int unsigned PW  = 2 * QW;

  // cycle 1: products
  logic signed [PW-1:0] cu_r, cu_i, cr_r, cr_i;           // C*U, C*R
  logic signed [PW-1:0] srr, sii, sri, sir;               // S.re*R.re, S.im*R.im, S.re*R.im, S.im*R.re
  logic signed [PW-1:0] sur, sui_, suir, sium;            // S.re*U.re, S.im*U.im, S.re*U.im, S.im*U.re
  logic signed [QW-1:0] u1_re, u1_im, r1_re, r1_im;
  logic                 m1, v1;
  always_ff @(posedge clk) begin
    cu_r <= PW'(c_in * u_re);  cu_i <= PW'(c_in * u_im);
    cr_r <= PW'(c_in * r_re);  cr_i <= PW'(c_in * r_im);
    srr  <= PW'(s_re * r_re);  sii  <= PW'(s_im * r_im);
    sri  <= PW'(s_re * r_im);  sir  <= PW'(s_im * r_re);
    sur  <= PW'(s_re * u_re);  sui_ <= PW'(s_im * u_im);
    suir <= PW'(s_re * u_im);  sium <= PW'(s_im * u_re);
    u1_re <= u_re; u1_im <= u_im; r1_re <= r_re; r1_im <= r_im; m1 <= mode_bs;
  end

  // cycle 2: sums
  always_ff @(posedge clk) begin
    if (m1) begin
      // U_in - R * X
      u_out_re <= QW'(sat(128'(u1_re) - ((128'(srr) - 128'(sii)) >>> QF), QW));
      u_out_im <= QW'(sat(128'(u1_im) - ((128'(sri) + 128'(sir)) >>> QF), QW));
      r_out_re <= r1_re;
      r_out_im <= r1_im;
    end else begin
      u_out_re <= QW'(sat((128'(cu_r) - 128'(srr) + 128'(sii)) >>> CSF, QW));
      u_out_im <= QW'(sat((128'(cu_i) - 128'(sri) - 128'(sir)) >>> CSF, QW));
      r_out_re <= QW'(sat((128'(sur) + 128'(sui_) + 128'(cr_r)) >>> CSF, QW));
      r_out_im <= QW'(sat((128'(suir) - 128'(sium) + 128'(cr_i)) >>> CSF, QW));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; out_valid <= 1'b0; end
    else begin v1 <= in_valid; out_valid <= v1; end
  end
endmodule
