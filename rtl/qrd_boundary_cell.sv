// qrd_boundary_cell: boundary (diagonal) cell of the Givens-rotation QRD array.
//
// QR mode (mode_bs = 0), the design's boundary-cell algorithm: with the stored
// real diagonal element R and the arriving element U,
//   U = 0:  C = 1, S = 0, R unchanged
//   else :  R' = sqrt(R^2 + |U|^2),  C = R / R',  S = U / R',  R <- R'
// 1/R' comes from rsqrt_lut2 (two small lookup tables), so R', C and S are
// all products with the same inverse square root.
// Back-substitution mode (mode_bs = 1): the same cell divides, X = U / R,
// with 1/R = rsqrt(R^2); X leaves on s_re / s_im.
//
// Formats: R, U, R' and X are signed QW-bit words with QF fraction bits;
// C and S use QW bits with QW-2 fraction bits.  Results saturate.
// Timing: fully pipelined, LAT = 4 cycles from in_valid to out_valid.
module qrd_boundary_cell #(
  parameter int unsigned QW = 20,
  parameter int unsigned QF = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 mode_bs,
  input  logic signed [QW-1:0] r_in,
  input  logic signed [QW-1:0] u_re, u_im,
  output logic                 out_valid,
  output logic signed [QW-1:0] c_out,
  output logic signed [QW-1:0] s_re, s_im,
  output logic signed [QW-1:0] r_out
);
  import dcmb_pkg::sat;
  localparam int unsigned SW  = 2 * QW + 2;   // even
  localparam int unsigned G   = 16;
  localparam int unsigned CSF = QW - 2;
  localparam int unsigned EW  = $clog2(SW);

  // stage 0: squared magnitude
  logic [SW-1:0]        s0;
  logic signed [QW-1:0] r0, ur0, ui0, r1, ur1, ui1, r2, ur2, ui2;
  logic                 m0, m1, m2, z0, z1, z2, v0, v1, v2;
  always_ff @(posedge clk) begin
    s0  <= mode_bs ? SW'(r_in * r_in)
                   : SW'(r_in * r_in) + SW'(u_re * u_re) + SW'(u_im * u_im);
    z0  <= !mode_bs && (u_re == '0) && (u_im == '0);
    r0 <= r_in; ur0 <= u_re; ui0 <= u_im; m0 <= mode_bs;
    r1 <= r0; ur1 <= ur0; ui1 <= ui0; m1 <= m0; z1 <= z0;
    r2 <= r1; ur2 <= ur1; ui2 <= ui1; m2 <= m1; z2 <= z1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0; end
    else begin v0 <= in_valid; v1 <= v0; v2 <= v1; out_valid <= v2; end
  end

  logic [G:0]    rsm;
  logic [EW-1:0] e2;
  logic          rz, rv;
  logic [SW-1:0] s1q, s2q;
  always_ff @(posedge clk) begin s1q <= s0; s2q <= s1q; end

  rsqrt_lut2 #(.SW(SW), .G(G)) u_rsqrt (
    .clk, .in_valid(v0), .s(s0), .out_valid(rv), .rsm(rsm), .e2(e2), .zero(rz));

  // stage 3: products with the inverse square root.
  // value(v * rsqrt(S)) for v with QF fraction bits and S with 2*QF:
  //   = v_int * rsm * 2^-(G + e2)   (the QF terms cancel)
  logic signed [127:0] rs;
  int                  sh;
  always_comb begin
    rs = 128'(signed'({1'b0, rsm}));
    sh = int'(G) + int'(e2);
  end
  always_ff @(posedge clk) begin
    if (m2) begin
      // X = U / R with QF fraction bits
      if (rz) begin
        s_re <= '0; s_im <= '0;
      end else begin
        s_re <= QW'(sat(((128'(ur2) * rs) <<< QF) >>> sh, QW));
        s_im <= QW'(sat(((128'(ui2) * rs) <<< QF) >>> sh, QW));
      end
      c_out <= QW'(1) <<< CSF;
      r_out <= r2;
    end else if (z2 || rz) begin
      c_out <= QW'(1) <<< CSF;
      s_re  <= '0;
      s_im  <= '0;
      r_out <= r2;
    end else begin
      c_out <= QW'(sat(((128'(r2)  * rs) <<< CSF) >>> sh, QW));
      s_re  <= QW'(sat(((128'(ur2) * rs) <<< CSF) >>> sh, QW));
      s_im  <= QW'(sat(((128'(ui2) * rs) <<< CSF) >>> sh, QW));
      r_out <= QW'(sat((128'(s2q) * rs) >>> sh, QW));
    end
  end
endmodule
