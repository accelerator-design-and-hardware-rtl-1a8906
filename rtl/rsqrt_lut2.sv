// rsqrt_lut2: inverse square root from two small lookup tables.
//
// The unsigned input S is shifted left by an even number of bit positions so
// that its leading one lands on bit SW-1 or SW-2; the word then holds the
// mantissa m in [1, 4) with S = m * 4^e2.  The top seven bits of the normalised word
// (m * 32, 32 .. 127) index the two tables, the next eight bits are the
// interpolation fraction f.  Table one holds 1/sqrt(m) at the start of each of
// the 96 segments, table two the drop across the segment, and
//   rsm = base[k] - (slope[k] * f) >> 8,      1/sqrt(m) = rsm / 2^G.
// For the input as an integer, 1/sqrt(S) = rsm * 2^-(G + e2) with e2 returned
// on the side (the caller folds e2 and its own fixed-point position into one
// shift).  The relative error is below 1e-4.  Both tables are computed at
// elaboration time from an integer square root.
//
// Replacing the rotation method with two small lookup tables follows the
// design; the segment count, interpolation and table formats are this
// implementation's choices.  Timing: two pipeline stages, one result per
// cycle; zero is flagged when S = 0 (rsm is then meaningless).
module rsqrt_lut2 #(
  parameter int unsigned SW = 42,   // input width (even)
  parameter int unsigned G  = 16,   // result fraction bits
  parameter int unsigned EW = $clog2(SW)
) (
  input  logic            clk,
  input  logic            in_valid,
  input  logic [SW-1:0]   s,
  output logic            out_valid,
  output logic [G:0]      rsm,
  output logic [EW-1:0]   e2,
  output logic            zero
);
  localparam int unsigned NSEG = 96;

  function automatic longint unsigned isqrt(input longint unsigned v);
    longint unsigned r = 0, bitv = 64'd1 << 62;
    while (bitv > v) bitv >>= 2;
    while (bitv != 0) begin
      if (v >= r + bitv) begin v -= r + bitv; r = (r >> 1) + bitv; end
      else r >>= 1;
      bitv >>= 2;
    end
    return r;
  endfunction

  function automatic logic [G:0] base_val(input int k);
    // round(2^G / sqrt((k + 32) / 32))
    return (G+1)'(isqrt((64'd1 << (2 * G + 5)) / 64'(k + 32)));
  endfunction

  typedef logic [G:0] tab_t [NSEG];
  function automatic tab_t mk_base();
    tab_t t;
    for (int k = 0; k < NSEG; k++) t[k] = base_val(k);
    return t;
  endfunction
  function automatic tab_t mk_slope();
    tab_t t;
    for (int k = 0; k < NSEG; k++) t[k] = base_val(k) - base_val(k + 1);
    return t;
  endfunction
  localparam tab_t BASE  = mk_base();
  localparam tab_t SLOPE = mk_slope();

  // stage 1: even normalisation
  logic [SW-1:0] norm_q;
  logic [EW-1:0] e2_q;
  logic          v1, z1;
  always_ff @(posedge clk) begin
    int p;
    p = 0;
    for (int b = 0; b < SW; b++) if (s[b]) p = b;
    p = p & ~1;                                  // even position q'
    norm_q <= s << (SW - 2 - p);
    e2_q   <= EW'(p / 2);
    z1     <= (s == '0);
    v1     <= in_valid;
  end

  // stage 2: table look-up and linear interpolation
  logic [6:0] mi;
  logic [7:0] fr;
  logic [6:0] k;
  assign mi = norm_q[SW-1 -: 7];
  assign fr = norm_q[SW-8 -: 8];
  assign k  = mi - 7'd32;
  always_ff @(posedge clk) begin
    rsm       <= BASE[k] - (G+1)'((32'(SLOPE[k]) * 32'(fr)) >> 8);
    e2        <= e2_q;
    zero      <= z1;
    out_valid <= v1;
  end
endmodule
