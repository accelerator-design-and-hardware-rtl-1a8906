// norm_shift: binary-shift normalisation of a block of complex samples.
//
// While a block is written (in_valid), the unit ORs together the magnitude
// bits of every real and imaginary part (v XOR its sign extension, so that
// -1 and 0 both contribute nothing).  shl is then the number of left shifts
// that moves the largest sample up to GUARD bits below the top of a W-bit
// word.  The same shift is applied to the whole block, so the relative
// scaling of the tiles' data is kept and no division is needed, which is the
// normalisation rule of the design.  clear starts a new block.  shl is
// combinational from the accumulated OR register (updated the cycle after
// each sample).  The guard size is this implementation's choice.
module norm_shift #(
  parameter int unsigned W     = 24,
  parameter int unsigned GUARD = 1,
  parameter int unsigned SW    = $clog2(W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re, in_im,
  output logic [SW-1:0]       shl
);
  logic [W-2:0] mag_or;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        mag_or <= '0;
    else if (clear)    mag_or <= '0;
    else if (in_valid) mag_or <= mag_or | (in_re[W-2:0] ^ {(W-1){in_re[W-1]}})
                                        | (in_im[W-2:0] ^ {(W-1){in_im[W-1]}});
  end

  // leading redundant bits below the sign bit
  always_comb begin
    int lz;
    lz = W - 1;
    for (int b = 0; b < W - 1; b++)
      if (mag_or[b]) lz = W - 2 - b;
    shl = (lz > int'(GUARD)) ? SW'(lz - int'(GUARD)) : '0;
  end
endmodule
