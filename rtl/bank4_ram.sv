// bank4_ram: four interleaved memory banks that deliver four consecutive
// complex samples per cycle.
//
// Sample address a lives in bank (a mod 4) at row (a div 4).  A read at base
// address rd_base returns mem[rd_base+0..3] in rd_re/rd_im[0..3] one cycle
// later, one sample from each bank, which is what the four multipliers of the
// folded filter and convolution units consume every cycle.  One write port
// stores one sample per cycle.  Addresses past DEPTH-1 read as zero; the
// stored contents are not reset.
module bank4_ram #(
  parameter int unsigned DEPTH = 1024,  // samples (rounded up to a multiple of 4)
  parameter int unsigned W     = 32,    // re/im width
  parameter int unsigned AW    = $clog2(DEPTH + 4)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [AW-1:0]             waddr,
  input  logic signed [W-1:0]       wre, wim,
  input  logic [AW-1:0]             rd_base,
  output logic signed [3:0][W-1:0]  rd_re, rd_im
);
  localparam int unsigned ROWS = (DEPTH + 3) / 4;

  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic signed [W-1:0] lane_re [4], lane_im [4];
  logic [1:0]          lane_k [4];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    // address of sample rd_base + k that falls in bank b
    logic [AW-1:0] a_k;
    logic [1:0]    k;
    logic [2*W-1:0] q;
    logic           q_ok;
    logic [2*W-1:0] mem [ROWS];   // this lane's storage
    logic [AW-1:0]  wrow, rrow;
    assign wrow = waddr >> 2;
    assign rrow = a_k >> 2;
    always_comb begin
      k   = 2'(b - int'(rd_base[1:0]));
      a_k = rd_base + AW'(k);
    end
    always_ff @(posedge clk) begin
      if (we && waddr[1:0] == 2'(b) && wrow < AW'(ROWS))
        mem[RW'(wrow)] <= {wre, wim};
      q_ok <= rrow < AW'(ROWS);
      q    <= mem[RW'(rrow)];
    end
    // route bank b output back to lane k (lane order captured with the read)
    logic [1:0] k_q;
    always_ff @(posedge clk) k_q <= k;
    assign lane_re[b] = q_ok ? q[2*W-1:W] : '0;
    assign lane_im[b] = q_ok ? q[W-1:0]   : '0;
    assign lane_k[b]  = k_q;
  end

  always_comb begin
    rd_re = '0;
    rd_im = '0;
    for (int b = 0; b < 4; b++) begin
      rd_re[lane_k[b]] = lane_re[b];
      rd_im[lane_k[b]] = lane_im[b];
    end
  end
endmodule
