// conv_xcorr_unit: folded convolution / cross-correlation engine.
//
// Computes, for o = 0 .. out_len-1,
//   out[o] = sum_{k=0}^{h_len-1} g[k] * x[out_start + o - k]
// with g[k] = h[k] (mode 0, convolution) or g[k] = conj(h[h_len-1-k])
// (mode 1, cross-correlation: time reversal plus conjugation, so
// out[o] = sum_t x[out_start - h_len + 1 + o + t] * conj(h[t])).
// Samples of x outside 0 .. x_len-1 count as zero, so a full-length
// convolution, a truncated window (delay compensation) or a block of
// correlation lags are all selected by out_start / out_len.
//
// The controller folds the filter onto the 4x1 systolic array: pass p feeds
// taps 4p .. 4p+3 for every output index, one output per cycle, adding the
// partial result of pass p-1 kept in an internal accumulator memory.  Both
// operand memories are outside the unit and are read through four-sample
// ports (bank4_ram) with one cycle of latency; x_base / h_base offset the
// addresses so that one memory can hold the vectors of all tiles.  Results
// of the last pass leave as a stream (o_valid, o_idx, o_re/o_im), scaled by
// an arithmetic right shift of out_shift and saturated to OW bits.
//
// Timing: ceil(h_len/4) passes of (2 + out_len + 6) cycles; done pulses one
// cycle after the last output.  The structure (controller, 4x1 systolic array,
// partial-output memory, one unit shared by both operations) follows the
// design; pass ordering, drain cycles and the scaling port are this
// implementation's choices.
module conv_xcorr_unit #(
  parameter int unsigned XW   = 32,    // x width
  parameter int unsigned HW   = 32,    // h width
  parameter int unsigned OW   = 32,    // output width
  parameter int unsigned ACCW = 80,    // accumulator width
  parameter int unsigned AW   = 16,    // operand memory address width
  parameter int unsigned OMAX = 256,   // largest out_len
  parameter int unsigned LW   = 16     // length / index field width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command
  input  logic                      start,
  input  logic                      mode_xcorr,
  input  logic [LW-1:0]             x_len, h_len, out_len,
  input  logic signed [LW:0]        out_start,
  input  logic [AW-1:0]             x_base, h_base,
  input  logic [6:0]                out_shift,
  output logic                      busy,
  output logic                      done,
  // operand read ports (data one cycle after the base)
  output logic [AW-1:0]             x_rd_base,
  input  logic signed [3:0][XW-1:0] x_rd_re, x_rd_im,
  output logic [AW-1:0]             h_rd_base,
  input  logic signed [3:0][HW-1:0] h_rd_re, h_rd_im,
  // result stream
  output logic                      o_valid,
  output logic [LW-1:0]             o_idx,
  output logic signed [OW-1:0]      o_re, o_im
);
  import dcmb_pkg::sat;

  typedef enum logic [2:0] {S_IDLE, S_HREQ, S_HLAT, S_RUN, S_DRAIN} state_e;
  localparam int unsigned OAW = $clog2(OMAX);

  state_e              st;
  logic                mode_q;
  logic [LW-1:0]       xlen_q, hlen_q, olen_q;
  logic signed [LW:0]  ostart_q;
  logic [AW-1:0]       xbase_q, hbase_q;
  logic [6:0]          shift_q;
  logic [LW-1:0]       pass_q, o_q;
  logic [3:0]          drain_q;
  logic signed [3:0][HW-1:0] g_re, g_im;   // current 4 taps, already ordered/conjugated

  logic signed [ACCW-1:0] acc_re [OMAX], acc_im [OMAX];

  // signed tap / sample positions for this pass
  logic signed [LW+2:0] hb_s, xb_s;
  always_comb begin
    hb_s = mode_q ? (signed'({3'b0, hlen_q}) - (LW+3)'(4) - (LW+3)'(signed'({3'b0, pass_q}) <<< 2))
                  : (LW+3)'(signed'({3'b0, pass_q}) <<< 2);
    xb_s = (LW+3)'(ostart_q) + (LW+3)'(signed'({3'b0, o_q})) - (LW+3)'(signed'({3'b0, pass_q}) <<< 2) - (LW+3)'(3);
  end
  assign h_rd_base = hbase_q + AW'(hb_s);
  assign x_rd_base = xbase_q + AW'(xb_s);

  // stage 1: operands arrive
  logic                 s1_v, s1_first;
  logic [LW-1:0]        s1_o;
  logic signed [LW+2:0] s1_xb;
  logic signed [ACCW-1:0] s1_acc_re, s1_acc_im;
  logic signed [3:0][XW-1:0] xa_re, xa_im;
  logic signed [ACCW-1:0] ps_re, ps_im;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      // tap j multiplies x[s1_xb + 3 - j]
      logic signed [LW+2:0] xi;
      xi = s1_xb + (LW+3)'(3 - j);
      if (xi >= 0 && xi < signed'({3'b0, xlen_q})) begin
        xa_re[j] = x_rd_re[3-j];
        xa_im[j] = x_rd_im[3-j];
      end else begin
        xa_re[j] = '0;
        xa_im[j] = '0;
      end
    end
    ps_re = s1_first ? '0 : s1_acc_re;
    ps_im = s1_first ? '0 : s1_acc_im;
  end

  logic                 m_v;
  logic [LW-1:0]        m_tag;
  logic signed [ACCW-1:0] m_re, m_im;
  logic                 last_pass;
  assign last_pass = ((pass_q + 1) << 2) >= hlen_q;

  mac4_systolic #(.AW(XW), .BW(HW), .ACCW(ACCW), .TAGW(LW)) u_mac (
    .clk, .rst_n,
    .in_valid(s1_v), .in_tag(s1_o),
    .a_re(xa_re), .a_im(xa_im), .b_re(g_re), .b_im(g_im),
    .psum_re(ps_re), .psum_im(ps_im),
    .out_valid(m_v), .out_tag(m_tag), .out_re(m_re), .out_im(m_im)
  );

  always_ff @(posedge clk) begin
    if (st == S_RUN) begin
      s1_acc_re <= acc_re[OAW'(o_q)];
      s1_acc_im <= acc_im[OAW'(o_q)];
    end
    if (m_v) begin
      acc_re[OAW'(m_tag)] <= m_re;
      acc_im[OAW'(m_tag)] <= m_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      s1_v <= 1'b0; s1_first <= 1'b0; s1_o <= '0; s1_xb <= '0;
      pass_q <= '0; o_q <= '0; drain_q <= '0;
      mode_q <= 1'b0; xlen_q <= '0; hlen_q <= '0; olen_q <= '0; ostart_q <= '0;
      xbase_q <= '0; hbase_q <= '0; shift_q <= '0;
      g_re <= '0; g_im <= '0;
      o_valid <= 1'b0; o_idx <= '0; o_re <= '0; o_im <= '0;
    end else begin
      done    <= 1'b0;
      s1_v    <= 1'b0;
      o_valid <= 1'b0;
      // result stream from the last pass
      if (m_v && last_pass) begin
        o_valid <= 1'b1;
        o_idx   <= m_tag;
        o_re    <= OW'(sat(128'(m_re) >>> shift_q, OW));
        o_im    <= OW'(sat(128'(m_im) >>> shift_q, OW));
      end
      unique case (st)
        S_IDLE: if (start) begin
          mode_q <= mode_xcorr; xlen_q <= x_len; hlen_q <= h_len; olen_q <= out_len;
          ostart_q <= out_start; xbase_q <= x_base; hbase_q <= h_base; shift_q <= out_shift;
          pass_q <= '0; busy <= 1'b1; st <= S_HREQ;
        end
        S_HREQ: st <= S_HLAT;   // h read issued this cycle
        S_HLAT: begin
          for (int j = 0; j < 4; j++) begin
            if (((pass_q << 2) + LW'(j)) < hlen_q) begin
              g_re[j] <= mode_q ? h_rd_re[3-j] : h_rd_re[j];
              g_im[j] <= mode_q ? -h_rd_im[3-j] : h_rd_im[j];
            end else begin
              g_re[j] <= '0;
              g_im[j] <= '0;
            end
          end
          o_q <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          s1_v     <= 1'b1;
          s1_o     <= o_q;
          s1_xb    <= xb_s;
          s1_first <= (pass_q == '0);
          if (o_q == olen_q - 1) begin
            drain_q <= '0;
            st      <= S_DRAIN;
          end else begin
            o_q <= o_q + 1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1;
          if (drain_q == 4'd6) begin
            if (last_pass) begin
              busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
            end else begin
              pass_q <= pass_q + 1;
              st     <= S_HREQ;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a new command may only be given while the unit is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);
endmodule
