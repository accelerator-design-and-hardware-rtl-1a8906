// fir_decim: anti-alias filter and decimation by DEC in one folded pass.
//
// Computes only the samples that survive decimation:
//   y[m] = sum_{k=0}^{n_taps-1} g[k] * x[DEC*m + n_taps - 1 - k],  m = 0 .. n_out-1
// with real filter coefficients g and complex x (zero outside 0 .. x_len-1).
// Four consecutive input samples per cycle come from four interleaved memory
// banks (bank4_ram, outside the unit) and feed four coefficient multipliers
// of the 4x1 systolic array; the sum of the four products is added to the
// matching intermediate result of the previous fold, which the unit keeps in
// its own memory, so that the whole filter is covered four taps at a time.
// Results of the last fold leave as a stream (o_valid, o_idx, o_re/o_im)
// after an arithmetic right shift by out_shift and saturation to OW bits; the
// caller distributes them to its output banks.  Filter coefficients are
// written through coef_we / coef_addr / coef_data (signed, CW bits).
//
// The folded four-multiplier structure, the stored intermediate results and
// the decimation by 8 (1.5 B_U to 3 B_U / 16) follow the design; the filter
// length (set at run time, up to AAMAX), the coefficient width and the
// ordering of folds are this implementation's choices.
//
// Timing: ceil(n_taps/4) folds of (2 + n_out + 6) cycles; done pulses once.
module fir_decim #(
  parameter int unsigned XW    = 32,
  parameter int unsigned CW    = 18,
  parameter int unsigned OW    = 32,
  parameter int unsigned ACCW  = 64,
  parameter int unsigned AW    = 16,
  parameter int unsigned DEC   = 8,
  parameter int unsigned AAMAX = 64,    // longest filter
  parameter int unsigned OMAX  = 128,   // most outputs per run
  parameter int unsigned LW    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // coefficient load
  input  logic                      coef_we,
  input  logic [$clog2(AAMAX)-1:0]  coef_addr,
  input  logic signed [CW-1:0]      coef_data,
  // command
  input  logic                      start,
  input  logic [LW-1:0]             x_len, n_out,
  input  logic [$clog2(AAMAX):0]    n_taps,
  input  logic [AW-1:0]             x_base,
  input  logic [6:0]                out_shift,
  output logic                      busy,
  output logic                      done,
  // input sample port (four consecutive samples one cycle after the base)
  output logic [AW-1:0]             x_rd_base,
  input  logic signed [3:0][XW-1:0] x_rd_re, x_rd_im,
  // result stream
  output logic                      o_valid,
  output logic [LW-1:0]             o_idx,
  output logic signed [OW-1:0]      o_re, o_im
);
  import dcmb_pkg::sat;

  typedef enum logic [1:0] {S_IDLE, S_LOADC, S_RUN, S_DRAIN} state_e;
  localparam int unsigned OAW = $clog2(OMAX);
  localparam int unsigned KW  = $clog2(AAMAX) + 1;

  state_e             st;
  logic [LW-1:0]      xlen_q, nout_q, m_q, pass_q;
  logic [KW-1:0]      ntap_q;
  logic [AW-1:0]      xbase_q;
  logic [6:0]         shift_q;
  logic [3:0]         drain_q;
  logic signed [CW-1:0] coef [AAMAX];
  logic signed [3:0][CW-1:0] g_re, g_im;

  logic signed [ACCW-1:0] acc_re [OMAX], acc_im [OMAX];

  always_ff @(posedge clk) if (coef_we) coef[coef_addr] <= coef_data;

  // base of the four samples for output m in fold p: DEC*m + n_taps - 4 - 4p
  logic signed [LW+2:0] xb_s;
  always_comb
    xb_s = (LW+3)'(signed'({3'b0, m_q}) * DEC) + (LW+3)'(signed'({1'b0, ntap_q}))
         - (LW+3)'(4) - (LW+3)'(signed'({3'b0, pass_q}) <<< 2);
  assign x_rd_base = xbase_q + AW'(xb_s);

  logic                 s1_v, s1_first;
  logic [LW-1:0]        s1_o;
  logic signed [LW+2:0] s1_xb;
  logic signed [ACCW-1:0] s1_acc_re, s1_acc_im, ps_re, ps_im;
  logic signed [3:0][XW-1:0] xa_re, xa_im;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic signed [LW+2:0] xi;
      xi = s1_xb + (LW+3)'(3 - j);   // tap j multiplies x[base + 3 - j]
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

  logic                 m_v, last_pass;
  logic [LW-1:0]        m_tag;
  logic signed [ACCW-1:0] m_re, m_im;
  assign last_pass = ((pass_q + 1) << 2) >= LW'(ntap_q);

  mac4_systolic #(.AW(XW), .BW(CW), .ACCW(ACCW), .TAGW(LW)) u_mac (
    .clk, .rst_n, .in_valid(s1_v), .in_tag(s1_o),
    .a_re(xa_re), .a_im(xa_im), .b_re(g_re), .b_im(g_im),
    .psum_re(ps_re), .psum_im(ps_im),
    .out_valid(m_v), .out_tag(m_tag), .out_re(m_re), .out_im(m_im)
  );

  always_ff @(posedge clk) begin
    if (st == S_RUN) begin
      s1_acc_re <= acc_re[OAW'(m_q)];
      s1_acc_im <= acc_im[OAW'(m_q)];
    end
    if (m_v) begin
      acc_re[OAW'(m_tag)] <= m_re;
      acc_im[OAW'(m_tag)] <= m_im;
    end
  end

  assign g_im = '0;   // real anti-alias filter

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      s1_v <= 1'b0; s1_first <= 1'b0; s1_o <= '0; s1_xb <= '0;
      xlen_q <= '0; nout_q <= '0; ntap_q <= '0; xbase_q <= '0; shift_q <= '0;
      m_q <= '0; pass_q <= '0; drain_q <= '0; g_re <= '0;
      o_valid <= 1'b0; o_idx <= '0; o_re <= '0; o_im <= '0;
    end else begin
      done <= 1'b0; s1_v <= 1'b0; o_valid <= 1'b0;
      if (m_v && last_pass) begin
        o_valid <= 1'b1;
        o_idx   <= m_tag;
        o_re    <= OW'(sat(128'(m_re) >>> shift_q, OW));
        o_im    <= OW'(sat(128'(m_im) >>> shift_q, OW));
      end
      unique case (st)
        S_IDLE: if (start) begin
          xlen_q <= x_len; nout_q <= n_out; ntap_q <= n_taps; xbase_q <= x_base;
          shift_q <= out_shift; pass_q <= '0; busy <= 1'b1; st <= S_LOADC;
        end
        S_LOADC: begin
          // coefficients of this fold into the four multipliers
          for (int j = 0; j < 4; j++) begin
            if (((pass_q << 2) + LW'(j)) < LW'(ntap_q))
              g_re[j] <= coef[$clog2(AAMAX)'((pass_q << 2) + LW'(j))];
            else
              g_re[j] <= '0;
          end
          m_q <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          s1_v <= 1'b1; s1_o <= m_q; s1_xb <= xb_s; s1_first <= (pass_q == '0);
          if (m_q == nout_q - 1) begin
            drain_q <= '0; st <= S_DRAIN;
          end else m_q <= m_q + 1;
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1;
          if (drain_q == 4'd6) begin
            if (last_pass) begin
              busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
            end else begin
              pass_q <= pass_q + 1; st <= S_LOADC;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == S_IDLE);
endmodule
