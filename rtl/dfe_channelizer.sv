// dfe_channelizer: digital channelization front-end of an 80 MHz IEEE
// 802.11ac receiver, splitting the signal into two 40 MHz halves.
//
// The 80 MHz 802.11ac symbol is two 40 MHz halves with only three null
// subcarriers between them. This block separates the positive-frequency half
// (out_lp) from the negative-frequency half (out_hp) with a decimating
// analytical halfband filter, so that each half can go to its own 128-point
// FFT at 40 MHz. Two modes share the same polyphase filter:
//
//   MODE_LINEAR  samples -> commutator -> filter -> CP removal (160/32 per
//                branch). Continuous FIR filtering; the filter's impulse
//                response eats into the cyclic-prefix budget.
//   MODE_CYCLIC  samples -> CP removal (320/64) -> symbol buffer replaying
//                the last N samples first -> filter -> drop prefix outputs.
//                Cyclic convolution over each 256-sample symbol; costs one
//                symbol of latency but leaves the CP budget untouched.
//
// Interface: one complex A/D sample per clock at most (in_valid), in_first on
// the first sample (CP included) of each OFDM symbol, as found by the
// receiver's timing synchronisation. Each output beat carries one sample of
// each branch; out_first marks sample 0 of a 128-sample FFT window. The
// coefficients are written through coef_we/coef_addr/coef_wdata before use.
// mode is sampled every clock; a change clears all filter state, buffers and
// counters (samples in that clock are dropped), so switch between frames.
// Latency, input sample to output: 5 clocks in linear mode after the pair's
// second sample; in cyclic mode the symbol is first stored whole.
// The two modes, the filter structure and the sizes (L = 256, CP = 64,
// N = 70) follow the published front-end; the clear-on-mode-change, the
// symbol-start tag and all word lengths are this design's own.
module dfe_channelizer
  import dfe_pkg::*;
#(
  parameter int unsigned N  = 70,   // halfband prototype order
  parameter int unsigned L  = 256,  // FFT size at 80 MHz
  parameter int unsigned CP = 64    // cyclic prefix at 80 MHz
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  mode_e                        mode,
  input  logic                         coef_we,
  input  logic [$clog2((N/2+1)/2)-1:0] coef_addr,
  input  coef_t                        coef_wdata,
  input  logic                         in_valid,
  input  logic                         in_first,
  input  iq_t                          in_iq,
  output logic                         out_valid,
  output logic                         out_first,
  output out_iq_t                      out_lp,
  output out_iq_t                      out_hp
);

  localparam int unsigned NC = (N / 2 + 1) / 2;

  // ---------------- mode register and clear ----------------
  mode_e mode_q;
  logic  clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mode_q <= MODE_LINEAR;
    else        mode_q <= mode;
  end
  assign clear = (mode != mode_q);

  logic lin, cyc;
  assign lin = (mode_q == MODE_LINEAR) && !clear;
  assign cyc = (mode_q == MODE_CYCLIC) && !clear;

  // ---------------- coefficients ----------------
  coef_t coef [NC];

  coef_regs #(.N(N)) u_coef (
    .clk, .rst_n,
    .we(coef_we), .addr(coef_addr), .wdata(coef_wdata),
    .coef
  );

  // ---------------- linear path: commutator ----------------
  logic  lp_valid, lp_first;
  pair_t lp_pair;

  commutator u_comm (
    .clk, .rst_n, .clear,
    .in_valid (in_valid && lin),
    .in_first (in_first),
    .in_iq    (in_iq),
    .out_valid(lp_valid),
    .out_first(lp_first),
    .out_pair (lp_pair)
  );

  // ---------------- cyclic path: CP removal + symbol buffer ----------------
  logic cr_valid, cr_first;
  iq_t  cr_iq;

  cp_remover #(.SYM_LEN(L + CP), .CP_LEN(CP), .W($bits(iq_t))) u_cp_in (
    .clk, .rst_n, .clear,
    .in_valid (in_valid && cyc),
    .in_first (in_first),
    .in_data  (in_iq),
    .out_valid(cr_valid),
    .out_first(cr_first),
    .out_data (cr_iq)
  );

  logic  cb_valid, cb_first, cb_keep, cb_swap;
  pair_t cb_pair;

  cyclic_sym_buffer #(.L(L), .N(N)) u_cbuf (
    .clk, .rst_n, .clear,
    .in_valid (cr_valid),
    .in_first (cr_first),
    .in_iq    (cr_iq),
    .out_valid(cb_valid),
    .out_first(cb_first),
    .out_keep (cb_keep),
    .out_pair (cb_pair),
    .bank_swap(cb_swap)
  );

  // ---------------- shared polyphase analytical filter ----------------
  logic    f_in_valid, f_in_first, f_in_keep;
  pair_t   f_in_pair;
  logic    f_valid, f_first, f_keep;
  out_iq_t f_lp, f_hp;

  always_comb begin
    if (mode_q == MODE_CYCLIC) begin
      f_in_valid = cb_valid;
      f_in_first = cb_first;
      f_in_keep  = cb_keep;
      f_in_pair  = cb_pair;
    end else begin
      f_in_valid = lp_valid;
      f_in_first = lp_first;
      f_in_keep  = 1'b1;
      f_in_pair  = lp_pair;
    end
  end

  analytic_filter_iq #(.N(N)) u_filt (
    .clk, .rst_n, .clear, .coef,
    .in_valid (f_in_valid),
    .in_first (f_in_first),
    .in_keep  (f_in_keep),
    .in_pair  (f_in_pair),
    .out_valid(f_valid),
    .out_first(f_first),
    .out_keep (f_keep),
    .out_lp   (f_lp),
    .out_hp   (f_hp)
  );

  // ---------------- linear path: CP removal at 40 MHz ----------------
  logic                         co_valid, co_first;
  logic [2*$bits(out_iq_t)-1:0] co_data;

  cp_remover #(.SYM_LEN((L + CP) / 2), .CP_LEN(CP / 2), .W(2 * $bits(out_iq_t))) u_cp_out (
    .clk, .rst_n, .clear,
    .in_valid (f_valid && mode_q == MODE_LINEAR),
    .in_first (f_first),
    .in_data  ({f_lp, f_hp}),
    .out_valid(co_valid),
    .out_first(co_first),
    .out_data (co_data)
  );

  // ---------------- output select ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_lp    <= '0;
      out_hp    <= '0;
    end else if (mode_q == MODE_CYCLIC) begin
      out_valid <= f_valid && f_keep && !clear;
      out_first <= f_valid && f_keep && f_first && !clear;
      out_lp    <= f_lp;
      out_hp    <= f_hp;
    end else begin
      out_valid <= co_valid && !clear;
      out_first <= co_first && !clear;
      {out_lp, out_hp} <= co_data;
    end
  end

  // Bank swaps happen only in cyclic mode; kept visible for debugging.
  logic unused_swap;
  assign unused_swap = cb_swap;

endmodule
