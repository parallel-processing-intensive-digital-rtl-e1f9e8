// analytic_filter_iq: complex decimating analytical filter pair.
//
// A complex input needs two real analytical filters, one for the I rail and
// one for the Q rail, both with the same coefficients. Their complex outputs
// are combined as y = y_I + j*y_Q, which gives the positive-frequency half of
// the 80 MHz spectrum on out_lp and the negative-frequency half on out_hp,
// each at half the input sample rate. The full-precision sums are rounded
// half up and saturated to OUT_W bits (see dfe_pkg).
//
// Interface: one sample pair per cycle with in_valid high; in_first and
// in_keep are side-band tags carried along with the data. Latency is two
// clocks (filter register, then rounding register), throughput one pair per
// clock. clear empties the filters' delay lines and the pipeline.
// Using one real filter per rail follows the published structure; the
// tag side-band, the rounding and the pipeline depth are this design's own.
module analytic_filter_iq
  import dfe_pkg::*;
#(
  parameter int unsigned N = 70
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  coef_t   coef [(N/2+1)/2],
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_keep,
  input  pair_t   in_pair,
  output logic    out_valid,
  output logic    out_first,
  output logic    out_keep,
  output out_iq_t out_lp,
  output out_iq_t out_hp
);

  logic i_valid, q_valid;
  acc_t i_lp_re, i_lp_im, i_hp_re, i_hp_im;
  acc_t q_lp_re, q_lp_im, q_hp_re, q_hp_im;
  logic first_q, keep_q;

  analytic_hb_decim #(.N(N)) u_i (
    .clk, .rst_n, .clear, .coef,
    .in_valid (in_valid),
    .in_x0    (in_pair.x0.re),
    .in_x1    (in_pair.x1.re),
    .out_valid(i_valid),
    .lp_re(i_lp_re), .lp_im(i_lp_im), .hp_re(i_hp_re), .hp_im(i_hp_im)
  );

  analytic_hb_decim #(.N(N)) u_q (
    .clk, .rst_n, .clear, .coef,
    .in_valid (in_valid),
    .in_x0    (in_pair.x0.im),
    .in_x1    (in_pair.x1.im),
    .out_valid(q_valid),
    .lp_re(q_lp_re), .lp_im(q_lp_im), .hp_re(q_hp_re), .hp_im(q_hp_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q   <= 1'b0;
      keep_q    <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_keep  <= 1'b0;
      out_lp    <= '0;
      out_hp    <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_keep  <= 1'b0;
    end else begin
      if (in_valid) begin
        first_q <= in_first;
        keep_q  <= in_keep;
      end
      out_valid <= i_valid;
      if (i_valid) begin
        out_first <= first_q;
        out_keep  <= keep_q;
        // (a + jb) + j(c + jd) = (a - d) + j(b + c)
        out_lp.re <= round_sat(i_lp_re - q_lp_im);
        out_lp.im <= round_sat(i_lp_im + q_lp_re);
        out_hp.re <= round_sat(i_hp_re - q_hp_im);
        out_hp.im <= round_sat(i_hp_im + q_hp_re);
      end
    end
  end

  // Both rails are driven by the same valid and must stay in step.
  a_rails_in_step: assert property (@(posedge clk) disable iff (!rst_n) i_valid == q_valid);

endmodule
