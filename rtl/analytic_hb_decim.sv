// analytic_hb_decim: decimating analytical (Hilbert) halfband filter for one
// real-valued input rail, in the efficient polyphase form.
//
// The prototype is a halfband filter G(z) = H(z^2) +/- 1/2 z^-M of order
// N = 2M (M odd, N = 2 + 4k). Shifting it by a quarter of the sample rate
// turns the H(z^2) part into a Hilbert transformer whose taps are real and
// antisymmetric, multiplied by j, while the centre tap stays a pure delay with
// gain 1/2. Decimating by two lets the branches run at the output rate: the
// even-indexed samples x(2m) go to the delay branch z^-(M-1)/2, the
// odd-indexed samples x(2m+1) to the Hilbert branch, which holds M+1 taps but
// needs only (M+1)/2 multipliers because each coefficient multiplies the
// difference of the two samples that share it.
//
//   S(m)   = sum_{k=0}^{(M-1)/2} c(k) * ( x1(m-k) - x1(m-M+k) )
//   d(m)   = x0(m - (M-1)/2)
//   y_lp   = j*S + 0.5*d        (positive-frequency half)
//   y_hp   = j*S - 0.5*d        (negative-frequency half)
//
// Interface: one pair (x0, x1) per cycle with in_valid high; coef[k] holds
// c(k) in Q1.15 (already including the quarter-rate modulation signs). The
// outputs are complex, full precision, in units of 2^-15 of an input LSB, and
// are registered: out_valid follows in_valid by one clock. The real parts
// are 0.5*d on that scale, so their 14 lowest bits are always zero; the
// common word keeps the four outputs on one format. clear empties both
// delay lines. The structure, branch split and symmetric pre-subtraction
// follow the published filter diagram; the output register, the exact delay
// (M-1)/2 that results from pairing x(2m) with x(2m+1), the sign convention
// of y_hp (taken from G(z) with the minus sign) and the word lengths are this
// design's choices.
module analytic_hb_decim
  import dfe_pkg::*;
#(
  parameter int unsigned N = 70  // prototype filter order, N = 2 + 4k
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  coef_t   coef [(N/2+1)/2],
  input  logic    in_valid,
  input  sample_t in_x0,     // x(2m)
  input  sample_t in_x1,     // x(2m+1)
  output logic    out_valid,
  output acc_t    lp_re,
  output acc_t    lp_im,
  output acc_t    hp_re,
  output acc_t    hp_im
);

  localparam int unsigned M  = N / 2;        // odd
  localparam int unsigned NC = (M + 1) / 2;  // multipliers
  localparam int unsigned DD = (M - 1) / 2;  // delay-branch length

  if (N % 4 != 2) begin : g_bad_order
    $error("analytic_hb_decim: order N must be 2 + 4k");
  end

  sample_t hl [M];   // hl[i] = x1(m-1-i)
  sample_t dl [DD];  // dl[i] = x0(m-1-i)

  function automatic sample_t htap(input int unsigned k, input sample_t xin,
                                   input sample_t line [M]);
    return (k == 0) ? xin : line[k-1];
  endfunction

  acc_t    s_sum;
  sample_t d_now;

  always_comb begin
    s_sum = '0;
    for (int unsigned k = 0; k < NC; k++) begin
      logic signed [IN_W:0] pre;
      pre   = (IN_W+1)'(htap(k, in_x1, hl)) - (IN_W+1)'(htap(M - k, in_x1, hl));
      s_sum = s_sum + acc_t'(pre) * acc_t'(coef[k]);
    end
    d_now = (DD == 0) ? in_x0 : dl[DD-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(M); i++)  hl[i] <= '0;
      for (int i = 0; i < int'(DD); i++) dl[i] <= '0;
      out_valid <= 1'b0;
      lp_re <= '0; lp_im <= '0; hp_re <= '0; hp_im <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(M); i++)  hl[i] <= '0;
      for (int i = 0; i < int'(DD); i++) dl[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hl[0] <= in_x1;
        for (int i = 1; i < int'(M); i++) hl[i] <= hl[i-1];
        if (DD > 0) begin
          dl[0] <= in_x0;
          for (int i = 1; i < int'(DD); i++) dl[i] <= dl[i-1];
        end
        // 0.5 * d in units of 2^-COEF_FRAC
        lp_re <= acc_t'(d_now) <<< (COEF_FRAC - 1);
        hp_re <= -(acc_t'(d_now) <<< (COEF_FRAC - 1));
        lp_im <= s_sum;
        hp_im <= s_sum;
      end
    end
  end

endmodule
