// tb_analytic_filter_iq: self-checking test of the complex analytical filter
// pair at N = 70.
//
// Part 1 loads random coefficients and random complex pairs and compares all
// four output words against a direct-form complex reference:
//   y_lp(m) = j * sum_k t(k) x(2(m-k)+1) + 1/2 x(2(m-17)),
//   y_hp(m) = j * sum_k t(k) x(2(m-k)+1) - 1/2 x(2(m-17)),
// with t the antisymmetric 36-tap extension of c(k), rounded as the output
// stage specifies. It also checks the two-clock latency and the tags.
// Part 2 loads a windowed-sinc halfband design and feeds complex tones: a
// tone in the positive half must come out on out_lp and be suppressed by at
// least 35 dB on out_hp, and the reverse for a negative tone.
module tb_analytic_filter_iq;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int unsigned N  = 70;
  localparam int unsigned M  = N / 2;
  localparam int unsigned NC = (M + 1) / 2;
  localparam int unsigned DD = (M - 1) / 2;
  localparam int unsigned NP = 300;

  logic    clk = 0, rst_n = 0, clear = 0;
  coef_t   coef [NC];
  logic    in_valid = 0, in_first = 0, in_keep = 0;
  pair_t   in_pair = '0;
  logic    out_valid, out_first, out_keep;
  out_iq_t out_lp, out_hp;

  analytic_filter_iq #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint tap [M+1];
  longint xa_re [NP], xa_im [NP], xb_re [NP], xb_im [NP];
  logic   tf [NP], tk [NP];
  int n_out = 0;
  bit random_part = 1;
  real p_lp, p_hp;
  int  skip_out;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s [%0d] got %0d exp %0d", what, n_out, got, exp);
    end
  endtask

  logic v1, v2;
  always @(posedge clk) begin
    v1 <= in_valid; v2 <= v1;
    if (rst_n && random_part) begin
      checks++;
      if (out_valid != v2) begin failures++; $display("FAIL latency"); end
      if (out_valid) begin
        longint s_re, s_im, d_re, d_im;
        int m;
        m = n_out;
        s_re = 0; s_im = 0; d_re = 0; d_im = 0;
        for (int k = 0; k <= int'(M); k++)
          if (m - k >= 0) begin
            s_re += tap[k] * xb_re[m-k];
            s_im += tap[k] * xb_im[m-k];
          end
        if (m - int'(DD) >= 0) begin
          d_re = xa_re[m-DD] * 16384;
          d_im = xa_im[m-DD] * 16384;
        end
        // j*s = -s_im + j s_re
        check("lp.re", out_lp.re, ref_round(-s_im + d_re));
        check("lp.im", out_lp.im, ref_round(s_re + d_im));
        check("hp.re", out_hp.re, ref_round(-s_im - d_re));
        check("hp.im", out_hp.im, ref_round(s_re - d_im));
        check("first", out_first, tf[m]);
        check("keep", out_keep, tk[m]);
        n_out++;
      end
    end
    if (!random_part && out_valid) begin
      if (skip_out > 0) skip_out--;
      else begin
        p_lp += real'(out_lp.re) * out_lp.re + real'(out_lp.im) * out_lp.im;
        p_hp += real'(out_hp.re) * out_hp.re + real'(out_hp.im) * out_hp.im;
      end
    end
  end

  task automatic tone(real w, output real lp, output real hp);
    p_lp = 0; p_hp = 0; skip_out = 40;
    for (int n = 0; n < 600; n += 2) begin
      @(posedge clk);
      in_valid <= 1;
      in_pair.x0.re <= sample_t'($rtoi(1500.0 * $cos(w * n)));
      in_pair.x0.im <= sample_t'($rtoi(1500.0 * $sin(w * n)));
      in_pair.x1.re <= sample_t'($rtoi(1500.0 * $cos(w * (n + 1))));
      in_pair.x1.im <= sample_t'($rtoi(1500.0 * $sin(w * (n + 1))));
    end
    @(posedge clk) in_valid <= 0;
    repeat (4) @(posedge clk);
    lp = p_lp; hp = p_hp;
  endtask

  initial begin
    longint c [64];
    real lp, hp;
    real pi = 3.14159265358979323846;
    for (int k = 0; k < int'(NC); k++) begin
      coef[k] = coef_t'($urandom);
      tap[k] = coef[k];
      tap[M-k] = -longint'(coef[k]);
    end
    for (int m = 0; m < int'(NP); m++) begin
      xa_re[m] = sample_t'($urandom); xa_im[m] = sample_t'($urandom);
      xb_re[m] = sample_t'($urandom); xb_im[m] = sample_t'($urandom);
      tf[m] = 1'($urandom); tk[m] = 1'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < int'(NP); m++) begin
      @(posedge clk);
      in_valid <= 1; in_first <= tf[m]; in_keep <= tk[m];
      in_pair.x0.re <= sample_t'(xa_re[m]); in_pair.x0.im <= sample_t'(xa_im[m]);
      in_pair.x1.re <= sample_t'(xb_re[m]); in_pair.x1.im <= sample_t'(xb_im[m]);
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk) in_valid <= 0;
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);
    check("count", n_out, NP);

    // Part 2: frequency separation with a real halfband design
    random_part = 0;
    hb_coefs(N, c);
    for (int k = 0; k < int'(NC); k++) coef[k] = coef_t'(c[k]);
    @(posedge clk) clear <= 1;
    @(posedge clk) clear <= 0;
    tone(0.5 * pi, lp, hp);
    checks++;
    if (!(lp > 3163.0 * hp && lp > 0)) begin failures++; $display("FAIL +tone lp=%g hp=%g", lp, hp); end
    tone(-0.3 * pi, lp, hp);
    checks++;
    if (!(hp > 3163.0 * lp && hp > 0)) begin failures++; $display("FAIL -tone lp=%g hp=%g", lp, hp); end
    tone(0.85 * pi, lp, hp);
    checks++;
    if (!(lp > 3163.0 * hp && lp > 0)) begin failures++; $display("FAIL +tone2 lp=%g hp=%g", lp, hp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
