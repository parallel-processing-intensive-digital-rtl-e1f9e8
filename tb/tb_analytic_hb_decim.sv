// tb_analytic_hb_decim: self-checking test of the real-rail decimating
// analytical filter at its default order N = 70.
//
// Random Q1.15 coefficients and random full-scale samples are fed as pairs
// with random idle cycles. The expected outputs come from the plain direct
// form: all M+1 Hilbert taps (the antisymmetric extension of c(k)) applied to
// the odd-sample history, and the centre tap 1/2 applied to x(2m) delayed by
// (M-1)/2 pairs, without the pre-subtraction the RTL uses. The test checks
// every output word, that out_valid follows in_valid by exactly one clock,
// and that clear empties the delay lines.
module tb_analytic_hb_decim;
  import dfe_pkg::*;

  localparam int unsigned N  = 70;
  localparam int unsigned M  = N / 2;
  localparam int unsigned NC = (M + 1) / 2;
  localparam int unsigned DD = (M - 1) / 2;
  localparam int unsigned NP = 400;  // pairs

  logic    clk = 0, rst_n = 0, clear = 0;
  coef_t   coef [NC];
  logic    in_valid = 0;
  sample_t in_x0 = 0, in_x1 = 0;
  logic    out_valid;
  acc_t    lp_re, lp_im, hp_re, hp_im;

  analytic_hb_decim #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint full_tap [M+1];
  sample_t xa [NP], xb [NP];
  int n_out = 0;
  int clear_at = 250;  // pair index at which the filter is cleared

  function automatic longint ref_s(int m);
    longint s = 0;
    for (int k = 0; k <= int'(M); k++)
      if (m - k >= (m >= clear_at ? clear_at : 0))
        s += full_tap[k] * longint'(xb[m-k]);
    return s;
  endfunction

  function automatic longint ref_d(int m);
    int lo = (m >= clear_at) ? clear_at : 0;
    return (m - int'(DD) >= lo) ? longint'(xa[m-DD]) : 0;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // output monitor: pair n_out arrives in order
  logic valid_d;
  always @(posedge clk) begin
    valid_d <= in_valid && !clear;
    if (rst_n) begin
      checks++;
      if (out_valid != valid_d) begin
        failures++;
        $display("FAIL out_valid timing");
      end
      if (out_valid) begin
        check("lp_re", lp_re, ref_d(n_out) <<< (COEF_FRAC - 1));
        check("hp_re", hp_re, -(ref_d(n_out) <<< (COEF_FRAC - 1)));
        check("lp_im", lp_im, ref_s(n_out));
        check("hp_im", hp_im, ref_s(n_out));
        n_out++;
      end
    end
  end

  initial begin
    for (int k = 0; k < int'(NC); k++) begin
      coef[k] = coef_t'($urandom);
      full_tap[k]     = longint'(coef[k]);
      full_tap[M - k] = -longint'(coef[k]);
    end
    for (int m = 0; m < int'(NP); m++) begin
      xa[m] = sample_t'($urandom);
      xb[m] = sample_t'($urandom);
      if (m % 50 == 3) begin xa[m] = 2047; xb[m] = -2048; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < int'(NP); m++) begin
      if (m == clear_at) begin
        @(posedge clk);
        clear <= 1; in_valid <= 0;
        @(posedge clk);
        clear <= 0;
      end
      @(posedge clk);
      in_valid <= 1; in_x0 <= xa[m]; in_x1 <= xb[m];
      @(posedge clk);
      in_valid <= 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check("output count", n_out, NP);
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
