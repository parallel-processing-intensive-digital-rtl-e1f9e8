// tb_dfe_channelizer: end-to-end test of the channelizer at its default
// sizes (N = 70, L = 256, CP = 64), one complex sample per clock at most.
//
// A windowed-sinc halfband design is written through the coefficient port.
// The run then goes LINEAR (4 symbols) -> CYCLIC (5 symbols) -> LINEAR
// (2 symbols), each mode change being a mode switch that clears the filter.
// Symbols are 320 random complex samples, except one cyclic symbol that holds
// a single positive-frequency subcarrier.
//
// Reference, computed here from the filter taps in direct form:
//   linear: y(m) = j*sum_k t(k) x(2(m-k)+1) + / - 1/2 x(2(m-17)) over the
//           continuous stream since the last mode switch, of which outputs
//           32..159 of every 160 are kept;
//   cyclic: the same sum with all indices taken modulo 256 over the 256
//           samples after the CP of each symbol.
// Every output word, out_first, and the number of outputs (128 per symbol
// and branch) are checked. The subcarrier symbol must come out on out_lp
// with out_hp at least 40 dB weaker. The latency from the last sample of a
// cyclic symbol to its last output must fit in the 16 us SIFS at 80 MHz, and
// the linear-mode latency must be 5 clocks.
// Mechanisms counted, each required at least once: mode switches, CP samples
// dropped before and after the filter, wrapped-tail outputs discarded,
// symbol-buffer bank swaps, back-to-back symbols in cyclic mode.
module tb_dfe_channelizer;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int unsigned N = 70, L = 256, CP = 64;
  localparam int unsigned M = N / 2, NC = (M + 1) / 2, DD = (M - 1) / 2;
  localparam int unsigned SYM = L + CP;
  localparam int SYMI = SYM, CPI = CP, LI = L, MI = M, DDI = DD;
  localparam int TAIL = 40;

  logic    clk = 0, rst_n = 0;
  mode_e   mode = MODE_LINEAR;
  logic    coef_we = 0;
  logic [$clog2(NC)-1:0] coef_addr = '0;
  coef_t   coef_wdata = '0;
  logic    in_valid = 0, in_first = 0;
  iq_t     in_iq = '0;
  logic    out_valid, out_first;
  out_iq_t out_lp, out_hp;

  dfe_channelizer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint tap [M+1];

  // expected output queue
  typedef struct { longint lr, li, hr, hi; logic f; } exp_t;
  exp_t exp_q [$];

  // mechanism counters
  int n_switch = 0, n_cp_in_drop = 0, n_cp_out_drop = 0, n_tail_drop = 0;
  int n_swap = 0, n_out = 0;
  int cyc = 0;
  real tone_lp = 0, tone_hp = 0;
  bit  tone_window = 0;
  int  last_out_cyc = 0;
  int  lat_in_cyc = -1, lat_out_cyc = -1, lin_smp = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.clear) n_switch++;
      if (dut.u_cp_in.in_valid && !dut.u_cp_in.clear && dut.u_cp_in.idx < CP) n_cp_in_drop++;
      if (dut.u_cp_out.in_valid && !dut.u_cp_out.clear && dut.u_cp_out.idx < CP / 2) n_cp_out_drop++;
      if (dut.mode_q == MODE_CYCLIC && dut.f_valid && !dut.f_keep) n_tail_drop++;
      if (dut.cb_swap) n_swap++;
      // latency: from the clock that presents sample 65 (second sample of
      // the first kept pair) to the clock in which its output is presented
      if (in_valid && mode == MODE_LINEAR && dut.mode_q == MODE_LINEAR) begin
        if (lin_smp == CPI + 1 && lat_in_cyc < 0) lat_in_cyc = cyc;
        lin_smp++;
      end
      if (out_valid) begin
        exp_t e;
        n_out++;
        last_out_cyc = cyc;
        if (out_first && lat_out_cyc < 0) lat_out_cyc = cyc;
        check("output expected", exp_q.size() > 0);
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check("lp.re", out_lp.re == out_t'(e.lr));
          check("lp.im", out_lp.im == out_t'(e.li));
          check("hp.re", out_hp.re == out_t'(e.hr));
          check("hp.im", out_hp.im == out_t'(e.hi));
          check("first", out_first == e.f);
        end
        if (tone_window) begin
          tone_lp += real'(out_lp.re) * out_lp.re + real'(out_lp.im) * out_lp.im;
          tone_hp += real'(out_hp.re) * out_hp.re + real'(out_hp.im) * out_hp.im;
        end
      end
    end
  end

  // reference output for one decimated index from a sample array
  function automatic exp_t ref_y(ref longint xr [], ref longint xi [], input int m, input bit cyclic, input int len);
    longint s_re = 0, s_im = 0, d_re = 0, d_im = 0;
    exp_t e;
    for (int k = 0; k <= MI; k++) begin
      int idx = 2 * (m - k) + 1;
      if (cyclic) idx = ((idx % len) + len) % len;
      if (idx >= 0) begin s_re += tap[k] * xr[idx]; s_im += tap[k] * xi[idx]; end
    end
    begin
      int idx = 2 * (m - DDI);
      if (cyclic) idx = ((idx % len) + len) % len;
      if (idx >= 0) begin d_re = xr[idx] * 16384; d_im = xi[idx] * 16384; end
    end
    e.lr = ref_round(-s_im + d_re);
    e.li = ref_round(s_re + d_im);
    e.hr = ref_round(-s_im - d_re);
    e.hi = ref_round(s_re - d_im);
    e.f  = 0;
    return e;
  endfunction

  task automatic drive(longint xr, longint xi, bit first, bit gaps);
    @(posedge clk);
    in_valid <= 1; in_first <= first;
    in_iq.re <= sample_t'(xr); in_iq.im <= sample_t'(xi);
    if (gaps && $urandom_range(0, 5) == 0) begin
      @(posedge clk) in_valid <= 0; in_first <= 0;
    end
  endtask

  task automatic idle(int n);
    @(posedge clk) in_valid <= 0; in_first <= 0;
    repeat (n - 1) @(posedge clk);
  endtask

  task automatic switch_mode(mode_e m);
    @(posedge clk) mode <= m; in_valid <= 0; in_first <= 0;
    repeat (3) @(posedge clk);
  endtask

  // linear run: nsym symbols from a cleared filter
  task automatic run_linear(int nsym);
    longint xr [], xi [];
    // TAIL extra samples (no tag) let the last window complete
    xr = new[nsym * SYM + TAIL]; xi = new[nsym * SYM + TAIL];
    for (int i = 0; i < nsym * SYMI + TAIL; i++) begin
      xr[i] = longint'(sample_t'($urandom_range(0, 3000) - 1500));
      xi[i] = longint'(sample_t'($urandom_range(0, 3000) - 1500));
    end
    // window: outputs CP/2 .. SYM/2-1 of each symbol
    for (int s = 0; s < nsym; s++)
      for (int m = (CPI / 2); m < (SYMI / 2); m++) begin
        exp_t e;
        e = ref_y(xr, xi, s * (SYMI / 2) + m, 0, 0);
        e.f = (m == (CPI / 2));
        exp_q.push_back(e);
      end
    lat_in_cyc = -1; lat_out_cyc = -1; lin_smp = 0;
    for (int i = 0; i < nsym * SYMI + TAIL; i++) begin
      drive(xr[i], xi[i], i % SYM == 0 && i < nsym * SYMI, 1);
    end
    $display("linear latency, last sample of a pair to its output: %0d clocks", lat_out_cyc - lat_in_cyc);
    check("linear latency 5 clocks", lat_out_cyc - lat_in_cyc == 5);
    idle(20);
  endtask

  // cyclic run: nsym symbols back to back; symbol tone_sym holds a subcarrier
  task automatic run_cyclic(int nsym, int tone_sym, int bin);
    longint xr [], xi [];
    longint br [], bi [];
    int end_cyc;
    real ph;
    xr = new[nsym * SYM]; xi = new[nsym * SYM];
    br = new[L]; bi = new[L];
    for (int s = 0; s < nsym; s++)
      for (int i = 0; i < SYMI; i++) begin
        int n = s * SYMI + i;
        if (s == tone_sym) begin
          ph = 2.0 * 3.14159265358979 * real'(bin) * real'(i - CPI) / real'(L);
          xr[n] = longint'($rtoi(1400.0 * $cos(ph)));
          xi[n] = longint'($rtoi(1400.0 * $sin(ph)));
        end else begin
          xr[n] = longint'(sample_t'($urandom_range(0, 3000) - 1500));
          xi[n] = longint'(sample_t'($urandom_range(0, 3000) - 1500));
        end
      end
    for (int s = 0; s < nsym; s++) begin
      for (int i = 0; i < LI; i++) begin
        br[i] = xr[s * SYMI + CPI + i];
        bi[i] = xi[s * SYMI + CPI + i];
      end
      for (int m = 0; m < (LI / 2); m++) begin
        exp_t e;
        e = ref_y(br, bi, m, 1, L);
        e.f = (m == 0);
        exp_q.push_back(e);
      end
    end
    for (int s = 0; s < nsym; s++)
      for (int i = 0; i < SYMI; i++) begin
        tone_window = (s == tone_sym + 1) && (i < int'(L / 2 + M + 8));
        drive(xr[s * SYMI + i], xi[s * SYMI + i], i == 0, 0);
      end
    @(posedge clk) in_valid <= 0; in_first <= 0;
    end_cyc = cyc;
    tone_window = 0;
    while (exp_q.size() > 0 && cyc < end_cyc + 2000) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("cyclic latency, last input sample to last output: %0d clocks", last_out_cyc - end_cyc);
    check("cyclic latency within SIFS (16 us at 80 MHz = 1280 clocks)", last_out_cyc - end_cyc <= 1280);
  endtask

  initial begin
    longint c [64];
    int outs_before;
    hb_coefs(N, c);
    for (int k = 0; k <= MI; k++) tap[k] = c[k];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < int'(NC); k++) begin
      @(posedge clk) coef_we <= 1; coef_addr <= k[$clog2(NC)-1:0]; coef_wdata <= coef_t'(c[k]);
    end
    @(posedge clk) coef_we <= 0;
    check("coefficient antisymmetry of the design", c[M] == -c[0]);

    outs_before = n_out;
    run_linear(4);
    check("linear: 128 outputs per symbol", n_out - outs_before == 4 * 128);
    check("linear: all expected outputs seen", exp_q.size() == 0);

    switch_mode(MODE_CYCLIC);
    outs_before = n_out;
    run_cyclic(5, 2, 40);
    check("cyclic: 128 outputs per symbol", n_out - outs_before == 5 * 128);
    check("cyclic: all expected outputs seen", exp_q.size() == 0);
    $display("subcarrier 40: lp power %g, hp power %g", tone_lp, tone_hp);
    check("subcarrier on lp, >40 dB below on hp", tone_lp > 0 && tone_hp * 10000.0 < tone_lp);

    switch_mode(MODE_LINEAR);
    outs_before = n_out;
    run_linear(2);
    check("linear again: 128 outputs per symbol", n_out - outs_before == 2 * 128);
    check("linear again: all expected outputs seen", exp_q.size() == 0);

    $display("mode switches %0d, CP drops in %0d out %0d, tail discards %0d, bank swaps %0d, outputs %0d",
             n_switch, n_cp_in_drop, n_cp_out_drop, n_tail_drop, n_swap, n_out);
    check("mode switch happened", n_switch >= 2);
    check("CP removed before cyclic filter", n_cp_in_drop == 5 * CPI);
    // each linear run also drops the CP-counted outputs of its tail samples
    check("CP removed after linear filter", n_cp_out_drop >= 6 * (CPI / 2));
    check("wrapped tail discarded", n_tail_drop == 5 * MI);
    check("bank swaps", n_swap == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
