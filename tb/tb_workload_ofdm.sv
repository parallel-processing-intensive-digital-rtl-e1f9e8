// tb_workload_ofdm: 16-QAM 802.11ac OFDM symbols through the channelizer,
// measuring the error vector magnitude on both 40 MHz branches.
//
// Each run sends, back to back at one sample per clock, one training symbol
// and DATA_SYM data symbols. A symbol is 242 active 16-QAM subcarriers
// (+/-2 .. +/-122 of 256, three nulls around DC and the band edges empty)
// turned into 256 time samples by an inverse DFT, given its 64-sample cyclic
// prefix, scaled to about 300 LSB rms and quantised to 12 bits.
// On the outputs each 128-sample window of out_lp and out_hp goes through a
// 128-point DFT. Positive subcarrier k appears in bin k of out_lp and
// negative subcarrier -k in bin 128-k of out_hp. The per-bin response
// (filter, delay, decimation phase) is estimated from the training symbol
// and divided out, as a receiver's channel estimate would; the EVM is then
// taken over all data subcarriers.
//
// Runs: prototype orders 42, 58 and 70 with 40, 50 and 60 dB stopband
// (Kaiser designs, the shorter ones centred in the 70th-order hardware),
// each in linear and in cyclic mode; exponential multipath of 50 and 150 ns
// rms; a single interfering tone in the negative half at 6 and 30 dB SIR;
// a timing error of 8 samples; and white Gaussian noise at 25 dB SNR, where
// the result is compared with the same receiver fed by a 256-point DFT of
// the unfiltered input. Checks: the expected number of windows arrives, the
// EVMs stay below their limits, the 70th-order design beats the 42nd-order
// one, cyclic mode survives the long channel, linear mode rejects the tone,
// and under noise neither mode is more than 1 dB worse than no
// channelization.
module tb_workload_ofdm;
  import dfe_pkg::*;
  import dfe_tb_pkg::*;

  localparam int N = 70, L = 256, CP = 64, SYM = L + CP;
  localparam int M = N / 2, NC = (M + 1) / 2;
  localparam int DATA_SYM = 3;
  localparam int NSYM = DATA_SYM + 1;
  localparam int TAIL = 40;              // trailing samples completing the last window
  localparam int TOT = NSYM * SYM + TAIL;

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
  real pi = 3.14159265358979323846;

  // transmitted subcarrier values per symbol, index k + 128 for k = -128..127
  real tx_re [NSYM][256], tx_im [NSYM][256];
  // received windows
  real rx_lp_re [NSYM][128], rx_lp_im [NSYM][128];
  real rx_hp_re [NSYM][128], rx_hp_im [NSYM][128];
  int  win = -1, pos = 0;
  bit  collecting = 0;

  always @(posedge clk) begin
    if (collecting && out_valid) begin
      if (out_first) begin win++; pos = 0; end
      if (win >= 0 && win < NSYM && pos < 128) begin
        rx_lp_re[win][pos] = real'(out_lp.re); rx_lp_im[win][pos] = real'(out_lp.im);
        rx_hp_re[win][pos] = real'(out_hp.re); rx_hp_im[win][pos] = real'(out_hp.im);
      end
      pos++;
    end
  end

  function automatic real qam(input int v);
    return real'(2 * (v % 4) - 3);
  endfunction

  // Stream of NSYM symbols plus TAIL trailing samples, after an optional
  // multipath channel (exponential power-delay profile of rms spread tau_rms
  // samples, taps up to ch_len), an optional complex-exponential interferer
  // at sir_db relative to the signal, and an optional early timing of t_err
  // samples (the stream is delayed so that the symbol tags come t_err
  // samples before the true symbol starts).
  task automatic make_symbols(input real tau_rms, input int ch_len, input real sir_db,
                              input real f_int, input int t_err, input real snr_db,
                              output longint xr [TOT], output longint xi [TOT]);
    real tr [256], ti [256];
    real sr [TOT], si [TOT], cr [TOT], ci [TOT];
    real hr [80], hi [80];
    real p_sig = 0.0, a_int, sig_n;
    for (int i = 0; i < TOT; i++) begin sr[i] = 0.0; si[i] = 0.0; end
    for (int s = 0; s < NSYM; s++) begin
      for (int k = -128; k < 128; k++) begin
        int a;
        a = (k < 0) ? -k : k;
        if (a >= 2 && a <= 122) begin
          tx_re[s][k+128] = qam($urandom_range(0, 3));
          tx_im[s][k+128] = qam($urandom_range(0, 3));
        end else begin
          tx_re[s][k+128] = 0.0; tx_im[s][k+128] = 0.0;
        end
      end
      for (int n = 0; n < L; n++) begin
        tr[n] = 0.0; ti[n] = 0.0;
        for (int k = -122; k <= 122; k++) begin
          real ph, c, sn;
          ph = 2.0 * pi * real'(k * n) / real'(L);
          c = $cos(ph); sn = $sin(ph);
          tr[n] += tx_re[s][k+128] * c - tx_im[s][k+128] * sn;
          ti[n] += tx_re[s][k+128] * sn + tx_im[s][k+128] * c;
        end
      end
      for (int i = 0; i < SYM; i++) begin
        int n;
        n = (i < CP) ? i + L - CP : i - CP;
        if (s * SYM + i + t_err < TOT) begin
          sr[s * SYM + i + t_err] = tr[n] * 1560.0 / real'(L);
          si[s * SYM + i + t_err] = ti[n] * 1560.0 / real'(L);
        end
      end
    end
    // multipath channel, unit total power
    for (int d = 0; d < 80; d++) begin hr[d] = 0.0; hi[d] = 0.0; end
    if (ch_len == 0) hr[0] = 1.0;
    else begin
      real pw = 0.0;
      for (int d = 0; d <= ch_len; d++) begin
        real amp, ph;
        amp = $sqrt($exp(-real'(d) / tau_rms));
        ph = 2.0 * pi * real'($urandom_range(0, 9999)) / 10000.0;
        hr[d] = amp * $cos(ph); hi[d] = amp * $sin(ph);
        pw += amp * amp;
      end
      for (int d = 0; d <= ch_len; d++) begin hr[d] /= $sqrt(pw); hi[d] /= $sqrt(pw); end
    end
    for (int i = 0; i < TOT; i++) begin
      cr[i] = 0.0; ci[i] = 0.0;
      for (int d = 0; d <= ch_len && d <= i; d++) begin
        cr[i] += hr[d] * sr[i-d] - hi[d] * si[i-d];
        ci[i] += hr[d] * si[i-d] + hi[d] * sr[i-d];
      end
      p_sig += cr[i] * cr[i] + ci[i] * ci[i];
    end
    p_sig /= real'(TOT);
    a_int = (sir_db > 200.0) ? 0.0 : $sqrt(p_sig / $pow(10.0, sir_db / 10.0));
    // complex white Gaussian noise over the whole 80 MHz band; the per-
    // subcarrier SNR is that of the active band (242 of 256 bins)
    sig_n = (snr_db > 200.0) ? 0.0
          : $sqrt(p_sig * 256.0 / 242.0 / $pow(10.0, snr_db / 10.0) / 2.0);
    for (int i = 0; i < TOT; i++) begin
      real vr, vi;
      vr = cr[i] + a_int * $cos(f_int * real'(i)) + sig_n * gauss();
      vi = ci[i] + a_int * $sin(f_int * real'(i)) + sig_n * gauss();
      if (vr > 2047.0) vr = 2047.0;
      if (vr < -2048.0) vr = -2048.0;
      if (vi > 2047.0) vi = 2047.0;
      if (vi < -2048.0) vi = -2048.0;
      xr[i] = longint'($rtoi(vr + (vr >= 0 ? 0.5 : -0.5)));
      xi[i] = longint'($rtoi(vi + (vi >= 0 ? 0.5 : -0.5)));
    end
  endtask

  // Box-Muller normal variate
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * pi * u2);
  endfunction

  // EVM without channelization: 256-point DFT of the quantised input body,
  // same training-based equalisation, all active subcarriers
  function automatic real evm_unfiltered(input longint xr [TOT], input longint xi [TOT]);
    real h_re [256], h_im [256];
    real err = 0.0, ref_p = 0.0;
    for (int s = 0; s < NSYM; s++)
      for (int k = -122; k <= 122; k++) begin
        real yr, yi, er, ei, d, xr_, xi_;
        if (k > -2 && k < 2) continue;
        yr = 0.0; yi = 0.0;
        for (int n = 0; n < L; n++) begin
          real ph;
          ph = -2.0 * pi * real'(k * n) / real'(L);
          yr += real'(xr[s * SYM + CP + n]) * $cos(ph) - real'(xi[s * SYM + CP + n]) * $sin(ph);
          yi += real'(xr[s * SYM + CP + n]) * $sin(ph) + real'(xi[s * SYM + CP + n]) * $cos(ph);
        end
        xr_ = tx_re[s][k+128]; xi_ = tx_im[s][k+128];
        if (s == 0) begin
          d = xr_ * xr_ + xi_ * xi_;
          h_re[k+128] = (yr * xr_ + yi * xi_) / d;
          h_im[k+128] = (yi * xr_ - yr * xi_) / d;
        end else begin
          d = h_re[k+128] * h_re[k+128] + h_im[k+128] * h_im[k+128];
          er = (yr * h_re[k+128] + yi * h_im[k+128]) / d - xr_;
          ei = (yi * h_re[k+128] - yr * h_im[k+128]) / d - xi_;
          err += er * er + ei * ei;
          ref_p += xr_ * xr_ + xi_ * xi_;
        end
      end
    return 10.0 * $log10(err / ref_p);
  endfunction

  // 128-point DFT of one received window, bin q
  function automatic void dft_bin(input real wr [128], input real wi [128], input int q,
                                  output real yr, output real yi);
    yr = 0.0; yi = 0.0;
    for (int m = 0; m < 128; m++) begin
      real ph, c, sn;
      ph = -2.0 * pi * real'(q * m) / 128.0;
      c = $cos(ph); sn = $sin(ph);
      yr += wr[m] * c - wi[m] * sn;
      yi += wr[m] * sn + wi[m] * c;
    end
  endfunction

  task automatic run(input string what, input int n_design, input real as_db, input mode_e md,
                     input real tau_rms, input int ch_len, input real sir_db, input real f_int,
                     input int t_err, input bit pos_only, input real snr_db,
                     output real evm_db, output real evm_ref_db);
    longint c [64];
    longint xr [TOT], xi [TOT];
    real h_re [256], h_im [256];
    real err = 0.0, ref_p = 0.0;
    hb_kaiser(n_design, as_db, N, c);
    // switch to the other mode first so that the filter is cleared
    @(posedge clk) mode <= (md == MODE_LINEAR) ? MODE_CYCLIC : MODE_LINEAR;
    repeat (3) @(posedge clk);
    @(posedge clk) mode <= md;
    for (int k = 0; k < NC; k++) begin
      @(posedge clk) coef_we <= 1; coef_addr <= k[$clog2(NC)-1:0]; coef_wdata <= coef_t'(c[k]);
    end
    @(posedge clk) coef_we <= 0;
    make_symbols(tau_rms, ch_len, sir_db, f_int, t_err, snr_db, xr, xi);
    evm_ref_db = (snr_db < 200.0) ? evm_unfiltered(xr, xi) : 0.0;
    win = -1; collecting = 1;
    for (int i = 0; i < TOT; i++) begin
      @(posedge clk);
      in_valid <= 1; in_first <= (i % SYM == 0) && (i < NSYM * SYM);
      in_iq.re <= sample_t'(xr[i]); in_iq.im <= sample_t'(xi[i]);
    end
    @(posedge clk) in_valid <= 0; in_first <= 0;
    repeat (700) @(posedge clk);
    collecting = 0;
    checks++;
    if (win != NSYM - 1) begin
      failures++;
      $display("FAIL: %0d windows received, %0d expected", win + 1, NSYM);
    end
    // per-subcarrier response from the training symbol, then EVM
    for (int s = 0; s < NSYM; s++)
      for (int k = -122; k <= 122; k++) begin
        int a, q;
        real yr, yi, er, ei, xr_, xi_, d;
        a = (k < 0) ? -k : k;
        if (a < 2 || (pos_only && k < 0)) continue;
        if (k > 0) begin q = k; dft_bin(rx_lp_re[s], rx_lp_im[s], q, yr, yi); end
        else begin q = 128 + k; dft_bin(rx_hp_re[s], rx_hp_im[s], q, yr, yi); end
        xr_ = tx_re[s][k+128]; xi_ = tx_im[s][k+128];
        if (s == 0) begin
          d = xr_ * xr_ + xi_ * xi_;
          h_re[k+128] = (yr * xr_ + yi * xi_) / d;
          h_im[k+128] = (yi * xr_ - yr * xi_) / d;
        end else begin
          d = h_re[k+128] * h_re[k+128] + h_im[k+128] * h_im[k+128];
          er = (yr * h_re[k+128] + yi * h_im[k+128]) / d - xr_;
          ei = (yi * h_re[k+128] - yr * h_im[k+128]) / d - xi_;
          err += er * er + ei * ei;
          ref_p += xr_ * xr_ + xi_ * xi_;
        end
      end
    evm_db = 10.0 * $log10(err / ref_p);
    $display("%-34s order %0d (%0.0f dB), %s mode: EVM %0.1f dB",
             what, n_design, as_db, md == MODE_LINEAR ? "linear" : "cyclic", evm_db);
    if (snr_db < 200.0)
      $display("%-34s without channelization:          EVM %0.1f dB", what, evm_ref_db);
  endtask

  task automatic expect_below(input real evm_db, input real lim);
    checks++;
    if (!(evm_db < lim)) begin failures++; $display("FAIL: EVM %0.1f dB not below %0.1f dB", evm_db, lim); end
  endtask

  initial begin
    real e42l, e58l, e70l, e42c, e58c, e70c;
    real eDl, eDc, eFl, eFc, eSl, eSc, eS30, eTl, eTc;
    real NONE, r;
    real eNl, eNc, rNl, rNc;
    NONE = 1000.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // prototype orders of the RMS-error study, ideal channel
    run("ideal channel", 42, 40.0, MODE_LINEAR, 1.0, 0, NONE, 0.0, 0, 0, NONE, e42l, r);
    run("ideal channel", 58, 50.0, MODE_LINEAR, 1.0, 0, NONE, 0.0, 0, 0, NONE, e58l, r);
    run("ideal channel", 70, 60.0, MODE_LINEAR, 1.0, 0, NONE, 0.0, 0, 0, NONE, e70l, r);
    run("ideal channel", 42, 40.0, MODE_CYCLIC, 1.0, 0, NONE, 0.0, 0, 0, NONE, e42c, r);
    run("ideal channel", 58, 50.0, MODE_CYCLIC, 1.0, 0, NONE, 0.0, 0, 0, NONE, e58c, r);
    run("ideal channel", 70, 60.0, MODE_CYCLIC, 1.0, 0, NONE, 0.0, 0, 0, NONE, e70c, r);
    expect_below(e42l, -30.0); expect_below(e58l, -30.0); expect_below(e70l, -30.0);
    expect_below(e42c, -30.0); expect_below(e58c, -30.0); expect_below(e70c, -30.0);
    checks++;
    if (!(e70l < e42l)) begin failures++; $display("FAIL: linear, order 70 not better than 42"); end
    checks++;
    if (!(e70c < e42c)) begin failures++; $display("FAIL: cyclic, order 70 not better than 42"); end
    // multipath: short (office-like, 4 samples = 50 ns rms) and long
    // (large-hall-like, 12 samples = 150 ns rms, taps up to 60 samples)
    run("multipath 50 ns rms", 42, 40.0, MODE_LINEAR, 4.0, 24, NONE, 0.0, 0, 0, NONE, eDl, r);
    run("multipath 50 ns rms", 42, 40.0, MODE_CYCLIC, 4.0, 24, NONE, 0.0, 0, 0, NONE, eDc, r);
    run("multipath 150 ns rms", 42, 40.0, MODE_LINEAR, 12.0, 60, NONE, 0.0, 0, 0, NONE, eFl, r);
    run("multipath 150 ns rms", 42, 40.0, MODE_CYCLIC, 12.0, 60, NONE, 0.0, 0, 0, NONE, eFc, r);
    expect_below(eDl, -25.0); expect_below(eDc, -25.0); expect_below(eFc, -25.0);
    checks++;
    if (!(eFc < eFl)) begin failures++; $display("FAIL: long channel, cyclic not better than linear"); end
    // co-channel interferer in the negative half, errors on positive subcarriers
    run("interferer at SIR 6 dB", 70, 60.0, MODE_LINEAR, 1.0, 0, 6.0, -2.0 * pi * 61.3 / 256.0, 0, 1, NONE, eSl, r);
    run("interferer at SIR 6 dB", 42, 40.0, MODE_CYCLIC, 1.0, 0, 6.0, -2.0 * pi * 61.3 / 256.0, 0, 1, NONE, eSc, r);
    run("interferer at SIR 30 dB", 42, 40.0, MODE_CYCLIC, 1.0, 0, 30.0, -2.0 * pi * 61.3 / 256.0, 0, 1, NONE, eS30, r);
    expect_below(eSl, -25.0);
    // timing 8 samples early
    run("timing 8 samples early", 70, 60.0, MODE_LINEAR, 4.0, 24, NONE, 0.0, 8, 0, NONE, eTl, r);
    run("timing 8 samples early", 70, 60.0, MODE_CYCLIC, 4.0, 24, NONE, 0.0, 8, 0, NONE, eTc, r);
    expect_below(eTl, -25.0); expect_below(eTc, -25.0);
    // white noise at 25 dB SNR: channelization must not add to the error
    run("AWGN, SNR 25 dB", 70, 60.0, MODE_LINEAR, 1.0, 0, NONE, 0.0, 0, 0, 25.0, eNl, rNl);
    run("AWGN, SNR 25 dB", 42, 40.0, MODE_CYCLIC, 1.0, 0, NONE, 0.0, 0, 0, 25.0, eNc, rNc);
    checks++;
    if (!(eNl < rNl + 1.0)) begin failures++; $display("FAIL: linear mode degrades EVM under noise"); end
    checks++;
    if (!(eNc < rNc + 1.0)) begin failures++; $display("FAIL: cyclic mode degrades EVM under noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
