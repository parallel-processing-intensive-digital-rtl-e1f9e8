// tb_cyclic_sym_buffer: self-checking test of the cyclic-extension symbol
// store at L = 256, N = 70.
//
// Ten symbols of 256 uniquely numbered samples are written, some back to
// back at one sample per clock (so writing and reading overlap in the two
// banks), some with random idle cycles. For every symbol the expected output
// is 163 pairs: pairs 93..127 with out_keep low (the wrapped tail), then
// pairs 0..127 with out_keep high and out_first on pair 0, each pair being
// samples (2p, 2p+1). The test also checks that output pairs are back to
// back, that a symbol read starts within three clocks of its last sample
// when the reader is idle, and counts the bank swaps.
module tb_cyclic_sym_buffer;
  import dfe_pkg::*;

  localparam int unsigned L = 256, N = 70;
  localparam int unsigned HP = L / 2, PRE = N / 2;

  logic  clk = 0, rst_n = 0, clear = 0;
  logic  in_valid = 0, in_first = 0;
  iq_t   in_iq = '0;
  logic  out_valid, out_first, out_keep, bank_swap;
  pair_t out_pair;

  cyclic_sym_buffer #(.L(L), .N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pair_t exp_q [$];
  logic  expk_q [$];
  logic  expf_q [$];
  int swaps = 0, prefix_pairs = 0, kept_pairs = 0;
  int cyc = 0, last_write_cyc = -1, first_out_cyc = -1, start_gap_max = 0;
  logic prev_valid = 0;
  int run_len = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic iq_t smp(int sym, int i);
    iq_t v;
    v.re = sample_t'(sym * 256 + i);
    v.im = sample_t'(-(sym * 256 + i));
    return v;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (bank_swap) swaps++;
    if (out_valid) begin
      pair_t p; logic k, f;
      check("expected something", exp_q.size() > 0);
      if (exp_q.size() > 0) begin
        p = exp_q.pop_front(); k = expk_q.pop_front(); f = expf_q.pop_front();
        check("pair", out_pair == p);
        check("keep", out_keep == k);
        check("first", out_first == f);
        if (!k) prefix_pairs++; else kept_pairs++;
      end
      run_len = prev_valid ? run_len + 1 : 1;
    end else if (prev_valid) begin
      check("read burst length", run_len == int'(HP + PRE));
    end
    prev_valid <= out_valid;
  end

  task automatic send_symbol(int sym, bit gaps);
    for (int p = PRE; p > 0; p--) begin
      pair_t q; q.x0 = smp(sym, 2*(HP-p)); q.x1 = smp(sym, 2*(HP-p)+1);
      exp_q.push_back(q); expk_q.push_back(0); expf_q.push_back(0);
    end
    for (int p = 0; p < int'(HP); p++) begin
      pair_t q; q.x0 = smp(sym, 2*p); q.x1 = smp(sym, 2*p+1);
      exp_q.push_back(q); expk_q.push_back(1); expf_q.push_back(p == 0);
    end
    for (int i = 0; i < int'(L); i++) begin
      @(posedge clk);
      in_valid <= 1; in_first <= (i == 0); in_iq <= smp(sym, i);
      if (gaps && $urandom_range(0, 3) == 0) begin
        @(posedge clk) in_valid <= 0; in_first <= 0;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // one isolated symbol: measure start latency
    send_symbol(0, 0);
    @(posedge clk) in_valid <= 0;
    last_write_cyc = cyc;
    while (!out_valid) @(posedge clk);
    check("read start latency", cyc - last_write_cyc <= 3);
    repeat (200) @(posedge clk);
    for (int s = 1; s < 10; s++) send_symbol(s, s > 5);
    @(posedge clk) in_valid <= 0; in_first <= 0;
    repeat (400) @(posedge clk);
    check("all pairs read", exp_q.size() == 0);
    check("swaps", swaps == 10);
    check("prefix pairs", prefix_pairs == 10 * int'(PRE));
    check("kept pairs", kept_pairs == 10 * int'(HP));
    $display("swaps %0d prefix pairs %0d kept pairs %0d", swaps, prefix_pairs, kept_pairs);
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
