// tb_commutator: self-checking test of the even/odd input switch.
//
// A stream of numbered complex samples with random idle cycles goes in;
// every pair that comes out must hold two consecutive samples, the first of
// them with an even offset from the latest symbol start. Symbol starts are
// also injected at odd offsets to check that a half pair is dropped and the
// phase realigns. The pair must appear exactly one clock after its second
// sample, and clear must drop a held half pair.
module tb_commutator;
  import dfe_pkg::*;

  logic  clk = 0, rst_n = 0, clear = 0;
  logic  in_valid = 0, in_first = 0;
  iq_t   in_iq = '0;
  logic  out_valid, out_first;
  pair_t out_pair;

  commutator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // expected pairs in a queue, built by a behavioural model
  pair_t exp_q [$];
  logic  expf_q [$];
  logic  have_half = 0;
  iq_t   half;
  logic  half_f;
  logic  exp_now = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check("valid timing", out_valid == exp_now);
      if (out_valid && exp_q.size() > 0) begin
        pair_t p; logic f;
        p = exp_q.pop_front(); f = expf_q.pop_front();
        check("pair data", out_pair == p);
        check("first tag", out_first == f);
        check("consecutive", out_pair.x1.re == out_pair.x0.re + 1'b1);
      end
    end
    exp_now <= 0;
    if (clear) have_half <= 0;
    else if (in_valid && rst_n) begin
      if (!have_half || in_first) begin
        have_half <= 1; half <= in_iq; half_f <= in_first;
      end else begin
        pair_t p;
        p.x0 = half; p.x1 = in_iq;
        exp_q.push_back(p); expf_q.push_back(half_f);
        exp_now <= 1;
        have_half <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      in_valid <= 1;
      in_iq.re <= sample_t'(n); in_iq.im <= sample_t'(~n);
      in_first <= (n % 320 == 0) || (n == 1001);
      clear <= (n == 1500);
      if ($urandom_range(0, 2) == 0) begin
        @(posedge clk) in_valid <= 0; in_first <= 0; clear <= 0;
      end
    end
    @(posedge clk) in_valid <= 0; clear <= 0;
    repeat (3) @(posedge clk);
    check("all pairs seen", exp_q.size() == 0);
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
