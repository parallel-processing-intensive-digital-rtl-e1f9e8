// tb_cp_remover: self-checking test of cyclic-prefix removal at the input
// rate sizes (320-sample symbols, 64-sample prefix).
//
// Numbered samples go in with in_first on every symbol start and random idle
// cycles; one symbol is cut short by an early in_first to check the restart,
// and several symbols run without any in_first to check the free-running
// wrap. The expected stream is derived from each sample's offset within its
// symbol: offsets 64..319 pass in order, out_first exactly on offset 64, one
// clock after the input.
module tb_cp_remover;
  localparam int unsigned SYM = 320, CPL = 64, W = 24;

  logic         clk = 0, rst_n = 0, clear = 0;
  logic         in_valid = 0, in_first = 0;
  logic [W-1:0] in_data = '0;
  logic         out_valid, out_first;
  logic [W-1:0] out_data;

  cp_remover #(.SYM_LEN(SYM), .CP_LEN(CPL), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         e_valid = 0, e_first = 0;
  logic [W-1:0] e_data;
  int kept = 0, dropped = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // the expectation is written with the input; the output follows a clock later
  logic         d_valid = 0, d_first = 0;
  logic [W-1:0] d_data;
  always @(posedge clk) begin
    d_valid <= e_valid; d_first <= e_first; d_data <= e_data;
    if (rst_n) begin
      check("valid", out_valid == d_valid);
      if (d_valid) begin
        check("data", out_data == d_data);
        check("first", out_first == d_first);
      end
    end
  end

  initial begin
    int off = 0;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 12; s++) begin
      int len = (s == 3) ? 200 : SYM;
      for (int i = 0; i < len; i++) begin
        @(posedge clk);
        in_valid <= 1;
        in_data  <= W'(n);
        in_first <= (i == 0) && (s < 6 || s == 9);
        e_valid  <= (i >= int'(CPL));
        e_first  <= (i == int'(CPL));
        e_data   <= W'(n);
        if (i >= int'(CPL)) kept++; else dropped++;
        n++;
        if ($urandom_range(0, 4) == 0) begin
          @(posedge clk);
          in_valid <= 0; in_first <= 0; e_valid <= 0; e_first <= 0;
        end
      end
    end
    @(posedge clk) in_valid <= 0; e_valid <= 0;
    repeat (2) @(posedge clk);
    $display("kept %0d dropped %0d", kept, dropped);
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
