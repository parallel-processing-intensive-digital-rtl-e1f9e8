// cyclic_sym_buffer: symbol store that turns the linear polyphase filter into
// a cyclic one.
//
// Cyclic convolution of an L-sample block with an order-N filter equals the
// linear convolution with the last N output samples added back onto the
// first N. The same result comes from running the ordinary filter over the
// block preceded by its own last N samples and discarding the outputs of that
// prefix: the filter state at the start of the block is then exactly the
// wrapped tail. This block stores one CP-free symbol and replays it that way.
//
// Storage is two banks (ping-pong), each split into an even-sample and an
// odd-sample memory of L/2 words, so a whole pair (x(2p), x(2p+1)) is read
// in one clock. While one bank is written with the next symbol, the other is
// read: first pairs L/2-N/2 .. L/2-1 (out_keep low, outputs to discard), then
// pairs 0 .. L/2-1 (out_keep high, out_first on pair 0). A read takes
// (L+N)/2 clocks, 163 at the default sizes, well under the >= L clocks it
// takes to write the next symbol, so the buffer never overflows at one input
// sample per clock. Latency from the last written sample to the first
// replayed pair is two clocks (bank-full flag, synchronous memory read).
//
// Interface: in_valid/in_first/in_iq is the CP-free stream (in_first on
// sample 0 of a symbol, which restarts the write address). out_* is a stream
// of pairs for analytic_filter_iq. bank_swaps pulses once per completed
// symbol write. clear empties both banks.
// The prefix (tail wrapping) technique follows the published cyclic
// convolution principle; the ping-pong banks and the even/odd memory split
// are this design's own realisation.
module cyclic_sym_buffer
  import dfe_pkg::*;
#(
  parameter int unsigned L = 256,  // FFT size: samples per CP-free symbol
  parameter int unsigned N = 70    // filter order: samples replayed first
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  logic  in_first,
  input  iq_t   in_iq,
  output logic  out_valid,
  output logic  out_first,
  output logic  out_keep,
  output pair_t out_pair,
  output logic  bank_swap
);

  localparam int unsigned HP  = L / 2;         // pairs per symbol
  localparam int unsigned PRE = N / 2;         // prefix pairs
  localparam int unsigned RL  = HP + PRE;      // pairs read per symbol
  localparam int unsigned AW  = $clog2(HP);
  localparam int unsigned WW  = $clog2(L);
  localparam int unsigned RW  = $clog2(RL);

  if (L % 2 != 0 || N % 2 != 0 || PRE > HP) begin : g_bad_size
    $error("cyclic_sym_buffer: L and N must be even and N <= L");
  end

  iq_t mem_even [2][HP];
  iq_t mem_odd  [2][HP];

  // ---------------- write side ----------------
  logic [WW-1:0] widx, wnext;
  logic          wbank;
  logic [1:0]    full;
  logic          rd_done;

  assign wnext = in_first ? '0 : widx;

  always_ff @(posedge clk) begin
    if (in_valid && !clear) begin
      if (wnext[0]) mem_odd [wbank][wnext[WW-1:1]] <= in_iq;
      else          mem_even[wbank][wnext[WW-1:1]] <= in_iq;
    end
  end

  // ---------------- read side ----------------
  logic          rbusy;
  logic          rbank;
  logic [RW-1:0] rcnt;
  logic [AW-1:0] raddr;

  logic [1:0]    full_n;

  assign raddr   = (rcnt < RW'(PRE)) ? AW'(HP - PRE + rcnt) : AW'(rcnt - PRE);
  assign rd_done = rbusy && (rcnt == RW'(RL - 1));

  // bank-full flags: set when the last sample of a symbol is written,
  // cleared when the last pair of that bank has been read
  always_comb begin
    full_n = full;
    if (rd_done) full_n[rbank] = 1'b0;
    if (in_valid && wnext == WW'(L - 1)) full_n[wbank] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx      <= '0;
      wbank     <= 1'b0;
      full      <= '0;
      bank_swap <= 1'b0;
      rbusy     <= 1'b0;
      rbank     <= 1'b0;
      rcnt      <= '0;
    end else if (clear) begin
      widx      <= '0;
      wbank     <= 1'b0;
      full      <= '0;
      bank_swap <= 1'b0;
      rbusy     <= 1'b0;
      rbank     <= 1'b0;
      rcnt      <= '0;
    end else begin
      bank_swap <= 1'b0;
      if (in_valid) begin
        if (wnext == WW'(L - 1)) begin
          widx          <= '0;
          wbank         <= ~wbank;
          bank_swap     <= 1'b1;
        end else begin
          widx <= wnext + 1'b1;
        end
      end
      full <= full_n;

      if (rbusy) begin
        if (rd_done) begin
          rbusy <= 1'b0;
          rbank <= ~rbank;
          rcnt  <= '0;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end else if (full[rbank]) begin
        rbusy <= 1'b1;
        rcnt  <= '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_keep  <= 1'b0;
    end else if (clear) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_keep  <= 1'b0;
    end else begin
      out_valid <= rbusy;
      out_keep  <= rbusy && (rcnt >= RW'(PRE));
      out_first <= rbusy && (rcnt == RW'(PRE));
    end
  end

  always_ff @(posedge clk) begin
    out_pair.x0 <= mem_even[rbank][raddr];
    out_pair.x1 <= mem_odd [rbank][raddr];
  end

  // A bank may only be rewritten after it has been read out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (in_valid && wnext == '0) |-> !full[wbank]);

endmodule
