// coef_regs: coefficient register file of the channelization filter.
//
// Holds the (N/2+1)/2 distinct Hilbert-branch coefficients c(k) in Q1.15, as
// used by analytic_hb_decim (c(k) = (-1)^k * g(2k) of a halfband prototype
// g(n) whose centre tap g(N/2) is 1/2). Making them writable lets the same
// hardware run any halfband design of order up to N: a shorter one of order
// 2 + 4k' is loaded with its coefficients in c(0.. ) shifted so that both
// filters have the same centre, and zeros elsewhere.
//
// Interface: one word written per clock (we, addr, wdata); all words are read
// in parallel on coef. Reset clears every word. Writes to an address at or
// beyond the number of words are ignored. Writable registers are this
// design's own choice: the coefficient values themselves are a filter design
// result and not part of the hardware.
module coef_regs
  import dfe_pkg::*;
#(
  parameter int unsigned N = 70
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            we,
  input  logic [$clog2((N/2+1)/2)-1:0]    addr,
  input  coef_t                           wdata,
  output coef_t                           coef [(N/2+1)/2]
);

  localparam int unsigned NC = (N / 2 + 1) / 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NC); i++) coef[i] <= '0;
    end else if (we && 32'(addr) < NC) begin
      coef[addr] <= wdata;
    end
  end

endmodule
