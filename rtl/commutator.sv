// commutator: input switch of the polyphase filter.
//
// Splits the full-rate complex sample stream into its even- and odd-indexed
// samples, presenting them together as one pair (x(2m), x(2m+1)) per
// polyphase step, so that the filter branches can run at half the input rate.
// The sample tagged in_first (the first sample of an OFDM symbol, CP
// included) always starts a new pair; a half-finished pair is then dropped,
// which realigns the phase to the symbol boundary.
//
// Interface: at most one sample per clock (in_valid). out_valid is a
// registered one-cycle strobe raised the clock after the second sample of a
// pair arrived; out_first marks the pair that began with a tagged sample.
// clear drops a half-finished pair. The even/odd split is the published one;
// realignment on in_first is this design's own choice.
module commutator
  import dfe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  logic  in_first,
  input  iq_t   in_iq,
  output logic  out_valid,
  output logic  out_first,
  output pair_t out_pair
);

  logic phase;      // 1: holding x(2m), waiting for x(2m+1)
  iq_t  held;
  logic held_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 1'b0;
      held       <= '0;
      held_first <= 1'b0;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_pair   <= '0;
    end else if (clear) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!phase || in_first) begin
          held       <= in_iq;
          held_first <= in_first;
          phase      <= 1'b1;
        end else begin
          out_pair.x0 <= held;
          out_pair.x1 <= in_iq;
          out_first   <= held_first;
          out_valid   <= 1'b1;
          phase       <= 1'b0;
        end
      end
    end
  end

endmodule
