// cp_remover: cyclic-prefix removal for a stream of OFDM symbols.
//
// Every symbol is SYM_LEN samples long and starts with CP_LEN prefix samples.
// A counter, restarted by in_first (first sample of a symbol) and otherwise
// wrapping after SYM_LEN samples, drops the prefix samples and passes the
// remaining SYM_LEN - CP_LEN samples. out_first marks the first kept sample.
// The channelizer uses it twice: on the 80 MHz input before cyclic filtering
// (320/64 samples) and on the two 40 MHz branches after linear filtering
// (160/32 samples).
//
// Interface: at most one word per clock; W-bit opaque data. Output is
// registered, one clock after the input. clear restarts the counter.
// Only the removal itself is given for this block; the counter realisation
// and the symbol-start tag are this design's own.
module cp_remover #(
  parameter int unsigned SYM_LEN = 320,
  parameter int unsigned CP_LEN  = 64,
  parameter int unsigned W       = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic         out_first,
  output logic [W-1:0] out_data
);

  localparam int unsigned CW = $clog2(SYM_LEN);

  if (CP_LEN >= SYM_LEN) begin : g_bad_len
    $error("cp_remover: CP_LEN must be below SYM_LEN");
  end

  logic [CW-1:0] cnt;
  logic [CW-1:0] idx;

  assign idx = in_first ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (in_valid) begin
        cnt <= (idx == CW'(SYM_LEN - 1)) ? '0 : idx + 1'b1;
        if (idx >= CW'(CP_LEN)) begin
          out_valid <= 1'b1;
          out_first <= (idx == CW'(CP_LEN));
          out_data  <= in_data;
        end
      end
    end
  end

endmodule
