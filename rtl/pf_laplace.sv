// pf_laplace: 1-D Laplacian edge stage on the PIPEFlow stream.
//
// Applies the mask [-1 2 -1] to the green component along the scan
// direction: e(n) = 2 g(n) - g(n-1) - g(n+1). Negative responses become 0;
// positive ones are amplified by 2^GAIN_SHIFT and saturated at 255. The
// result v replaces the whole pixel: both the R,G word and the B,alpha word
// become {v, v}. Header words pass unchanged. Two passes (row scan and
// column scan) give the 2-D mask [0 -1 0; -1 4 -1; 0 -1 0].
//
// Stream: one word per clock, no gaps (see pf_window). Latency 4 clocks,
// control bits carried with their word. Frame ends use zero neighbours.
//
// The mask, clipping at zero, the gain shift of 4 and the output byte
// placement follow the document; saturating instead of wrapping after the
// gain is this design's choice.
module pf_laplace
  import sonic_pkg::*;
#(
  parameter int unsigned GAIN_SHIFT = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pf_word_t pf_in,
  output pf_word_t pf_out
);

  pf_word_t          mid;
  logic              mid_px, mid_rg;
  logic [7:0]        g_prev, g_mid, g_next, v_q, v;
  logic signed [10:0] e;
  logic [18:0]       amp;

  pf_window u_win (.clk, .rst_n, .pf_in, .mid, .mid_px, .mid_rg, .g_prev, .g_mid, .g_next);

  assign e   = $signed({2'b00, g_mid, 1'b0}) - $signed({3'b000, g_prev}) - $signed({3'b000, g_next});
  assign amp = 19'(e[9:0]) << GAIN_SHIFT;
  assign v   = e[10] ? 8'd0 : (amp > 19'd255 ? 8'd255 : amp[7:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_out <= '0;
      v_q    <= '0;
    end else begin
      pf_out <= mid;
      if (mid_px) begin
        if (mid_rg) begin
          pf_out.data <= {v, v};
          v_q         <= v;
        end else begin
          pf_out.data <= {v_q, v_q};
        end
      end
    end
  end

endmodule
