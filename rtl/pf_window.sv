// pf_window: three-pixel green window over a PIPEFlow stream.
//
// Helper of the 1-D filters. The stream carries one word per clock with no
// gaps: header words (INST high), then each pixel as an R,G word followed
// by a B,alpha word. The window registers the input word and delays it by
// two more words, so that when the R,G word of pixel n-1 reaches the
// middle tap (mid), the input register holds the R,G word of pixel n. It
// presents the greens of pixels n-2, n-1 and n (g_prev, g_mid, g_next).
// Any word in the input register that is not pixel data (header, or idle
// bus after the frame, see pf_framer) reads as green 0, and a header word
// at the middle tap clears the stored left neighbour, so both ends of a
// frame see zero neighbours; line ends are not treated specially.
//
// Timing: mid is the input word delayed by 3 clocks; mid_px marks it as a
// pixel word and mid_rg as the R,G word of a pixel. The green byte is bits
// 7:0 of the R,G word.
module pf_window
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pf_word_t pf_in,
  output pf_word_t mid,
  output logic     mid_px,
  output logic     mid_rg,
  output logic [7:0] g_prev,
  output logic [7:0] g_mid,
  output logic [7:0] g_next
);

  pf_word_t   h_q, d1_q, d2_q;
  logic       h_px, d1_px, d2_px;
  logic       h_rg, d1_rg, d2_rg;
  logic [7:0] gprev_q;

  pf_framer u_framer (.clk, .rst_n, .pf_in, .word(h_q), .px(h_px), .rg(h_rg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q <= '0; d2_q <= '0;
      d1_px <= 1'b0; d2_px <= 1'b0;
      d1_rg <= 1'b0; d2_rg <= 1'b0;
      gprev_q <= '0;
    end else begin
      d1_q <= h_q;  d1_px <= h_px;  d1_rg <= h_rg;
      d2_q <= d1_q; d2_px <= d1_px; d2_rg <= d1_rg;
      if (d2_q.inst)  gprev_q <= '0;
      else if (d2_rg) gprev_q <= d2_q.data[7:0];
    end
  end

  assign mid    = d2_q;
  assign mid_px = d2_px;
  assign mid_rg = d2_rg;
  assign g_prev = gprev_q;
  assign g_mid  = d2_q.data[7:0];
  assign g_next = h_px ? h_q.data[7:0] : 8'd0;

endmodule
