// pf_gauss: 1-D Gaussian filter stage on the PIPEFlow stream.
//
// Smooths the green component along the scan direction with the mask
// [1 2 1] / 4: f(n) = (g(n-1) + 2 g(n) + g(n+1)) >> 2. The result replaces
// the pixel: the R,G word becomes {f, f} and the B,alpha word {f, alpha},
// giving a grey image. Header words pass unchanged. Because the PIPE
// Router can scan the memory image by rows or by columns, running the
// stage twice (row scan, then column scan) gives the separable 2-D mask
// [1 2 1; 2 4 2; 1 2 1] / 16.
//
// Stream: one word per clock, no gaps (see pf_window). Latency 4 clocks:
// an input word appears, processed, at pf_out four clocks later with its
// INST/ENDS/ENDL bits unchanged. Words outside a frame pass unchanged. Pixels at the ends of a frame use zero
// for the missing neighbour; line ends are not treated specially (as in
// the document, which filters the stream without regard to lines).
//
// The mask, the filtering of green only and the output byte placement
// follow the document. The zero padding at frame ends is this design's.
module pf_gauss
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pf_word_t pf_in,
  output pf_word_t pf_out
);

  pf_word_t   mid;
  logic       mid_px, mid_rg;
  logic [7:0] g_prev, g_mid, g_next, f_q;
  logic [9:0] sum;

  pf_window u_win (.clk, .rst_n, .pf_in, .mid, .mid_px, .mid_rg, .g_prev, .g_mid, .g_next);

  assign sum = 10'(g_prev) + {1'b0, g_mid, 1'b0} + 10'(g_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_out <= '0;
      f_q    <= '0;
    end else begin
      pf_out <= mid;
      if (mid_px) begin
        if (mid_rg) begin
          pf_out.data <= {sum[9:2], sum[9:2]};
          f_q         <= sum[9:2];
        end else begin
          pf_out.data <= {f_q, mid.data[7:0]};
        end
      end
    end
  end

endmodule
