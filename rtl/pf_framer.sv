// pf_framer: registers a PIPEFlow word and classifies it.
//
// The PIPEFlow bus has no valid bit: the router sends one word per clock
// during a frame. This helper decides, word by word, what the stream is
// carrying. A word with INST high is header and starts a frame. After the
// header, frame words alternate R,G and B,alpha; the frame ends with the
// B,alpha word of the pixel marked ENDS. Words outside a frame (bus idle
// between frames) are neither header nor pixel data.
//
// Timing: word and flags are registered, one clock after pf_in.
// px is high for a pixel word of a frame, rg for the R,G word of a pixel.
// Reading ENDS as the end of the frame assumes one strip per frame; the
// document says only that ENDS is high at the end of each strip.
module pf_framer
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pf_word_t pf_in,
  output pf_word_t word,
  output logic     px,
  output logic     rg
);

  logic in_frame_q, ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0; px <= 1'b0; rg <= 1'b0;
      in_frame_q <= 1'b0; ph_q <= 1'b0;
    end else begin
      word <= pf_in;
      px   <= 1'b0;
      rg   <= 1'b0;
      if (pf_in.inst) begin
        in_frame_q <= 1'b1;
        ph_q       <= 1'b0;
      end else if (in_frame_q) begin
        px   <= 1'b1;
        rg   <= !ph_q;
        ph_q <= !ph_q;
        if (ph_q && pf_in.ends) in_frame_q <= 1'b0;
      end
    end
  end

endmodule
