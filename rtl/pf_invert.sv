// pf_invert: colour inverter stage on the PIPEFlow stream.
//
// Inverts R, G and B of every pixel and keeps alpha: in the R,G word both
// bytes become 255 - value, in the B,alpha word only the high byte (B).
// Header words (INST high) and idle words between frames pass unchanged. Fully pipelined: one word per
// clock in and out, latency 3 clocks (input register, inversion register,
// output register), control bits carried with their word.
//
// Stream format as in pf_window: words arrive every clock; after the
// header, pixels alternate R,G then B,alpha words. The operation, the
// pass-through of the header and the 3-clock latency follow the document.
module pf_invert
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pf_word_t pf_in,
  output pf_word_t pf_out
);

  pf_word_t h_q, p_q;
  logic     h_px, h_rg;

  pf_framer u_framer (.clk, .rst_n, .pf_in, .word(h_q), .px(h_px), .rg(h_rg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0; pf_out <= '0;
    end else begin
      p_q <= h_q;
      if (h_px) begin
        p_q.data[15:8] <= 8'd255 - h_q.data[15:8];
        if (h_rg) p_q.data[7:0] <= 8'd255 - h_q.data[7:0];
      end
      pf_out <= p_q;
    end
  end

endmodule
