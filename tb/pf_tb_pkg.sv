// pf_tb_pkg: PIPEFlow frame builder and reference models for testbenches.
//
// A frame is three header words with INST high (format, width, height),
// then each pixel as an R,G word and a B,alpha word. ENDL is high on both
// words of the last pixel of each line and ENDS on both words of the last
// pixel of the frame (one strip per frame). Pixels are 32-bit R,G,B,alpha.
// The reference models work on whole pixel arrays, independently of the
// pipelined RTL, with zero neighbours beyond the ends of the frame.
package pf_tb_pkg;
  import sonic_pkg::*;

  typedef pf_word_t word_q_t[$];
  typedef logic [31:0] pix_a_t[];

  localparam logic [15:0] FORMAT_RGBA = 16'h0020;

  function automatic word_q_t frame_words(input int w, input int h, input pix_a_t px);
    word_q_t q;
    pf_word_t t;
    t = '0; t.inst = 1'b1;
    t.data = FORMAT_RGBA; q.push_back(t);
    t.data = 16'(w);      q.push_back(t);
    t.data = 16'(h);      q.push_back(t);
    for (int i = 0; i < w * h; i++) begin
      t = '0;
      t.endl = ((i % w) == w - 1);
      t.ends = (i == w * h - 1);
      t.data = px[i][31:16]; q.push_back(t);
      t.data = px[i][15:0];  q.push_back(t);
    end
    return q;
  endfunction

  // Replace the pixel data of a frame (header kept) with new pixel words.
  function automatic word_q_t with_pixels(input word_q_t fr, input pix_a_t px);
    word_q_t q = fr;
    for (int i = 0; i < px.size(); i++) begin
      q[3 + 2 * i].data     = px[i][31:16];
      q[3 + 2 * i + 1].data = px[i][15:0];
    end
    return q;
  endfunction

  function automatic pix_a_t ref_invert(input pix_a_t px);
    pix_a_t o = new[px.size()];
    for (int i = 0; i < px.size(); i++)
      o[i] = {8'd255 - px[i][31:24], 8'd255 - px[i][23:16], 8'd255 - px[i][15:8], px[i][7:0]};
    return o;
  endfunction

  function automatic int green(const ref pix_a_t px, input int i);
    if (i < 0 || i >= px.size()) return 0;
    return int'(px[i][23:16]);
  endfunction

  function automatic pix_a_t ref_gauss(input pix_a_t px);
    pix_a_t o = new[px.size()];
    for (int i = 0; i < px.size(); i++) begin
      int f = (green(px, i - 1) + 2 * green(px, i) + green(px, i + 1)) / 4;
      o[i] = {8'(f), 8'(f), 8'(f), px[i][7:0]};
    end
    return o;
  endfunction

  function automatic pix_a_t ref_laplace(input pix_a_t px, input int gain_shift);
    pix_a_t o = new[px.size()];
    for (int i = 0; i < px.size(); i++) begin
      int e = 2 * green(px, i) - green(px, i - 1) - green(px, i + 1);
      int v = (e < 0) ? 0 : ((e << gain_shift) > 255 ? 255 : (e << gain_shift));
      o[i] = {8'(v), 8'(v), 8'(v), 8'(v)};
    end
    return o;
  endfunction

endpackage
