// sonic_pkg: types and helper functions shared by the PIPE Engine blocks.
//
// A PIPE Engine (PE) on the SONIC board talks to three neighbours: the PIPE
// Memory (a 32 x 1M asynchronous SRAM), the host over the PIPE bus, and the
// PIPE Router over the 16-bit PIPEFlow bus. This package holds the PIPEFlow
// word type, the 32-bit pixel layout (R,G,B,alpha from the most significant
// byte down) and the small pixel operations the image programs share.
//
// PIPEFlow word: 16 data bits plus three control bits. INST is high while
// the image header (format, width, height) is sent, ENDS marks the end of a
// strip and ENDL the end of a line. A pixel takes two words: first R,G
// (R in bits 15:8) then B,alpha (B in bits 15:8). The byte placement inside
// a word is this design's choice; the document gives only the word order.
package sonic_pkg;

  // One PIPEFlow bus word as it appears on PFIN/PFOUT.
  typedef struct packed {
    logic        inst;   // header phase
    logic        ends;   // end of strip
    logic        endl;   // end of line
    logic [15:0] data;   // two bytes of a pixel, or a header field
  } pf_word_t;


  // Programs of the direct-access PIPE Engine, selected through the PIPE bus.
  typedef enum logic [1:0] {
    PROG_INVERT = 2'd0,   // colour inversion in place
    PROG_MERGE  = 2'd1,   // merge image A with image B
    PROG_IPROD  = 2'd2    // inner product of two vectors
  } prog_e;

  // How products are assigned to the shared multipliers.
  typedef enum logic {
    SHARE_ADHOC   = 1'b0, // products go to the multipliers in turn
    SHARE_NONEVEN = 1'b1  // first multiplier does all but the last few
  } share_e;

  // Invert R, G and B of a 32-bit R,G,B,alpha pixel; alpha is kept.
  function automatic logic [31:0] invert_rgb(input logic [31:0] p);
    return {8'd255 - p[31:24], 8'd255 - p[23:16], 8'd255 - p[15:8], p[7:0]};
  endfunction

  // Per-byte average of two pixels, each byte halved before the sum.
  function automatic logic [31:0] merge_half(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] c;
    for (int k = 0; k < 4; k++)
      c[8*k +: 8] = {1'b0, a[8*k+1 +: 7]} + {1'b0, b[8*k+1 +: 7]};
    return c;
  endfunction

  // Byte order on the SRAM data pins: the memory sees G,R,alpha,B where the
  // engine sees R,G,B,alpha. The mapping swaps the bytes of each half-word,
  // so it is its own inverse.
  function automatic logic [31:0] pm_swizzle(input logic [31:0] w);
    return {w[23:16], w[31:24], w[7:0], w[15:8]};
  endfunction

endpackage
