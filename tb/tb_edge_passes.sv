// tb_edge_passes: 2-D edge detection of a 640x480 image in four streaming
// passes, as one PIPE does it when its engine is reloaded between filters.
//
// The router of a PIPE can scan its memory row by row or column by column.
// The separable 3x3 Gaussian and Laplacian masks are applied as four 1-D
// passes over the PIPEFlow stream: Gaussian along rows, Gaussian along
// columns, then (with the engine reloaded for the Laplacian) Laplacian
// along columns and Laplacian along rows. This bench plays the router and
// the memory: it streams each pass into the stage, one word per clock,
// collects the result, and rescans it in the order the next pass needs. A
// column scan is sent as a frame whose lines are the image columns (width
// and height swapped in the header). The reload is modelled by feeding the
// pf_laplace instance instead of the pf_gauss one.
//
// Checked: every output word of every pass (header and flags unchanged,
// pixel data against the reference filters run on the same scan order);
// each pass ends 2*W*H + 3 + 4 clocks after its first word; and the final
// image against an independent 2-D evaluation of the four passes at every
// pixel. Counted mechanisms: row passes, column passes and engine reloads.
module tb_edge_passes;
  import sonic_pkg::*;
  import pf_tb_pkg::*;
  localparam int W = 640, H = 480, LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pf_word_t g_in, g_out, l_in, l_out;
  int checks = 0, failures = 0;
  int n_row = 0, n_col = 0, n_reload = 0, last_stage = -1;
  longint now = 0;
  always @(posedge clk) now <= now + 1;

  pf_gauss   u_g (.clk, .rst_n, .pf_in(g_in), .pf_out(g_out));
  pf_laplace u_l (.clk, .rst_n, .pf_in(l_in), .pf_out(l_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Row-order image <-> column-order scan (lines are the columns).
  function automatic pix_a_t to_cols(input pix_a_t px, input int w, input int h);
    pix_a_t o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) o[c * h + r] = px[r * w + c];
    return o;
  endfunction

  function automatic pix_a_t from_cols(input pix_a_t px, input int w, input int h);
    pix_a_t o = new[w * h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) o[r * w + c] = px[c * h + r];
    return o;
  endfunction

  // Stream one frame (lw pixels per line, nl lines) through stage s
  // (0 Gaussian, 1 Laplacian) and return its output pixels.
  task automatic run_pass(input int s, input pix_a_t px, input int lw, input int nl,
                          output pix_a_t res);
    word_q_t in_q, exp_q;
    longint t0;
    int n;
    pf_word_t o;
    in_q  = frame_words(lw, nl, px);
    exp_q = with_pixels(in_q, s == 0 ? ref_gauss(px) : ref_laplace(px, 4));
    n = in_q.size();
    res = new[lw * nl];
    if (last_stage >= 0 && s != last_stage) n_reload++;
    last_stage = s;
    if (lw == W) n_row++; else n_col++;
    t0 = now;
    for (int t = 0; t < n + LAT; t++) begin
      if (s == 0) g_in <= (t < n) ? in_q[t] : '0;
      else        l_in <= (t < n) ? in_q[t] : '0;
      @(negedge clk);
      o = (s == 0) ? g_out : l_out;
      if (t >= LAT) begin
        int k = t - LAT;
        if (o === exp_q[k]) checks++;
        else check(1'b0, $sformatf("pass %0d word %0d got %p exp %p", n_row + n_col, k, o, exp_q[k]));
        if (k >= 3) begin
          if ((k - 3) % 2 == 0) res[(k - 3) / 2][31:16] = o.data;
          else                  res[(k - 3) / 2][15:0]  = o.data;
        end
      end
      @(posedge clk);
    end
    check(now - t0 == longint'(2 * lw * nl + 3) + longint'(LAT),
          $sformatf("pass took %0d clocks exp %0d", now - t0, 2 * lw * nl + 3 + LAT));
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic pix_a_t img = new[W * H];
    pix_a_t p1, p2, p3, p4;
    g_in = '0; l_in = '0;
    for (int i = 0; i < W * H; i++) img[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    run_pass(0, img, W, H, p1);                        // Gaussian along rows
    run_pass(0, to_cols(p1, W, H), H, W, p2);          // Gaussian along columns
    run_pass(1, p2, H, W, p3);                         // reload: Laplacian along columns
    run_pass(1, from_cols(p3, W, H), W, H, p4);        // Laplacian along rows

    // Independent 2-D evaluation of the same four passes at every pixel.
    // Rows are filtered with line wrap (the stream runs straight across
    // line ends), so a pixel's row neighbours are its raster neighbours.
    begin
      automatic int a[] = new[W * H];
      automatic int b[] = new[W * H];
      automatic int e, v, bad = 0;
      for (int i = 0; i < W * H; i++)
        a[i] = ((i > 0 ? int'(img[i - 1][23:16]) : 0) + 2 * int'(img[i][23:16])
                + (i < W * H - 1 ? int'(img[i + 1][23:16]) : 0)) / 4;
      // column pass: column-order raster neighbours
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          automatic int j = c * H + r;
          automatic int up = (j > 0) ? a[((j - 1) % H) * W + (j - 1) / H] : 0;
          automatic int dn = (j < W * H - 1) ? a[((j + 1) % H) * W + (j + 1) / H] : 0;
          b[r * W + c] = (up + 2 * a[r * W + c] + dn) / 4;
        end
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          automatic int j = c * H + r;
          automatic int up = (j > 0) ? b[((j - 1) % H) * W + (j - 1) / H] : 0;
          automatic int dn = (j < W * H - 1) ? b[((j + 1) % H) * W + (j + 1) / H] : 0;
          e = 2 * b[r * W + c] - up - dn;
          a[r * W + c] = (e < 0) ? 0 : ((e << 4) > 255 ? 255 : (e << 4));
        end
      for (int i = 0; i < W * H; i++) begin
        e = 2 * a[i] - (i > 0 ? a[i - 1] : 0) - (i < W * H - 1 ? a[i + 1] : 0);
        v = (e < 0) ? 0 : ((e << 4) > 255 ? 255 : (e << 4));
        if (p4[i] != {8'(v), 8'(v), 8'(v), 8'(v)}) bad++;
      end
      check(bad == 0, $sformatf("%0d pixels of the final edge image differ", bad));
    end

    check(n_row == 2, $sformatf("row passes %0d", n_row));
    check(n_col == 2, $sformatf("column passes %0d", n_col));
    check(n_reload == 1, $sformatf("engine reloads %0d", n_reload));
    $display("mechanisms: row passes %0d, column passes %0d, engine reloads %0d", n_row, n_col, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
