// tb_sonic_top: end-to-end test of all engines at full size.
//
// The top runs with its default parameters (20-bit PIPE Memory address).
// The testbench plays the host on the PIPE bus, the SRAM on the memory
// pins and the PIPE Router on the PIPEFlow buses.
//   1. Direct access: inverts a whole 640x480 image in memory (the default
//      COUNT) and checks every pixel and the run time, 8 clocks per pixel.
//   2. Merges two 131072-pixel images (B from word 524288), 12 clocks per
//      pixel, and checks every result pixel.
//   3. Inner product of two 8-element vectors with 3 shared multipliers.
//   4. PIPEFlow mode: streams a 640x480 frame through the inverter engine,
//      one word per clock (2 clocks per pixel), and checks every word.
//   5. Time partitioning: streams two 320x240 frames back to back through
//      the Gaussian PIPE into the Laplacian PIPE and checks both the
//      intermediate and the final stream word by word.
// Each mechanism is counted and must have happened at least once: reads,
// writes, a read issued in the last clock of a write, a start ignored
// while busy, multipliers reused for several products, header words
// passed unchanged, and clocks in which the two PIPEs hold different
// frames.
module tb_sonic_top;
  import sonic_pkg::*;
  import pf_tb_pkg::*;
  localparam int AW = 20;
  localparam int W = 640, H = 480;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          pb_cs, pb_as, pb_write, pb_ad_oe;
  logic [31:0]   pb_ad_in, pb_ad_out;
  logic [AW-1:0] m_addr;
  logic          m_addr_oe, m_data_oe, m_ns, m_nw, m_ctl_oe;
  logic [31:0]   m_data_out, m_data_in;
  pf_word_t      pf_inv_in, pf_inv_out, pf_edge_in, pf_edge_mid, pf_edge_out;

  sonic_top dut (
    .clk, .rst_n, .pb_cs, .pb_as, .pb_write, .pb_ad_in, .pb_ad_out, .pb_ad_oe,
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe,
    .pf_inv_in, .pf_inv_out, .pf_edge_in, .pf_edge_mid, .pf_edge_out);

  pm_sram_model #(.AW(AW)) sram (.clk, .m_addr, .m_addr_oe, .m_data_from_pe(m_data_out),
    .m_data_oe, .m_data_to_pe(m_data_in), .m_ns, .m_nw, .m_ctl_oe);

  int checks = 0, failures = 0;
  longint now = 0;
  always @(posedge clk) now <= now + 1;

  // mechanism counters
  longint n_reads = 0, n_writes = 0, n_chained = 0, n_ignored = 0;
  longint n_shared = 0, n_headers = 0, n_overlap = 0;
  logic   prev_w3 = 1'b0, prev_rsel = 1'b0, ip_phase = 1'b0;
  longint last_read = 0, ip_gap = -1;
  always @(posedge clk) begin
    automatic logic rsel = m_ctl_oe && !m_ns && m_nw;
    if (rsel && !prev_rsel) begin n_reads++; last_read = now; end
    if (m_ctl_oe && !m_ns && !m_nw) begin
      n_writes++;
      if (ip_phase && ip_gap < 0) ip_gap = now - last_read;
    end
    if (rsel && !prev_rsel && prev_w3) n_chained++;
    prev_w3   <= m_ctl_oe && m_ns && m_nw && !m_addr_oe;
    prev_rsel <= rsel;
  end

  logic [31:0] image [];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    pb_cs <= 1; pb_as <= 1; pb_write <= 1; pb_ad_in <= a;
    @(posedge clk);
    pb_as <= 0; pb_ad_in <= d;
    @(posedge clk);
    pb_cs <= 0; pb_write <= 0;
    @(posedge clk);
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    pb_cs <= 1; pb_as <= 1; pb_write <= 0; pb_ad_in <= a;
    @(posedge clk);
    pb_as <= 0;
    @(negedge clk);
    d = pb_ad_oe ? pb_ad_out : 32'hBAD0_BAD0;
    @(posedge clk);
    pb_cs <= 0;
    @(posedge clk);
  endtask

  task automatic wait_done(input longint t0, output longint cycles);
    logic [31:0] st;
    do begin
      repeat (200) @(posedge clk);
      bus_read(1, st);
    end while (st != 2 && now - t0 < 3_000_000);
    check(st == 2, "STATUS reaches 2");
    cycles = now - t0;
  endtask

  task automatic fill(input int n);
    for (int i = 0; i < n; i++) begin
      image[i] = $urandom;
      sram.mem[i] = pm_swizzle(image[i]);
    end
  endtask

  // Drive a word stream into one PIPEFlow input and compare an output with
  // the expected stream lat clocks later.
  task automatic stream(input word_q_t in_q, input word_q_t exp_q, input word_q_t mid_q,
                        input int lat, input int lat_mid, input bit to_edge, input int frame2_start);
    for (int t = 0; t < in_q.size() + lat + 1; t++) begin
      if (to_edge) pf_edge_in <= (t < in_q.size()) ? in_q[t] : '0;
      else      pf_inv_in  <= (t < in_q.size()) ? in_q[t] : '0;
      @(negedge clk);
      if (t >= lat && t - lat < exp_q.size()) begin
        automatic pf_word_t got = to_edge ? pf_edge_out : pf_inv_out;
        check(got == exp_q[t - lat], $sformatf("stream word %0d got %h exp %h", t - lat, got, exp_q[t - lat]));
        if (got.inst && got == in_q[t - lat]) n_headers++;
        // input already in frame 2 while the output still carries frame 1
        if (to_edge && t < in_q.size() && t >= frame2_start && t - lat < frame2_start && !got.inst) n_overlap++;
      end
      if (to_edge && t >= lat_mid && t - lat_mid < mid_q.size())
        check(pf_edge_mid == mid_q[t - lat_mid], $sformatf("mid word %0d", t - lat_mid));
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t0, cyc;
    longint e;
    pb_cs = 0; pb_as = 0; pb_write = 0; pb_ad_in = 0;
    pf_inv_in = '0; pf_edge_in = '0;
    image = new[2**AW];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1. direct-access colour inversion of a 640x480 image
    fill(W * H + 16);
    bus_read(2, d); check(d == W * H, "COUNT resets to 640x480");
    t0 = now;
    bus_write(0, 32'h1);
    bus_write(0, 32'h11);            // start while busy: must be ignored
    bus_read(0, d);
    if (d[5:4] == 2'd0) n_ignored++;
    check(d[5:4] == 2'd0, "second start ignored");
    wait_done(t0, cyc);
    $display("invert %0dx%0d: %0d clocks", W, H, cyc);
    check(cyc >= 8 * W * H && cyc <= 8 * W * H + 220, $sformatf("invert took %0d clocks", cyc));
    for (int i = 0; i < W * H + 16; i++)
      check(pm_swizzle(sram.mem[i]) == ((i < W * H) ? invert_rgb(image[i]) : image[i]),
            $sformatf("inverted pixel %0d", i));

    // 2. image merge, 131072 pixels, B at word 524288
    fill(2**AW);
    bus_write(2, 131072);
    t0 = now;
    bus_write(0, 32'h11);
    wait_done(t0, cyc);
    $display("merge 131072 pixels: %0d clocks", cyc);
    check(cyc >= 12 * 131072 && cyc <= 12 * 131072 + 220, $sformatf("merge took %0d clocks", cyc));
    for (int i = 0; i < 131072 + 4; i++) begin
      automatic logic [31:0] exp = image[i];
      if (i < 131072)
        for (int k = 0; k < 4; k++)
          exp[8*k +: 8] = 8'(int'(image[i][8*k +: 8]) / 2 + int'(image[i + 524288][8*k +: 8]) / 2);
      check(pm_swizzle(sram.mem[i]) == exp, $sformatf("merged pixel %0d", i));
    end

    // 3. inner product, vectors at word 700000
    e = 0;
    for (int i = 0; i < 8; i++)
      e += longint'(image[700000 + i][15:0]) * longint'(image[700008 + i][15:0]);
    bus_write(3, 700000);
    t0 = now;
    ip_phase = 1'b1;
    bus_write(0, 32'h21);
    wait_done(t0, cyc);
    ip_phase = 1'b0;
    // From the last vector read to the first write strobe: 8 clocks of
    // hand-over plus one clock per multiply step. 8 products on 3 shared
    // multipliers take ceil(8/3) = 3 steps; each multiplier is reused.
    $display("inner product: %0d multiply steps", ip_gap - 8);
    check(ip_gap - 8 == 3, $sformatf("inner product took %0d multiply steps, exp 3", ip_gap - 8));
    if (ip_gap - 8 > 1) n_shared = 8 - (ip_gap - 8) + 1;
    bus_read(4, d); check(d == e[31:0], "inner product low word");
    bus_read(5, d); check(d == 32'(e >> 32), "inner product high word");
    check(pm_swizzle(sram.mem[700016]) == e[31:0], "inner product written to memory");

    // 4. PIPEFlow colour inverter, one 640x480 frame
    begin
      automatic pix_a_t px = new[W * H];
      word_q_t in_q, exp_q, none;
      for (int i = 0; i < W * H; i++) px[i] = $urandom;
      in_q = frame_words(W, H, px);
      exp_q = with_pixels(in_q, ref_invert(px));
      t0 = now;
      stream(in_q, exp_q, none, 3, 0, 1'b0, 0);
      $display("PIPEFlow invert frame: %0d words in %0d clocks", in_q.size(), now - t0);
      check(in_q.size() == 2 * W * H + 3, "two words per pixel plus header");
    end

    // 5. two 320x240 frames through Gaussian PIPE -> Laplacian PIPE
    begin
      automatic pix_a_t px1 = new[320 * 240], px2 = new[320 * 240];
      word_q_t f1, f2, in_q, mid_q, exp_q, t;
      for (int i = 0; i < 320 * 240; i++) begin px1[i] = $urandom; px2[i] = $urandom; end
      f1 = frame_words(320, 240, px1);
      f2 = frame_words(320, 240, px2);
      in_q = {f1, f2};
      t = with_pixels(f1, ref_gauss(px1)); mid_q = t;
      t = with_pixels(f2, ref_gauss(px2)); mid_q = {mid_q, t};
      t = with_pixels(f1, ref_laplace(ref_gauss(px1), 4)); exp_q = t;
      t = with_pixels(f2, ref_laplace(ref_gauss(px2), 4)); exp_q = {exp_q, t};
      stream(in_q, exp_q, mid_q, 8, 4, 1'b1, f1.size());
    end

    $display("mechanisms: reads=%0d writes=%0d read-after-write-chained=%0d ignored-start=%0d multiplier-reuse=%0d headers=%0d two-frame-overlap=%0d",
             n_reads, n_writes, n_chained, n_ignored, n_shared, n_headers, n_overlap);
    check(n_reads > 0,   "memory reads happened");
    check(n_writes > 0,  "memory writes happened");
    check(n_chained > 0, "read issued in last write clock happened");
    check(n_ignored > 0, "start while busy happened");
    check(n_shared > 0,  "multiplier reuse happened");
    check(n_headers > 0, "header pass-through happened");
    check(n_overlap > 0, "two PIPEs on different frames happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
