// tb_pf_gauss: self-checking test of the PIPEFlow 1-D Gaussian stage.
//
// Streams two random frames (8x4 and 5x3 pixels, with idle words around
// them) through pf_gauss, one word per clock. Every output word, control
// bits included, must equal the reference stream (header unchanged, pixel
// = [1 2 1]/4 of the greens, zero beyond the frame) 4 clocks later.
module tb_pf_gauss;
  import sonic_pkg::*;
  import pf_tb_pkg::*;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pf_word_t pf_in, pf_out;
  word_q_t  in_q, exp_q;
  int checks = 0, failures = 0;

  pf_gauss dut (.clk, .rst_n, .pf_in, .pf_out);

  task automatic add_frame(input int w, input int h);
    pix_a_t px = new[w * h];
    word_q_t fr;
    for (int i = 0; i < w * h; i++) px[i] = $urandom;
    fr = frame_words(w, h, px);
    foreach (fr[k]) in_q.push_back(fr[k]);
    fr = with_pixels(fr, ref_gauss(px));
    foreach (fr[k]) exp_q.push_back(fr[k]);
  endtask

  task automatic add_idle(input int n);
    repeat (n) begin in_q.push_back('0); exp_q.push_back('0); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pf_in = '0;
    add_idle(2); add_frame(8, 4); add_idle(3); add_frame(5, 3); add_idle(LAT + 2);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < in_q.size() + LAT; t++) begin
      pf_in <= (t < in_q.size()) ? in_q[t] : '0;
      @(negedge clk);
      if (t >= LAT && t - LAT < exp_q.size()) begin
        checks++;
        if (pf_out !== exp_q[t - LAT]) begin
          failures++;
          $display("FAIL: word %0d got %p exp %p", t - LAT, pf_out, exp_q[t - LAT]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
