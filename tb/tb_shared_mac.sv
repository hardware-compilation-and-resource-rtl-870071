// tb_shared_mac: self-checking test of the shared-multiplier inner product.
//
// Builds the four configurations the document measures (8 x 16-bit and
// 16 x 12-bit vectors, adhoc and non-even sharing), each with 3 shared
// multipliers, plus the unshared and fully shared extremes. Random vectors
// (including all-ones operands) are fed to all of them; every result is
// compared with a sum of products computed here, and every run must take
// ceil(N/NMULT) cycles (adhoc) or N-NMULT+1 cycles (non-even).
module tb_shared_mac;
  import sonic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start;
  logic [7:0][15:0]  x8, y8;
  logic [15:0][11:0] x16, y16;
  logic [34:0] r_a8, r_n8, r_one, r_all;
  logic [27:0] r_a16, r_n16;
  logic [5:0] done_v, busy_v;
  int cyc [6];
  int exp_cyc [6] = '{3, 6, 6, 14, 8, 1};

  shared_mac #(.N(8),  .W(16), .NMULT(3), .SHARING(SHARE_ADHOC))   u_a8  (.clk, .rst_n, .start, .x(x8),  .y(y8),  .busy(busy_v[0]), .done(done_v[0]), .result(r_a8));
  shared_mac #(.N(8),  .W(16), .NMULT(3), .SHARING(SHARE_NONEVEN)) u_n8  (.clk, .rst_n, .start, .x(x8),  .y(y8),  .busy(busy_v[1]), .done(done_v[1]), .result(r_n8));
  shared_mac #(.N(16), .W(12), .NMULT(3), .SHARING(SHARE_ADHOC))   u_a16 (.clk, .rst_n, .start, .x(x16), .y(y16), .busy(busy_v[2]), .done(done_v[2]), .result(r_a16));
  shared_mac #(.N(16), .W(12), .NMULT(3), .SHARING(SHARE_NONEVEN)) u_n16 (.clk, .rst_n, .start, .x(x16), .y(y16), .busy(busy_v[3]), .done(done_v[3]), .result(r_n16));
  shared_mac #(.N(8),  .W(16), .NMULT(1), .SHARING(SHARE_ADHOC))   u_one (.clk, .rst_n, .start, .x(x8),  .y(y8),  .busy(busy_v[4]), .done(done_v[4]), .result(r_one));
  shared_mac #(.N(8),  .W(16), .NMULT(8), .SHARING(SHARE_ADHOC))   u_all (.clk, .rst_n, .start, .x(x8),  .y(y8),  .busy(busy_v[5]), .done(done_v[5]), .result(r_all));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e8, e16;
    start = 0; x8 = '0; y8 = '0; x16 = '0; y16 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      e8 = 0; e16 = 0;
      for (int i = 0; i < 8; i++) begin
        x8[i] = (t == 0) ? 16'hFFFF : 16'($urandom);
        y8[i] = (t == 0) ? 16'hFFFF : 16'($urandom);
        e8 += longint'(x8[i]) * longint'(y8[i]);
      end
      for (int i = 0; i < 16; i++) begin
        x16[i] = (t == 0) ? 12'hFFF : 12'($urandom);
        y16[i] = (t == 0) ? 12'hFFF : 12'($urandom);
        e16 += longint'(x16[i]) * longint'(y16[i]);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      for (int k = 0; k < 6; k++) cyc[k] = -1;
      for (int c = 1; c <= 20; c++) begin
        @(posedge clk);
        for (int k = 0; k < 6; k++) if (done_v[k] && cyc[k] < 0) cyc[k] = c - 1;
      end
      for (int k = 0; k < 6; k++)
        check(cyc[k] == exp_cyc[k], $sformatf("config %0d took %0d cycles exp %0d", k, cyc[k], exp_cyc[k]));
      check(r_a8  == 35'(e8),  $sformatf("8x16 adhoc %0d exp %0d", r_a8, e8));
      check(r_n8  == 35'(e8),  "8x16 non-even");
      check(r_one == 35'(e8),  "8x16 one multiplier");
      check(r_all == 35'(e8),  "8x16 unshared");
      check(r_a16 == 28'(e16), $sformatf("16x12 adhoc %0d exp %0d", r_a16, e16));
      check(r_n16 == 28'(e16), "16x12 non-even");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
