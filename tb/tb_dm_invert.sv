// tb_dm_invert: self-checking test of the direct-access colour inverter.
//
// dm_invert drives pm_mem_if, which drives the SRAM model. Memory is filled
// with random pixels; two runs over different pixel counts invert a window
// in place. Every pixel in the window must be R,G,B-inverted with alpha
// kept, the pixels around it untouched, and the difference between the two
// run times must be exactly 8 cycles per extra pixel.
module tb_dm_invert;
  import sonic_pkg::*;
  localparam int AW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, busy, done;
  logic [AW-1:0] base;
  logic [AW:0]   count;
  logic          mem_req, mem_we, mem_ready, mem_done;
  logic [AW-1:0] mem_addr, m_addr;
  logic [31:0]   mem_wdata, mem_rdata, m_data_out, m_data_in;
  logic          m_addr_oe, m_data_oe, m_ns, m_nw, m_ctl_oe;
  logic [31:0]   image [2**AW];
  int checks = 0, failures = 0;

  dm_invert #(.AW(AW)) dut (.clk, .rst_n, .start, .base, .count, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_done, .mem_rdata);
  pm_mem_if #(.AW(AW)) mif (.clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .ready(mem_ready), .done(mem_done), .rdata(mem_rdata),
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe);
  pm_sram_model #(.AW(AW)) sram (.clk, .m_addr, .m_addr_oe, .m_data_from_pe(m_data_out),
    .m_data_oe, .m_data_to_pe(m_data_in), .m_ns, .m_nw, .m_ctl_oe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int b, input int n, output int cycles);
    for (int i = 0; i < 2**AW; i++) begin
      image[i] = $urandom;
      sram.mem[i] = pm_swizzle(image[i]);
    end
    base <= AW'(b); count <= (AW+1)'(n); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
    for (int i = 0; i < 2**AW; i++) begin
      automatic logic [31:0] exp = (i >= b && i < b + n) ? invert_rgb(image[i]) : image[i];
      automatic logic [31:0] got = pm_swizzle(sram.mem[i]);
      if (i >= b - 2 && i < b + n + 2)
        check(got == exp, $sformatf("pixel %0d got %h exp %h", i, got, exp));
      else if (got != exp) check(1'b0, $sformatf("pixel %0d outside window changed", i));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1, c2;
    start = 0; base = '0; count = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(10, 100, c1);
    run(37, 300, c2);
    $display("cycles: 100 px -> %0d, 300 px -> %0d", c1, c2);
    check(c2 - c1 == 8 * 200, $sformatf("cycles per pixel %0d/200 exp 8", c2 - c1));
    check(c1 >= 800 && c1 <= 803, "run time close to 8 cycles per pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
