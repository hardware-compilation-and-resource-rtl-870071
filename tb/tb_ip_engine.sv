// tb_ip_engine: self-checking test of the memory-based inner product.
//
// ip_engine (8 x 16-bit vectors, 3 shared multipliers, adhoc sharing)
// drives pm_mem_if and the SRAM model. For several random vector pairs
// (the first all ones, which needs the full result width) the test writes
// X and Y into memory, runs the engine and compares both result words with
// a sum of products computed here. It also checks the run time:
// 16 reads of 4 cycles, 3 multiply cycles, two writes of 3 cycles and 5
// hand-over cycles.
module tb_ip_engine;
  import sonic_pkg::*;
  localparam int AW = 10;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start, busy, done;
  logic [AW-1:0] base;
  logic [34:0]   result;
  logic          mem_req, mem_we, mem_ready, mem_done;
  logic [AW-1:0] mem_addr, m_addr;
  logic [31:0]   mem_wdata, mem_rdata, m_data_out, m_data_in;
  logic          m_addr_oe, m_data_oe, m_ns, m_nw, m_ctl_oe;
  int checks = 0, failures = 0;

  ip_engine #(.AW(AW)) dut (.clk, .rst_n, .start, .base, .busy, .done, .result,
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

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int cycles, b;
    logic [31:0] lo, hi;
    start = 0; base = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      b = 20 * t + 3;
      e = 0;
      for (int i = 0; i < N; i++) begin
        automatic logic [15:0] xv = (t == 0) ? 16'hFFFF : 16'($urandom);
        automatic logic [15:0] yv = (t == 0) ? 16'hFFFF : 16'($urandom);
        // high half of each word is junk the engine must ignore
        sram.mem[b + i]     = pm_swizzle({16'($urandom), xv});
        sram.mem[b + N + i] = pm_swizzle({16'($urandom), yv});
        e += longint'(xv) * longint'(yv);
      end
      base <= AW'(b); start <= 1;
      @(posedge clk);
      start <= 0;
      cycles = 0;
      do begin @(posedge clk); cycles++; end while (!done && cycles < 1000);
      lo = pm_swizzle(sram.mem[b + 2 * N]);
      hi = pm_swizzle(sram.mem[b + 2 * N + 1]);
      check({hi, lo} == 64'(e), $sformatf("run %0d result %h%h exp %h", t, hi, lo, e));
      check(result == 35'(e), "result port");
      // 16 reads x 4, 3 multiply cycles, 2 writes x 3, and 5 hand-over
      // cycles (start, multiplier start and finish, first write request,
      // done register).
      check(cycles == 16 * 4 + 3 + 2 * 3 + 5, $sformatf("run took %0d cycles", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
