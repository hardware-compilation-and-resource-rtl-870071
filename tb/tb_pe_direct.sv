// tb_pe_direct: self-checking test of the direct-access PIPE Engine.
//
// Plays the host on the PIPE bus and the SRAM on the memory pins. Checks
// the register reset values; runs colour inversion, image merge and the
// inner product, each started by writing CTRL and finished by polling
// STATUS until it reads 2, and checks the memory (and the result
// registers) against values computed here. Also checks that a start
// written while a program runs is ignored, and the cycles per pixel of the
// two image programs (8 and 12) from the polled run times.
module tb_pe_direct;
  import sonic_pkg::*;
  localparam int AW = 12;
  localparam int BOFF = 2048;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          pb_cs, pb_as, pb_write, pb_ad_oe;
  logic [31:0]   pb_ad_in, pb_ad_out;
  logic [AW-1:0] m_addr;
  logic          m_addr_oe, m_data_oe, m_ns, m_nw, m_ctl_oe;
  logic [31:0]   m_data_out, m_data_in;
  logic [31:0]   image [2**AW];
  int checks = 0, failures = 0;
  longint now = 0;
  always @(posedge clk) now <= now + 1;

  pe_direct #(.AW(AW), .DEF_COUNT(100), .B_OFFSET(BOFF)) dut (
    .clk, .rst_n, .pb_cs, .pb_as, .pb_write, .pb_ad_in, .pb_ad_out, .pb_ad_oe,
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe);
  pm_sram_model #(.AW(AW)) sram (.clk, .m_addr, .m_addr_oe, .m_data_from_pe(m_data_out),
    .m_data_oe, .m_data_to_pe(m_data_in), .m_ns, .m_nw, .m_ctl_oe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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

  // Start a program and poll STATUS until it reads 2; returns the clocks
  // from the start write to the poll that saw 2.
  task automatic run_prog(input int prog, output int cycles);
    logic [31:0] st;
    longint t0;
    t0 = now;
    bus_write(0, 32'(prog << 4) | 32'h1);
    do bus_read(1, st); while (st != 2 && now - t0 < 40000);
    cycles = int'(now - t0);
    check(st == 2, "STATUS reads 2 at the end");
  endtask

  task automatic fill();
    for (int i = 0; i < 2**AW; i++) begin
      image[i] = $urandom;
      sram.mem[i] = pm_swizzle(image[i]);
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
    logic [31:0] d;
    int c1, c2;
    longint e;
    pb_cs = 0; pb_as = 0; pb_write = 0; pb_ad_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    bus_read(1, d); check(d == 0, "STATUS idle after reset");
    bus_read(2, d); check(d == 100, "COUNT reset value");
    bus_read(3, d); check(d == 0, "BASE reset value");

    // colour inversion, two sizes
    fill();
    bus_write(3, 16); bus_write(2, 50);
    run_prog(0, c1);
    bus_read(2, d); check(d == 50, "COUNT read back");
    for (int i = 10; i < 80; i++) begin
      automatic logic [31:0] exp = (i >= 16 && i < 66) ? invert_rgb(image[i]) : image[i];
      check(pm_swizzle(sram.mem[i]) == exp, $sformatf("invert pixel %0d", i));
    end
    fill();
    bus_write(2, 150);
    run_prog(0, c2);
    check(c2 - c1 >= 8 * 100 - 4 && c2 - c1 <= 8 * 100 + 4,
          $sformatf("invert: %0d clocks for 100 more pixels", c2 - c1));
    check(pm_swizzle(sram.mem[165]) == invert_rgb(image[165]) && pm_swizzle(sram.mem[166]) == image[166],
          "invert window end");

    // image merge; a second start while running is ignored
    fill();
    bus_write(3, 5); bus_write(2, 60);
    bus_write(0, 32'h11);
    bus_write(0, 32'h01);
    bus_read(0, d); check(d[5:4] == 2'd1, "CTRL reads back the merge program");
    begin
      logic [31:0] st;
      do bus_read(1, st); while (st != 2);
    end
    for (int i = 0; i < 70; i++) begin
      automatic logic [31:0] exp = image[i];
      if (i >= 5 && i < 65)
        for (int k = 0; k < 4; k++)
          exp[8*k +: 8] = 8'(int'(image[i][8*k +: 8]) / 2 + int'(image[i + BOFF][8*k +: 8]) / 2);
      check(pm_swizzle(sram.mem[i]) == exp, $sformatf("merge pixel %0d", i));
    end
    bus_write(2, 160);
    run_prog(1, c2);
    bus_write(2, 60);
    run_prog(1, c1);
    check(c2 - c1 >= 12 * 100 - 4 && c2 - c1 <= 12 * 100 + 4,
          $sformatf("merge: %0d clocks for 100 more pixels", c2 - c1));

    // inner product
    fill();
    e = 0;
    for (int i = 0; i < 8; i++)
      e += longint'(image[300 + i][15:0]) * longint'(image[308 + i][15:0]);
    bus_write(3, 300);
    run_prog(2, c1);
    check(pm_swizzle(sram.mem[316]) == e[31:0], "inner product low word in memory");
    check(pm_swizzle(sram.mem[317]) == 32'(e >> 32), "inner product high word in memory");
    bus_read(4, d); check(d == e[31:0], "RES_LO");
    bus_read(5, d); check(d == 32'(e >> 32), "RES_HI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
