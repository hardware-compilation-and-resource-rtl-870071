// tb_pm_mem_if: self-checking test of the PIPE Memory interface.
//
// Writes random words to random addresses through pm_mem_if into the SRAM
// model, reads them back in a random order and compares with a reference
// copy. Also checks: 4 cycles from a read being taken to its done, 3 for a
// write; the select/write pin levels in every cycle of both sequences; and
// that a stored word sits on the pins in G,R,alpha,B byte order.
module tb_pm_mem_if;
  import sonic_pkg::*;
  localparam int AW = 10;
  localparam int NW = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          req, we, ready, done;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;
  logic [AW-1:0] m_addr;
  logic          m_addr_oe, m_data_oe, m_ns, m_nw, m_ctl_oe;
  logic [31:0]   m_data_out, m_data_in;

  pm_mem_if #(.AW(AW)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .ready, .done, .rdata,
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe);

  pm_sram_model #(.AW(AW)) sram (
    .clk, .m_addr, .m_addr_oe, .m_data_from_pe(m_data_out), .m_data_oe,
    .m_data_to_pe(m_data_in), .m_ns, .m_nw, .m_ctl_oe);

  int checks = 0, failures = 0;
  logic [31:0]   ref_data [NW];
  logic [AW-1:0] ref_addr [NW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One access; returns the number of cycles from the request being taken
  // to done, and checks the pin levels in every cycle.
  task automatic access(input bit w, input logic [AW-1:0] a, input logic [31:0] d,
                        output logic [31:0] q, output int cyc);
    req <= 1'b1; we <= w; addr <= a; wdata <= d;
    do @(posedge clk); while (!ready);
    req <= 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
      if (!w) begin
        if (cyc <= 3) check(m_ctl_oe && !m_ns && m_nw && m_addr_oe && !m_data_oe && m_addr == a,
                            $sformatf("read cycle %0d pins", cyc));
        else          check(m_ns, "read cycle 4 deselects");
      end else begin
        if (cyc == 1) check(m_ns && m_nw && m_data_oe && m_addr_oe && m_addr == a, "write cycle 1 pins");
        if (cyc == 2) check(!m_ns && !m_nw && m_data_oe && m_data_out == pm_swizzle(d), "write cycle 2 pins");
        if (cyc == 3) check(m_ns && m_nw && !m_data_oe, "write cycle 3 releases");
      end
      q = rdata;
    end while (!done && cyc < 20);
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    int cyc;
    req = 0; we = 0; addr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!m_ctl_oe && !m_addr_oe && !m_data_oe, "pins released when idle");
    for (int i = 0; i < NW; i++) begin
      ref_addr[i] = AW'(i * 13 + ($urandom % 7) * 128);
      ref_data[i] = $urandom;
      access(1'b1, ref_addr[i], ref_data[i], q, cyc);
      check(cyc == 3, $sformatf("write took %0d cycles", cyc));
      check(sram.mem[ref_addr[i]] == pm_swizzle(ref_data[i]), "pin byte order in memory");
    end
    for (int k = 0; k < NW; k++) begin
      automatic int i = (k * 37) % NW;
      access(1'b0, ref_addr[i], 32'h0, q, cyc);
      check(cyc == 4, $sformatf("read took %0d cycles", cyc));
      check(q == ref_data[i], $sformatf("read %h exp %h", q, ref_data[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
