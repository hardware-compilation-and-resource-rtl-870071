// tb_pipe_bus_if: self-checking test of the PIPE bus slave.
//
// A small register file in the testbench sits behind the slave. The test
// plays host: single-transaction writes (address cycle, then data cycle)
// to random registers, then reads every register back and compares with a
// reference copy. It also checks that AD is driven only in the data cycle
// of a read and that a lone data cycle with no address cycle writes nothing.
module tb_pipe_bus_if;
  localparam int RAW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           cs, as, write;
  logic [31:0]    ad_in, ad_out, wr_data, rd_data;
  logic           ad_oe, wr_en, rd_en;
  logic [RAW-1:0] reg_addr;
  logic [31:0]    regs [2**RAW];
  logic [31:0]    ref_regs [2**RAW];
  int checks = 0, failures = 0;

  pipe_bus_if #(.RAW(RAW)) dut (.clk, .rst_n, .cs, .as, .write, .ad_in, .ad_out, .ad_oe,
                                .reg_addr, .wr_en, .wr_data, .rd_en, .rd_data);

  assign rd_data = regs[reg_addr];
  always_ff @(posedge clk) if (wr_en) regs[reg_addr] <= wr_data;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    cs <= 1; as <= 1; write <= 1; ad_in <= a;
    @(posedge clk);
    as <= 0; ad_in <= d;
    @(negedge clk);
    check(!ad_oe, "AD not driven during a write");
    @(posedge clk);
    cs <= 0; write <= 0; ad_in <= $urandom;
    @(posedge clk);
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    cs <= 1; as <= 1; write <= 0; ad_in <= a;
    @(negedge clk);
    check(!ad_oe, "AD released in the address cycle");
    @(posedge clk);
    as <= 0; ad_in <= 32'h0;
    @(negedge clk);
    check(ad_oe, "AD driven in the read data cycle");
    d = ad_out;
    @(posedge clk);
    cs <= 0;
    @(negedge clk);
    check(!ad_oe, "bus released after the data cycle");
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    cs = 0; as = 0; write = 0; ad_in = 0;
    for (int i = 0; i < 2**RAW; i++) begin regs[i] = 32'(i); ref_regs[i] = 32'(i); end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      automatic int r = $urandom % (2**RAW);
      automatic logic [31:0] v = $urandom;
      bus_write(32'(r), v);
      ref_regs[r] = v;
    end
    // A data cycle with no address cycle before it must be ignored.
    cs <= 1; as <= 0; write <= 1; ad_in <= 32'hFFFF_FFFF;
    @(posedge clk);
    cs <= 0; write <= 0;
    @(posedge clk);
    for (int i = 0; i < 2**RAW; i++) begin
      bus_read(32'(i), d);
      check(d == ref_regs[i], $sformatf("reg %0d read %h exp %h", i, d, ref_regs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
