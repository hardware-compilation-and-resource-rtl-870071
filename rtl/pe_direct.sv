// pe_direct: PIPE Engine in direct-access mode.
//
// The host controls the engine through registers on the PIPE bus and the
// engine works on images in its PIPE Memory through the memory interface;
// the PIPE Router is not involved. Three memory programs share the one
// memory interface: colour inversion (8 cycles per pixel), image merge
// (12 cycles per pixel) and the shared-multiplier inner product. Only the
// program that was started drives the memory.
//
// Register map (PIPE bus address bits 3:0, 32-bit registers):
//   0 CTRL    write: bit 0 = 1 starts program bits 5:4 (0 invert, 1 merge,
//             2 inner product), ignored while busy. read: last program.
//   1 STATUS  read: 2 = finished, 1 = running, 0 = idle since reset.
//             The host writes 1 to CTRL and polls STATUS until it reads 2.
//   2 COUNT   pixels to process, reset value DEF_COUNT (640x480).
//   3 BASE    first PIPE Memory word address of the image or vectors.
//   4 RES_LO  inner product result, bits 31:0.
//   5 RES_HI  inner product result, upper bits.
// Other addresses read as 0.
//
// Start-and-poll synchronisation with the host (write 1, wait for 2) is
// the document's; the register numbers, COUNT/BASE and program select are
// this design's choices.
module pe_direct
  import sonic_pkg::*;
#(
  parameter int unsigned AW        = 20,
  parameter int unsigned DEF_COUNT = 307200,
  parameter int unsigned B_OFFSET  = 524288,
  parameter int unsigned IP_N      = 8,
  parameter int unsigned IP_W      = 16,
  parameter int unsigned NMULT     = 3,
  parameter share_e      SHARING   = SHARE_ADHOC
) (
  input  logic          clk,
  input  logic          rst_n,
  // PIPE bus
  input  logic          pb_cs,
  input  logic          pb_as,
  input  logic          pb_write,
  input  logic [31:0]   pb_ad_in,
  output logic [31:0]   pb_ad_out,
  output logic          pb_ad_oe,
  // PIPE Memory SRAM pins
  output logic [AW-1:0] m_addr,
  output logic          m_addr_oe,
  output logic [31:0]   m_data_out,
  output logic          m_data_oe,
  input  logic [31:0]   m_data_in,
  output logic          m_ns,
  output logic          m_nw,
  output logic          m_ctl_oe
);

  localparam int unsigned RAW = 4;
  localparam int unsigned RW  = 2 * IP_W + $clog2(IP_N);
  localparam int unsigned NP  = 3;

  // PIPE bus registers
  logic [RAW-1:0] reg_addr;
  logic           wr_en, rd_en;
  logic [31:0]    wr_data, rd_data;
  prog_e          prog_q;
  logic [1:0]     status_q;
  logic [AW:0]    count_q;
  logic [AW-1:0]  base_q;
  logic           any_busy, any_done;

  pipe_bus_if #(.RAW(RAW)) u_bus (
    .clk, .rst_n, .cs(pb_cs), .as(pb_as), .write(pb_write), .ad_in(pb_ad_in),
    .ad_out(pb_ad_out), .ad_oe(pb_ad_oe), .reg_addr, .wr_en, .wr_data, .rd_en, .rd_data);

  // program ports
  logic [NP-1:0]         p_start, p_busy, p_done, p_req, p_we;
  logic [NP-1:0][AW-1:0] p_addr;
  logic [NP-1:0][31:0]   p_wdata;
  logic [RW-1:0]         ip_result;
  logic [63:0]           ip_wide;
  logic                  start_cmd;

  // shared memory interface
  logic          mem_req, mem_we, mem_ready, mem_done;
  logic [AW-1:0] mem_addr;
  logic [31:0]   mem_wdata, mem_rdata;

  assign any_busy  = |p_busy;
  assign any_done  = |p_done;
  assign start_cmd = wr_en && (reg_addr == RAW'(0)) && wr_data[0] && !any_busy && (status_q != 2'd1);
  assign ip_wide   = 64'(ip_result);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prog_q   <= PROG_INVERT;
      status_q <= 2'd0;
      count_q  <= (AW+1)'(DEF_COUNT);
      base_q   <= '0;
    end else begin
      if (wr_en) begin
        unique case (reg_addr)
          RAW'(2): count_q <= wr_data[AW:0];
          RAW'(3): base_q  <= wr_data[AW-1:0];
          default: ;
        endcase
      end
      if (start_cmd) begin
        prog_q   <= prog_e'(wr_data[5:4]);
        status_q <= 2'd1;
      end else if (any_done) begin
        status_q <= 2'd2;
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      RAW'(0): rd_data = {26'd0, prog_q, 4'd0};
      RAW'(1): rd_data = {30'd0, status_q};
      RAW'(2): rd_data = 32'(count_q);
      RAW'(3): rd_data = 32'(base_q);
      RAW'(4): rd_data = ip_wide[31:0];
      RAW'(5): rd_data = ip_wide[63:32];
      default: rd_data = 32'd0;
    endcase
  end

  for (genvar p = 0; p < NP; p++) begin : g_start
    assign p_start[p] = start_cmd && (wr_data[5:4] == 2'(p));
  end

  dm_invert #(.AW(AW)) u_invert (
    .clk, .rst_n, .start(p_start[PROG_INVERT]), .base(base_q), .count(count_q),
    .busy(p_busy[PROG_INVERT]), .done(p_done[PROG_INVERT]),
    .mem_req(p_req[PROG_INVERT]), .mem_we(p_we[PROG_INVERT]), .mem_addr(p_addr[PROG_INVERT]),
    .mem_wdata(p_wdata[PROG_INVERT]), .mem_ready, .mem_done, .mem_rdata);

  dm_merge #(.AW(AW), .B_OFFSET(B_OFFSET)) u_merge (
    .clk, .rst_n, .start(p_start[PROG_MERGE]), .base(base_q), .count(count_q),
    .busy(p_busy[PROG_MERGE]), .done(p_done[PROG_MERGE]),
    .mem_req(p_req[PROG_MERGE]), .mem_we(p_we[PROG_MERGE]), .mem_addr(p_addr[PROG_MERGE]),
    .mem_wdata(p_wdata[PROG_MERGE]), .mem_ready, .mem_done, .mem_rdata);

  ip_engine #(.AW(AW), .N(IP_N), .W(IP_W), .NMULT(NMULT), .SHARING(SHARING)) u_iprod (
    .clk, .rst_n, .start(p_start[PROG_IPROD]), .base(base_q),
    .busy(p_busy[PROG_IPROD]), .done(p_done[PROG_IPROD]), .result(ip_result),
    .mem_req(p_req[PROG_IPROD]), .mem_we(p_we[PROG_IPROD]), .mem_addr(p_addr[PROG_IPROD]),
    .mem_wdata(p_wdata[PROG_IPROD]), .mem_ready, .mem_done, .mem_rdata);

  // The started program owns the memory interface.
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = p_addr[0];
    mem_wdata = p_wdata[0];
    for (int p = 0; p < NP; p++)
      if (int'(prog_q) == p) begin
        mem_req   = p_req[p];
        mem_we    = p_we[p];
        mem_addr  = p_addr[p];
        mem_wdata = p_wdata[p];
      end
  end

  pm_mem_if #(.AW(AW)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .ready(mem_ready), .done(mem_done), .rdata(mem_rdata),
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe);

  a_one_program: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(p_busy));

endmodule
