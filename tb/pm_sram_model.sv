// pm_sram_model: behavioural model of the PIPE Memory SRAM (32 bits x 2^AW
// words, active-low select and write), for simulation only.
//
// Read: while M_NS is low and M_NW high the model drives its data pins. The
// word is only valid from the third clock of the select onwards (the access
// time of the part is modelled in whole clocks); before that it drives
// 32'hDEAD_BEEF, so an interface that samples too early reads garbage.
// Write: while M_NS and M_NW are both low and the data pins are driven, the
// addressed word takes the pin data. Released control pins count as high.
// The clock input exists only to count the access time.
module pm_sram_model #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] m_addr,
  input  logic          m_addr_oe,
  input  logic [31:0]   m_data_from_pe,
  input  logic          m_data_oe,
  output logic [31:0]   m_data_to_pe,
  input  logic          m_ns,
  input  logic          m_nw,
  input  logic          m_ctl_oe
);
  logic [31:0] mem [2**AW];
  logic        ns_eff, nw_eff, rd_sel;
  int unsigned sel_cycles;
  int unsigned writes;

  assign ns_eff = m_ctl_oe ? m_ns : 1'b1;
  assign nw_eff = m_ctl_oe ? m_nw : 1'b1;
  assign rd_sel = !ns_eff && nw_eff && m_addr_oe;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 32'h0;
    sel_cycles = 0;
    writes = 0;
  end

  always @(posedge clk) sel_cycles <= rd_sel ? sel_cycles + 1 : 0;

  assign m_data_to_pe = (rd_sel && sel_cycles >= 2) ? mem[m_addr] : 32'hDEAD_BEEF;

  always @(posedge clk)
    if (!ns_eff && !nw_eff && m_data_oe && m_addr_oe) begin
      mem[m_addr] <= m_data_from_pe;
      writes <= writes + 1;
    end
endmodule
