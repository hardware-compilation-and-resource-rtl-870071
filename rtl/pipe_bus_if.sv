// pipe_bus_if: PIPE bus slave for single-transaction register access.
//
// The host reaches the PIPE Engine's registers over the PIPE bus, a 32-bit
// multiplexed address/data bus with chip select CS, address strobe AS and
// direction WRITE. A transaction is one address cycle (CS and AS high, AD
// holds the address, WRITE gives the direction) immediately followed by one
// data cycle (CS high, AS low). On a write the PE takes AD in the data
// cycle; on a read the PE drives AD during the data cycle. Burst mode is
// not supported.
//
// Register side: wr_en pulses for one cycle with reg_addr and wr_data in a
// write data cycle; rd_en is high in a read data cycle, and rd_data (the
// register addressed by reg_addr, supplied combinationally by the owner of
// the registers) is driven onto AD in that same cycle.
//
// The two-cycle transaction comes from the document's timing diagrams. The
// split into a bus slave and a separate register file, and taking WRITE in
// the address cycle, are this design's choices.
module pipe_bus_if #(
  parameter int unsigned RAW = 4   // register address bits taken from AD
) (
  input  logic           clk,
  input  logic           rst_n,
  // PIPE bus pins
  input  logic           cs,
  input  logic           as,
  input  logic           write,
  input  logic [31:0]    ad_in,
  output logic [31:0]    ad_out,
  output logic           ad_oe,
  // register side
  output logic [RAW-1:0] reg_addr,
  output logic           wr_en,
  output logic [31:0]    wr_data,
  output logic           rd_en,
  input  logic [31:0]    rd_data
);

  logic           have_addr_q;  // an address cycle was seen, data cycle due
  logic           write_q;
  logic [RAW-1:0] addr_q;
  logic           data_cycle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_addr_q <= 1'b0;
      write_q     <= 1'b0;
      addr_q      <= '0;
    end else begin
      have_addr_q <= cs && as;
      if (cs && as) begin
        addr_q  <= ad_in[RAW-1:0];
        write_q <= write;
      end
    end
  end

  assign data_cycle = have_addr_q && cs && !as;
  assign reg_addr   = addr_q;
  assign wr_en      = data_cycle && write_q;
  assign wr_data    = ad_in;
  assign rd_en      = data_cycle && !write_q;
  assign ad_oe      = rd_en;
  assign ad_out     = rd_en ? rd_data : 32'h0;

endmodule
