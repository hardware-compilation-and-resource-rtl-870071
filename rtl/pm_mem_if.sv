// pm_mem_if: PIPE Memory interface of the PIPE Engine.
//
// Turns single-word read and write requests into the pin sequences of the
// asynchronous SRAM that backs the PIPE Memory (20 address bits, 32 data
// bits, active-low select M_NS and active-low write M_NW). Every pin is
// decoded from the registered state, so outputs change only on a clock edge.
//
// Read, 4 cycles (R1..R4): R1-R3 drive the address with M_NS low and M_NW
// high, data pins released. The data pins are registered every cycle; the
// value the SRAM drives at the end of R3 is returned in R4, where M_NS goes
// back high. Write, 3 cycles (W1..W3): W1 drives address and data with
// M_NS and M_NW high, W2 pulls both low (the SRAM writes), W3 releases
// address and data with M_NS/M_NW back high. Between accesses every pin is
// released (the *_oe outputs are low); the board is assumed to pull M_NS
// and M_NW high then.
//
// Request side: req/we/addr/wdata are taken when ready is high. ready is
// high when idle and in the last cycle of an access (R4, W3), so a new
// access can start straight after the previous one. done is high in that
// last cycle; for a read, rdata is valid while done is high and stays
// valid until the next read ends.
//
// The cycle counts and pin sequences follow the document. The request
// handshake, the ready-in-last-cycle overlap and SWAP_BYTES (the data-pin
// byte reordering, done in the document by permuting pin assignments) are
// this design's choices.
module pm_mem_if
  import sonic_pkg::*;
#(
  parameter int unsigned AW         = 20,
  parameter int unsigned DW         = 32,
  parameter bit          SWAP_BYTES = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  // request side
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          ready,
  output logic          done,
  output logic [DW-1:0] rdata,
  // SRAM pins
  output logic [AW-1:0] m_addr,
  output logic          m_addr_oe,
  output logic [DW-1:0] m_data_out,
  output logic          m_data_oe,
  input  logic [DW-1:0] m_data_in,
  output logic          m_ns,
  output logic          m_nw,
  output logic          m_ctl_oe
);

  typedef enum logic [2:0] {S_IDLE, S_R1, S_R2, S_R3, S_R4, S_W1, S_W2, S_W3} state_e;

  state_e        state_q, state_d;
  logic [AW-1:0] addr_q;
  logic [DW-1:0] wdata_q;
  logic [DW-1:0] din_q;     // clocked data-pin input
  logic [DW-1:0] rdata_q;
  logic          take;

  function automatic logic [DW-1:0] to_pins(input logic [DW-1:0] w);
    if (SWAP_BYTES && DW == 32) return pm_swizzle(w);
    return w;
  endfunction

  assign ready = (state_q == S_IDLE) || (state_q == S_R4) || (state_q == S_W3);
  assign take  = req && ready;
  assign done  = (state_q == S_R4) || (state_q == S_W3);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_R1:    state_d = S_R2;
      S_R2:    state_d = S_R3;
      S_R3:    state_d = S_R4;
      S_W1:    state_d = S_W2;
      S_W2:    state_d = S_W3;
      default: state_d = S_IDLE;   // S_IDLE, S_R4, S_W3
    endcase
    if (take) state_d = we ? S_W1 : S_R1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      din_q   <= '0;
      rdata_q <= '0;
    end else begin
      state_q <= state_d;
      din_q   <= m_data_in;
      if (take) begin
        addr_q  <= addr;
        wdata_q <= wdata;
      end
      if (state_q == S_R4) rdata_q <= to_pins(din_q);
    end
  end

  // Read data: straight from the input register in R4, held afterwards.
  assign rdata = (state_q == S_R4) ? to_pins(din_q) : rdata_q;

  // Pin decode.
  always_comb begin
    m_addr     = addr_q;
    m_data_out = to_pins(wdata_q);
    m_addr_oe  = 1'b0;
    m_data_oe  = 1'b0;
    m_ctl_oe   = 1'b0;
    m_ns       = 1'b1;
    m_nw       = 1'b1;
    unique case (state_q)
      S_R1, S_R2, S_R3: begin
        m_addr_oe = 1'b1; m_ctl_oe = 1'b1; m_ns = 1'b0; m_nw = 1'b1;
      end
      S_R4: begin
        m_addr_oe = 1'b1; m_ctl_oe = 1'b1; m_ns = 1'b1; m_nw = 1'b1;
      end
      S_W1: begin
        m_addr_oe = 1'b1; m_data_oe = 1'b1; m_ctl_oe = 1'b1; m_ns = 1'b1; m_nw = 1'b1;
      end
      S_W2: begin
        m_addr_oe = 1'b1; m_data_oe = 1'b1; m_ctl_oe = 1'b1; m_ns = 1'b0; m_nw = 1'b0;
      end
      S_W3: begin
        m_ctl_oe = 1'b1; m_ns = 1'b1; m_nw = 1'b1;
      end
      default: ;
    endcase
  end

  // The SRAM data pins are never driven while a read is selected.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    !(m_data_oe && m_ctl_oe && !m_ns && m_nw));

endmodule
