// sonic_top: PIPE Engine designs for the SONIC reconfigurable board.
//
// SONIC carries up to eight PIPEs; each PIPE has a PIPE Engine FPGA (PE)
// holding the user's circuit, a PIPE Router (PR) that streams images
// between the PIPE Memory (PM) and the PE over the 16-bit PIPEFlow bus,
// and the PM itself. The host reaches the PE's registers over the PIPE
// bus. This top puts the engine circuits side by side, each with its own
// pins:
//   * u_direct - direct-access engine: PIPE bus registers plus memory
//     interface, running colour inversion, image merge or the
//     shared-multiplier inner product on the PM (pe_direct).
//   * u_inv    - PIPEFlow colour inverter (pf_invert), latency 3.
//   * u_gauss -> u_lap - the edge detector split over two PIPEs (time
//     partitioning): PIPE 0's engine smooths with the Gaussian, its output
//     goes straight to PIPE 1's engine over PIPEFlow Right (pf_edge_mid)
//     and PIPE 1 applies the Laplacian. Latency 4 + 4 clocks. While PIPE 1
//     works on one frame, PIPE 0 can already take the next.
// The PIPE Router, the PM SRAM and the host are outside this design.
//
// In the document these are separate FPGA configurations loaded one at a
// time; holding them in one top so they can be simulated together is this
// design's arrangement.
module sonic_top
  import sonic_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  // PIPE bus of the direct-access engine
  input  logic          pb_cs,
  input  logic          pb_as,
  input  logic          pb_write,
  input  logic [31:0]   pb_ad_in,
  output logic [31:0]   pb_ad_out,
  output logic          pb_ad_oe,
  // PIPE Memory pins of the direct-access engine
  output logic [AW-1:0] m_addr,
  output logic          m_addr_oe,
  output logic [31:0]   m_data_out,
  output logic          m_data_oe,
  input  logic [31:0]   m_data_in,
  output logic          m_ns,
  output logic          m_nw,
  output logic          m_ctl_oe,
  // PIPEFlow of the colour inverter engine
  input  pf_word_t      pf_inv_in,
  output pf_word_t      pf_inv_out,
  // PIPEFlow of the two-PIPE edge detector
  input  pf_word_t      pf_edge_in,
  output pf_word_t      pf_edge_mid,
  output pf_word_t      pf_edge_out
);

  pe_direct #(.AW(AW)) u_direct (
    .clk, .rst_n, .pb_cs, .pb_as, .pb_write, .pb_ad_in, .pb_ad_out, .pb_ad_oe,
    .m_addr, .m_addr_oe, .m_data_out, .m_data_oe, .m_data_in, .m_ns, .m_nw, .m_ctl_oe);

  pf_invert u_inv (.clk, .rst_n, .pf_in(pf_inv_in), .pf_out(pf_inv_out));

  pf_gauss   u_gauss (.clk, .rst_n, .pf_in(pf_edge_in),  .pf_out(pf_edge_mid));
  pf_laplace u_lap   (.clk, .rst_n, .pf_in(pf_edge_mid), .pf_out(pf_edge_out));

endmodule
