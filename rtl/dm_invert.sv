// dm_invert: colour inverter in direct-access mode.
//
// Walks count pixels of the PIPE Memory from word address base upwards.
// For each one it reads the 32-bit R,G,B,alpha word through the memory
// interface (4 cycles), inverts R, G and B while keeping alpha (1 cycle)
// and writes the word back in place (3 cycles): 8 cycles per pixel, so a
// 640x480 image takes 2,457,600 cycles. The read of the next pixel is
// issued in the last cycle of the write, so there are no idle cycles
// between pixels.
//
// Interface: start (one-cycle pulse, ignored while busy), base, count
// (0 does nothing); busy while running; done pulses for one cycle after the
// last write. The memory request port connects to pm_mem_if.
//
// The per-pixel operation and its cycle budget follow the document; the
// start/busy/done handshake and the base/count registers are this design's.
module dm_invert
  import sonic_pkg::*;
#(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [AW:0]   count,
  output logic          busy,
  output logic          done,
  // memory request port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic          mem_ready,
  input  logic          mem_done,
  input  logic [31:0]   mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_INV, S_WWAIT} state_e;
  state_e       state_q;
  logic [AW:0]  idx_q;
  logic [31:0]  pix_q;
  logic [AW-1:0] base_q;
  logic [AW:0]  count_q;
  logic         last;

  assign last = (idx_q + 1'b1 == count_q);
  assign busy = (state_q != S_IDLE);

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base_q + idx_q[AW-1:0];
    mem_wdata = invert_rgb(pix_q);
    unique case (state_q)
      S_RD:    mem_req = 1'b1;
      S_INV:   begin mem_req = 1'b1; mem_we = 1'b1; end
      S_WWAIT: if (mem_done && !last) begin
                 mem_req  = 1'b1;
                 mem_addr = base_q + idx_q[AW-1:0] + 1'b1;
               end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      pix_q   <= '0;
      base_q  <= '0;
      count_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start && count != 0) begin
          base_q  <= base;
          count_q <= count;
          idx_q   <= '0;
          state_q <= S_RD;
        end
        S_RD:    if (mem_ready) state_q <= S_RWAIT;
        S_RWAIT: if (mem_done) begin pix_q <= mem_rdata; state_q <= S_INV; end
        S_INV:   if (mem_ready) state_q <= S_WWAIT;
        S_WWAIT: if (mem_done) begin
          if (last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_RWAIT;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
