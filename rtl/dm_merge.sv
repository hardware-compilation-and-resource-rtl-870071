// dm_merge: image merge in direct-access mode.
//
// Blends two images held in the PIPE Memory with a fixed weight of one
// half: for each of count pixels, C = (A >> 1) + (B >> 1) byte by byte
// (R, G, B and alpha each halved, then added). Pixel i of A is at
// base + i, pixel i of B at base + B_OFFSET + i, and C overwrites A. Each
// pixel costs two 4-cycle reads, one cycle for the blend and a 3-cycle
// write: 12 cycles. Each next access is issued in the last cycle of the
// one before.
//
// Interface: start pulse, base, count; busy while running, done pulses
// after the last write. The memory request port connects to pm_mem_if.
//
// The blend, the image placement (B from word 524288) and the access order
// follow the document; the handshake and base/count are this design's.
module dm_merge
  import sonic_pkg::*;
#(
  parameter int unsigned AW       = 20,
  parameter int unsigned B_OFFSET = 524288
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [AW:0]   count,
  output logic          busy,
  output logic          done,
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic          mem_ready,
  input  logic          mem_done,
  input  logic [31:0]   mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RDA, S_WAITA, S_WAITB, S_MERGE, S_WWAIT} state_e;
  state_e        state_q;
  logic [AW:0]   idx_q;
  logic [31:0]   a_q, b_q;
  logic [AW-1:0] base_q, addr_a, addr_b;
  logic [AW:0]   count_q;
  logic          last;

  assign last   = (idx_q + 1'b1 == count_q);
  assign busy   = (state_q != S_IDLE);
  assign addr_a = base_q + idx_q[AW-1:0];
  assign addr_b = base_q + AW'(B_OFFSET) + idx_q[AW-1:0];

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = addr_a;
    mem_wdata = merge_half(a_q, b_q);
    unique case (state_q)
      S_RDA:   mem_req = 1'b1;
      S_WAITA: if (mem_done) begin mem_req = 1'b1; mem_addr = addr_b; end
      S_MERGE: begin mem_req = 1'b1; mem_we = 1'b1; end
      S_WWAIT: if (mem_done && !last) begin mem_req = 1'b1; mem_addr = addr_a + 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      a_q     <= '0;
      b_q     <= '0;
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
          state_q <= S_RDA;
        end
        S_RDA:   if (mem_ready) state_q <= S_WAITA;
        S_WAITA: if (mem_done) begin a_q <= mem_rdata; state_q <= S_WAITB; end
        S_WAITB: if (mem_done) begin b_q <= mem_rdata; state_q <= S_MERGE; end
        S_MERGE: if (mem_ready) state_q <= S_WWAIT;
        S_WWAIT: if (mem_done) begin
          if (last) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_WAITA;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
