// ip_engine: inner product of two vectors held in the PIPE Memory.
//
// Reads X1..XN from words base .. base+N-1 and Y1..YN from words
// base+N .. base+2N-1 (each element in the low W bits of its word) through
// the memory interface, back to back (4 cycles per word). Then the
// shared-multiplier datapath shared_mac forms the sum of products, and the
// result is written as two words: bits 31:0 at base+2N and the remaining
// high bits, zero-extended, at base+2N+1 (3 cycles each).
//
// Interface: start pulse and base; busy while running; done pulses after
// the second write. The memory request port connects to pm_mem_if.
//
// The inner product, its element sizes and the sharing styles follow the
// document. The memory layout of X, Y and the result, and writing the
// result as two words, are this design's choices (the document only says
// that elements are read from memory and the result written back).
module ip_engine
  import sonic_pkg::*;
#(
  parameter int unsigned AW      = 20,
  parameter int unsigned N       = 8,
  parameter int unsigned W       = 16,
  parameter int unsigned NMULT   = 3,
  parameter share_e      SHARING = SHARE_ADHOC,
  localparam int unsigned RW     = 2 * W + $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic          busy,
  output logic          done,
  output logic [RW-1:0] result,
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic          mem_ready,
  input  logic          mem_done,
  input  logic [31:0]   mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_MAC, S_WLO, S_WWLO, S_WWHI} state_e;
  state_e                 state_q;
  logic [AW-1:0]          base_q;
  logic [$clog2(2*N)-1:0] k_q;        // element being read, 0 .. 2N-1
  logic [N-1:0][W-1:0]    x_q, y_q;
  logic                   mac_start, mac_busy, mac_done;
  logic [RW-1:0]          mac_result;
  logic [63:0]            res_wide;

  shared_mac #(.N(N), .W(W), .NMULT(NMULT), .SHARING(SHARING)) u_mac (
    .clk, .rst_n, .start(mac_start), .x(x_q), .y(y_q),
    .busy(mac_busy), .done(mac_done), .result(mac_result));

  assign busy      = (state_q != S_IDLE);
  assign mac_start = (state_q == S_MAC) && !mac_busy && !mac_done;
  assign result    = mac_result;
  assign res_wide  = 64'(mac_result);

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = base_q + AW'(k_q);
    mem_wdata = res_wide[31:0];
    unique case (state_q)
      S_RD:   mem_req = 1'b1;
      S_RWAIT: if (mem_done && int'(k_q) != 2 * N - 1) begin
                 mem_req  = 1'b1;
                 mem_addr = base_q + AW'(k_q) + 1'b1;
               end
      S_WLO:  begin mem_req = 1'b1; mem_we = 1'b1; mem_addr = base_q + AW'(2 * N); end
      S_WWLO: if (mem_done) begin
                mem_req   = 1'b1; mem_we = 1'b1;
                mem_addr  = base_q + AW'(2 * N + 1);
                mem_wdata = res_wide[63:32];
              end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      base_q  <= '0;
      k_q     <= '0;
      x_q     <= '0;
      y_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE:  if (start) begin base_q <= base; k_q <= '0; state_q <= S_RD; end
        S_RD:    if (mem_ready) state_q <= S_RWAIT;
        S_RWAIT: if (mem_done) begin
          if (int'(k_q) < N) x_q[k_q] <= mem_rdata[W-1:0];
          else               y_q[int'(k_q) - N] <= mem_rdata[W-1:0];
          if (int'(k_q) == 2 * N - 1) state_q <= S_MAC;
          else                        k_q <= k_q + 1'b1;
        end
        S_MAC:   if (mac_done) state_q <= S_WLO;
        S_WLO:   if (mem_ready) state_q <= S_WWLO;
        S_WWLO:  if (mem_done) state_q <= S_WWHI;
        S_WWHI:  if (mem_done) begin state_q <= S_IDLE; done <= 1'b1; end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
