// shared_mac: inner product X1*Y1 + ... + XN*YN on NMULT shared multipliers.
//
// Operator sharing: fewer multipliers than products, each multiplier fed by
// a pair of operand multiplexers that pick, cycle by cycle, which element
// pair it multiplies. The products of a cycle are added into one
// accumulator. Two ways of handing products to multipliers are built:
//   ADHOC   - product i goes to multiplier i mod NMULT in cycle i / NMULT;
//             the run takes ceil(N / NMULT) cycles.
//   NONEVEN - multiplier 0 does products 0 .. N-NMULT, one per cycle;
//             multipliers 1 .. NMULT-1 each do one of the last products, in
//             the final cycle; the run takes N - NMULT + 1 cycles.
// With NMULT = N and ADHOC every product has its own multiplier (no
// sharing); with NMULT = 1 one multiplier does all.
//
// Interface: x and y are held stable from start until done. start is a
// one-cycle pulse; busy while running; done pulses for one cycle with
// result valid from then until the next start. result is full width:
// 2*W + clog2(N) bits.
//
// The operand-multiplexer structure, the vector size 8 and 16-bit operands
// and the two sharing styles come from the document. Running the
// multipliers of one cycle in parallel, and so the cycle counts above, is
// this design's reading: the document's listings issue one multiply per
// statement and report only area and clock speed.
module shared_mac
  import sonic_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned W       = 16,
  parameter int unsigned NMULT   = 3,
  parameter share_e      SHARING = SHARE_ADHOC,
  localparam int unsigned RW     = 2 * W + $clog2(N),
  localparam int unsigned NCYC   = (SHARING == SHARE_ADHOC) ? (N + NMULT - 1) / NMULT
                                                            : N - NMULT + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0][W-1:0]   x,
  input  logic [N-1:0][W-1:0]   y,
  output logic                  busy,
  output logic                  done,
  output logic [RW-1:0]         result
);

  localparam int unsigned CW = $clog2(NCYC + 1);

  logic [CW-1:0]              cyc_q;
  logic                       run_q;
  logic [RW-1:0]              acc_q;
  logic [NMULT-1:0]           use_m;
  logic [NMULT-1:0][W-1:0]    opx, opy;
  logic [NMULT-1:0][2*W-1:0]  prod;
  logic [RW-1:0]              sum;

  // Operand multiplexers: which product multiplier m does in this cycle.
  always_comb begin
    for (int m = 0; m < NMULT; m++) begin
      int idx;
      if (SHARING == SHARE_ADHOC) begin
        idx      = int'(cyc_q) * NMULT + m;
        use_m[m] = run_q && (idx < N);
      end else if (m == 0) begin
        idx      = int'(cyc_q);
        use_m[m] = run_q && (idx <= N - NMULT);
      end else begin
        idx      = N - NMULT + m;
        use_m[m] = run_q && (int'(cyc_q) == NCYC - 1);
      end
      if (idx >= N) idx = N - 1;
      opx[m] = x[idx];
      opy[m] = y[idx];
    end
  end

  // The shared multipliers themselves.
  always_comb
    for (int m = 0; m < NMULT; m++) prod[m] = opx[m] * opy[m];

  always_comb begin
    sum = acc_q;
    for (int m = 0; m < NMULT; m++)
      if (use_m[m]) sum = sum + RW'(prod[m]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q  <= '0;
      run_q  <= 1'b0;
      acc_q  <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        run_q <= 1'b1;
        cyc_q <= '0;
        acc_q <= '0;
      end else if (run_q) begin
        acc_q <= sum;
        cyc_q <= cyc_q + 1'b1;
        if (int'(cyc_q) == NCYC - 1) begin
          run_q  <= 1'b0;
          done   <= 1'b1;
          result <= sum;
        end
      end
    end
  end

  assign busy = run_q;

  initial begin
    assert (NMULT >= 1 && NMULT <= N) else $error("shared_mac: NMULT must be 1..N");
  end

endmodule
