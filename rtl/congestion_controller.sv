// Central, interval-based congestion controller of the mesh.
//
// Every PERIOD cycles it looks at all nodes and decides whom to throttle and by
// how much:
//   1. when to throttle: node i is congested if its starvation rate
//        sigma_i > min(ALPHA_STARVE * q_i + BETA_STARVE, GAMMA_STARVE)
//      where q_i is node i's average injection-queue length over the period;
//      throttling is active if any node is congested;
//   2. whom to throttle: when active, the nodes whose q_i is above the mean
//      of all q (the most network-intensive ones, lowest instructions per flit);
//   3. how much: those nodes get throttle rate
//        R_i = min(ALPHA_THR * q_i + BETA_THR, GAMMA_THR),
//      all others rate 0.
//
// Arithmetic is unsigned fixed point with 8 fraction bits ("Q8": 256 = 1.0).
// sigma_i = starve_cnt_i / W and q_i = qlen_sum_i / PERIOD are formed in Q8;
// the division by PERIOD is a multiplication by a rounded reciprocal computed
// at elaboration. The mean test q_i > mean(q) is evaluated as
// N_NODES * q_i > sum(q), without a divider. The rate is delivered as a count
// of blocked opportunities per MAX_COUNT (R_i * MAX_COUNT).
//
// Timing: period_end is high in the last cycle of each period; the nodes close
// their queue-length sums on it. The next cycle the controller takes a snapshot
// of all starvation counters, then spends N_NODES cycles on step 1 (one node
// per cycle) and N_NODES cycles on steps 2-3, writing throttle_rate of one node
// per cycle. update_done pulses in the cycle after the last rate is written.
// So new rates are in force 2*N_NODES+2 cycles after period_end.
// With enable low, every rate is held at 0 (the unthrottled baseline).
//
// The algorithm, its thresholds and the period follow the document, which
// runs it as system software on the cores; here it is a sequential hardware
// unit reached by direct wires. The document gives two sets of constants:
// alpha_starve 0.2 and alpha_rate 0.30 with a 100,000-cycle period in the
// mechanism's description, alpha_starve 50, alpha_throttle 0.2 and
// T = 10,000 in the evaluation setup. This design uses T = 10,000,
// alpha_starve 0.2 (with a queue length in flits, 50 would always give the
// upper bound) and alpha_throttle 0.2. All are parameters.
module congestion_controller #(
  parameter int unsigned N_NODES         = 16,
  parameter int unsigned PERIOD          = 10000,
  parameter int unsigned W               = 128,
  parameter int unsigned MAX_COUNT       = 128,
  parameter int unsigned SUM_W           = 24,
  parameter int unsigned ALPHA_STARVE_Q8 = 51,   // 0.20
  parameter int unsigned BETA_STARVE_Q8  = 90,   // 0.35
  parameter int unsigned GAMMA_STARVE_Q8 = 205,  // 0.80
  parameter int unsigned ALPHA_THR_Q8    = 51,   // 0.20
  parameter int unsigned BETA_THR_Q8     = 115,  // 0.45
  parameter int unsigned GAMMA_THR_Q8    = 192,  // 0.75
  localparam int unsigned SCW = $clog2(W + 1),
  localparam int unsigned RW  = $clog2(MAX_COUNT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [SCW-1:0]   starve_cnt [N_NODES],
  input  logic [SUM_W-1:0] qlen_sum   [N_NODES],
  output logic             period_end,
  output logic [RW-1:0]    throttle_rate [N_NODES],
  output logic             throttle_active,
  output logic             update_done
);

  localparam int unsigned RSH = 24;
  localparam longint unsigned RECIP =
      ((64'd1 << (RSH + 8)) + 64'(PERIOD / 2)) / 64'(PERIOD);
  localparam int unsigned QW   = 24;                        // Q8 queue length
  localparam int unsigned SQW  = QW + $clog2(N_NODES + 1);  // sum of Q8 lengths
  localparam int unsigned IW   = (N_NODES > 1) ? $clog2(N_NODES) : 1;
  localparam int unsigned PCW  = $clog2(PERIOD);

  // elaboration-time sanity: the update must finish within one period
  if (2 * N_NODES + 4 >= PERIOD) begin : g_period_check
    $error("congestion_controller: PERIOD too short for N_NODES");
  end

  typedef enum logic [1:0] {S_IDLE, S_SNAP, S_DETECT, S_RATE} state_e;

  state_e           state;
  logic [PCW-1:0]   cyc;
  logic [IW-1:0]    idx;
  logic [SCW-1:0]   sig_snap [N_NODES];
  logic [QW-1:0]    qavg     [N_NODES];
  logic [SQW-1:0]   qsum;
  logic             congested;

  // Q8 conversions and the two threshold formulas, for the node at idx
  logic [QW-1:0]    q_cur;
  logic [15:0]      sigma_cur;
  logic [31:0]      thresh_cur;
  logic [31:0]      rate_q8;
  logic [RW-1:0]    rate_cur;
  logic             above_mean;

  always_comb begin
    longint unsigned prod;
    prod       = 64'(qlen_sum[idx]) * RECIP;
    q_cur      = QW'(prod >> RSH);
    sigma_cur  = 16'((32'(sig_snap[idx]) << 8) / W);
    thresh_cur = ((ALPHA_STARVE_Q8 * 32'(q_cur)) >> 8) + BETA_STARVE_Q8;
    if (thresh_cur > GAMMA_STARVE_Q8) thresh_cur = GAMMA_STARVE_Q8;
    rate_q8    = ((ALPHA_THR_Q8 * 32'(qavg[idx])) >> 8) + BETA_THR_Q8;
    if (rate_q8 > GAMMA_THR_Q8) rate_q8 = GAMMA_THR_Q8;
    rate_cur   = RW'((rate_q8 * MAX_COUNT) >> 8);
    above_mean = (64'(qavg[idx]) * 64'(N_NODES)) > 64'(qsum);
  end

  assign period_end = (32'(cyc) == PERIOD - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc             <= '0;
      state           <= S_IDLE;
      idx             <= '0;
      qsum            <= '0;
      congested       <= 1'b0;
      throttle_active <= 1'b0;
      update_done     <= 1'b0;
      for (int i = 0; i < N_NODES; i++) begin
        sig_snap[i]      <= '0;
        qavg[i]          <= '0;
        throttle_rate[i] <= '0;
      end
    end else begin
      cyc         <= period_end ? '0 : cyc + 1'b1;
      update_done <= 1'b0;
      unique case (state)
        S_IDLE: if (period_end) state <= S_SNAP;
        S_SNAP: begin
          for (int i = 0; i < N_NODES; i++) sig_snap[i] <= starve_cnt[i];
          idx       <= '0;
          qsum      <= '0;
          congested <= 1'b0;
          state     <= S_DETECT;
        end
        S_DETECT: begin
          qavg[idx] <= q_cur;
          qsum      <= qsum + SQW'(q_cur);
          if (32'(sigma_cur) > thresh_cur) congested <= 1'b1;
          if (32'(idx) == N_NODES - 1) begin
            idx   <= '0;
            state <= S_RATE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_RATE: begin
          throttle_active <= congested & enable;
          throttle_rate[idx] <= (enable && congested && above_mean) ? rate_cur : '0;
          if (32'(idx) == N_NODES - 1) begin
            idx         <= '0;
            update_done <= 1'b1;
            state       <= S_IDLE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
