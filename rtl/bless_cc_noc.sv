// Bufferless 2D-mesh network-on-chip with application-aware source throttling.
//
// MESH_X x MESH_Y nodes (bless_node: network interface, injection queue,
// deflection router and per-node congestion hardware) are joined by
// point-to-point links of one flit per cycle and one cycle latency. A single
// central congestion controller reads every node's starvation count and
// queue-length sum once per PERIOD cycles and writes back a throttle rate per
// node. Node (x, y) has index y*MESH_X + x in all per-node port arrays; y grows
// to the south, x to the east.
//
// Timing: a flit spends 2 cycles in each router it passes and 1 on each link.
// A new flit joins the router at its second stage, so an uncontended path of
// h hops takes 3*h + 1 cycles from the injection cycle to the cycle in which
// the flit is on ej_flit at its destination (19 cycles corner to corner in
// the 4x4 mesh).
//
// The cores and shared cache slices that use the network are outside this
// module; their flit streams are the src_* and ej_flit ports. The 4x4 default
// is the smaller of the two main evaluated mesh sizes; the link register and
// the direct wiring of the controller are this design's choices.
module bless_cc_noc
  import bless_pkg::*;
#(
  parameter int unsigned MESH_X          = 4,
  parameter int unsigned MESH_Y          = 4,
  parameter int unsigned QDEPTH          = 16,
  parameter int unsigned W               = 128,
  parameter int unsigned MAX_COUNT       = 128,
  parameter int unsigned PERIOD          = 10000,
  parameter int unsigned SUM_W           = 24,
  parameter int unsigned ALPHA_STARVE_Q8 = 51,
  parameter int unsigned BETA_STARVE_Q8  = 90,
  parameter int unsigned GAMMA_STARVE_Q8 = 205,
  parameter int unsigned ALPHA_THR_Q8    = 51,
  parameter int unsigned BETA_THR_Q8     = 115,
  parameter int unsigned GAMMA_THR_Q8    = 192,
  localparam int unsigned N   = MESH_X * MESH_Y,
  localparam int unsigned SCW = $clog2(W + 1),
  localparam int unsigned RW  = $clog2(MAX_COUNT),
  localparam int unsigned QCW = $clog2(QDEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cc_enable,
  // per-node flit streams from the cores
  input  logic               src_valid [N],
  output logic               src_ready [N],
  input  logic [COORD_W-1:0] src_dst_x [N],
  input  logic [COORD_W-1:0] src_dst_y [N],
  input  logic               src_last  [N],
  input  logic [DATA_W-1:0]  src_data  [N],
  // per-node ejected flits
  output flit_t              ej_flit   [N],
  // controller state
  output logic               period_end,
  output logic               throttle_active,
  output logic               cc_update_done,
  output logic [RW-1:0]      throttle_rate [N],
  output logic [SCW-1:0]     starve_cnt    [N],
  // per-node, per-cycle events
  output logic               ev_starved     [N],
  output logic               ev_throttled   [N],
  output logic               ev_injected    [N],
  output logic [2:0]         ev_deflect     [N],
  output logic               ev_ej_conflict [N],
  output logic [QCW-1:0]     qlen           [N]
);

  flit_t            link_out [N][NUM_DIRS];  // router output registers
  flit_t            link_q   [N][NUM_DIRS];  // link pipeline registers
  flit_t            link_in  [N][NUM_DIRS];
  logic [SUM_W-1:0] qlen_sum [N];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned I = y * MESH_X + x;

      // links: north input comes from the south output of the node above, etc.
      if (y > 0)          begin : g_n assign link_in[I][P_NORTH] = link_q[I - MESH_X][P_SOUTH]; end
      else                begin : g_nz assign link_in[I][P_NORTH] = '0; end
      if (y < MESH_Y - 1) begin : g_s assign link_in[I][P_SOUTH] = link_q[I + MESH_X][P_NORTH]; end
      else                begin : g_sz assign link_in[I][P_SOUTH] = '0; end
      if (x > 0)          begin : g_w assign link_in[I][P_WEST]  = link_q[I - 1][P_EAST]; end
      else                begin : g_wz assign link_in[I][P_WEST]  = '0; end
      if (x < MESH_X - 1) begin : g_e assign link_in[I][P_EAST]  = link_q[I + 1][P_WEST]; end
      else                begin : g_ez assign link_in[I][P_EAST]  = '0; end

      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int d = 0; d < NUM_DIRS; d++) link_q[I][d] <= '0;
        end else begin
          for (int d = 0; d < NUM_DIRS; d++) link_q[I][d] <= link_out[I][d];
        end
      end

      bless_node #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y),
        .QDEPTH(QDEPTH), .W(W), .MAX_COUNT(MAX_COUNT), .SUM_W(SUM_W)
      ) u_node (
        .clk, .rst_n,
        .src_valid      (src_valid[I]),
        .src_ready      (src_ready[I]),
        .src_dst_x      (src_dst_x[I]),
        .src_dst_y      (src_dst_y[I]),
        .src_last       (src_last[I]),
        .src_data       (src_data[I]),
        .ej_flit        (ej_flit[I]),
        .link_in        (link_in[I]),
        .link_out       (link_out[I]),
        .throttle_rate  (throttle_rate[I]),
        .period_end     (period_end),
        .starve_cnt     (starve_cnt[I]),
        .qlen_sum       (qlen_sum[I]),
        .ev_starved     (ev_starved[I]),
        .ev_throttled   (ev_throttled[I]),
        .ev_injected    (ev_injected[I]),
        .ev_deflect     (ev_deflect[I]),
        .ev_ej_conflict (ev_ej_conflict[I]),
        .qlen           (qlen[I])
      );
    end
  end

  congestion_controller #(
    .N_NODES(N), .PERIOD(PERIOD), .W(W), .MAX_COUNT(MAX_COUNT), .SUM_W(SUM_W),
    .ALPHA_STARVE_Q8(ALPHA_STARVE_Q8), .BETA_STARVE_Q8(BETA_STARVE_Q8),
    .GAMMA_STARVE_Q8(GAMMA_STARVE_Q8), .ALPHA_THR_Q8(ALPHA_THR_Q8),
    .BETA_THR_Q8(BETA_THR_Q8), .GAMMA_THR_Q8(GAMMA_THR_Q8)
  ) u_cc (
    .clk, .rst_n,
    .enable          (cc_enable),
    .starve_cnt      (starve_cnt),
    .qlen_sum        (qlen_sum),
    .period_end      (period_end),
    .throttle_rate   (throttle_rate),
    .throttle_active (throttle_active),
    .update_done     (cc_update_done)
  );

endmodule
