// One node of the bufferless mesh: network interface plus router.
//
// The attached core (or cache slice) hands flits to the node over a
// valid/ready stream, marking the last flit of each packet. The network
// interface fills in the header (source coordinates, packet number, sequence
// number, age 0) and puts the flit into the injection queue. Every cycle the
// head of the queue is offered to the router: it enters the network only if
// the router has a free output link and the injection throttle allows it.
// A cycle in which a waiting flit could not enter counts as starved.
//
// Besides the router, the node holds the per-node hardware of the congestion
// control: the starvation monitor (window of W cycles), the injection throttle
// (rate set by the central controller) and the queue-length monitor whose sum
// the controller reads once per period.
//
// Timing: a flit accepted on src_* can be injected at the earliest in the next
// cycle. An injected flit joins the router's second stage and is on an output
// link in the cycle after injection; flits passing through take two cycles.
// Ejected flits appear on ej_flit, one per cycle at most, without
// back-pressure: the receiver must take every ejected flit. Flits of a packet
// may arrive out of order; reassembly is left to the receiver.
//
// The document gives the node's structure (core, injection queue, router,
// starvation and throttle hardware). The stream interface, header numbering,
// and lack of ejection back-pressure are this design's choices.
module bless_node
  import bless_pkg::*;
#(
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter int unsigned X           = 1,
  parameter int unsigned Y           = 1,
  parameter int unsigned QDEPTH      = 16,
  parameter int unsigned W           = 128,
  parameter int unsigned MAX_COUNT   = 128,
  parameter int unsigned SUM_W       = 24,
  localparam int unsigned SCW = $clog2(W + 1),
  localparam int unsigned RW  = $clog2(MAX_COUNT),
  localparam int unsigned QCW = $clog2(QDEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // flit stream from the core
  input  logic               src_valid,
  output logic               src_ready,
  input  logic [COORD_W-1:0] src_dst_x,
  input  logic [COORD_W-1:0] src_dst_y,
  input  logic               src_last,
  input  logic [DATA_W-1:0]  src_data,
  // flits delivered to this node
  output flit_t              ej_flit,
  // mesh links, indexed N=0, E=1, S=2, W=3
  input  flit_t              link_in  [NUM_DIRS],
  output flit_t              link_out [NUM_DIRS],
  // congestion control
  input  logic [RW-1:0]      throttle_rate,
  input  logic               period_end,
  output logic [SCW-1:0]     starve_cnt,
  output logic [SUM_W-1:0]   qlen_sum,
  // per-cycle events, for statistics
  output logic               ev_starved,
  output logic               ev_throttled,
  output logic               ev_injected,
  output logic [2:0]         ev_deflect,
  output logic               ev_ej_conflict,
  output logic [QCW-1:0]     qlen
);

  // ------------------------------------------------------- packet numbering
  logic [PKT_W-1:0] pkt_no;
  logic [SEQ_W-1:0] seq_no;
  flit_t            new_flit;
  logic             q_full, q_empty;
  flit_t            q_head;

  assign src_ready = !q_full;

  always_comb begin
    new_flit       = '0;
    new_flit.valid = 1'b1;
    new_flit.dst_x = src_dst_x;
    new_flit.dst_y = src_dst_y;
    new_flit.src_x = COORD_W'(X);
    new_flit.src_y = COORD_W'(Y);
    new_flit.pkt   = pkt_no;
    new_flit.seq   = seq_no;
    new_flit.last  = src_last;
    new_flit.age   = '0;
    new_flit.data  = src_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_no <= '0;
      seq_no <= '0;
    end else if (src_valid && src_ready) begin
      if (src_last) begin
        pkt_no <= pkt_no + 1'b1;
        seq_no <= '0;
      end else begin
        seq_no <= seq_no + 1'b1;
      end
    end
  end

  // -------------------------------------------------------- injection path
  logic  inj_free, allow, blocked, starved;
  flit_t inj_flit;

  injection_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .push     (src_valid && src_ready),
    .in_flit  (new_flit),
    .full     (q_full),
    .pop      (allow),
    .out_flit (q_head),
    .empty    (q_empty),
    .count    (qlen)
  );

  injection_throttle #(.MAX_COUNT(MAX_COUNT)) u_throttle (
    .clk, .rst_n,
    .rate      (throttle_rate),
    .want      (!q_empty),
    .link_free (inj_free),
    .allow     (allow),
    .blocked   (blocked),
    .starved   (starved)
  );

  always_comb begin
    inj_flit       = q_head;
    inj_flit.valid = allow;
  end

  bless_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(X), .Y(Y)) u_router (
    .clk, .rst_n,
    .in_flit     (link_in),
    .out_flit    (link_out),
    .inj_free    (inj_free),
    .inj_flit    (inj_flit),
    .ej_flit     (ej_flit),
    .defl_cnt    (ev_deflect),
    .ej_conflict (ev_ej_conflict)
  );

  // ------------------------------------------------ congestion monitoring
  starvation_monitor #(.W(W)) u_starve (
    .clk, .rst_n,
    .starved    (starved),
    .starve_cnt (starve_cnt)
  );

  qlen_accumulator #(.QLEN_W(QCW), .SUM_W(SUM_W)) u_qlen (
    .clk, .rst_n,
    .qlen       (qlen),
    .period_end (period_end),
    .qlen_sum   (qlen_sum)
  );

  assign ev_starved   = starved;
  assign ev_throttled = blocked;
  assign ev_injected  = allow;

endmodule
