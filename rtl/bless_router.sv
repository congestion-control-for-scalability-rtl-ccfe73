// Bufferless deflection router (FLIT-BLESS style) for one node of a 2D mesh.
//
// Every flit that enters the router leaves it two cycles later: the router has
// no buffers, so a flit that loses arbitration for the port it wants is sent
// out on another free port (deflected) instead of waiting. This works because
// a mesh router has as many outputs as inputs, and because a new flit from the
// node is injected only when, after ejection, fewer flits are present than
// there are output links.
//
// Reset is synchronous and active low; it clears all valid bits.
//
// Pipeline (router latency 2 cycles, as in the evaluated configuration):
//   stage 1  the flits arriving on the four link inputs are latched.
//   stage 2  (combinational, then registered into the output links)
//            - ejection: of the latched flits addressed to this node, the one
//              with the highest priority leaves on the ejection port; at most
//              one flit is ejected per cycle, others addressed here are
//              deflected and come back later;
//            - injection: inj_free tells the node whether an output link is
//              left over; if it is, the node may present one flit on inj_flit;
//            - oldest-first allocation: flits are taken in decreasing priority
//              (age, then source and packet fields) and each gets its X-Y
//              routing port if still free, else the other productive port, else
//              the lowest-numbered free link (deflection);
//            - the age field of every forwarded flit grows by one (saturating).
//
// Ports that would leave the mesh are switched off from the node coordinates,
// so a corner router has two links and an edge router three; no flit is ever
// sent off the mesh.
//
// The document gives X-Y routing, oldest-first arbitration with a total order,
// deflection and the age rule. The second-choice productive port, the exact
// tie-break order, the single ejection port and the saturating 8-bit age are
// this design's choices.
module bless_router
  import bless_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned X      = 1,
  parameter int unsigned Y      = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // mesh links, indexed N=0, E=1, S=2, W=3
  input  flit_t in_flit  [NUM_DIRS],
  output flit_t out_flit [NUM_DIRS],
  // injection from the node (same cycle handshake: valid only if inj_free)
  output logic  inj_free,
  input  flit_t inj_flit,
  // ejection to the node, registered
  output flit_t ej_flit,
  // statistics, registered with the outputs
  output logic [2:0] defl_cnt,      // flits sent on a non-productive port
  output logic       ej_conflict    // more than one flit wanted to eject
);

  localparam logic [NUM_DIRS-1:0] PORT_EN = {
    (X > 0),             // west
    (Y < MESH_Y - 1),    // south
    (X < MESH_X - 1),    // east
    (Y > 0)              // north
  };
  localparam int unsigned N_PORTS = 32'(PORT_EN[0]) + 32'(PORT_EN[1]) +
                                    32'(PORT_EN[2]) + 32'(PORT_EN[3]);
  localparam int unsigned NC = NUM_DIRS + 1;
  localparam int XI = int'(X);
  localparam int YI = int'(Y);   // candidates: 4 links + inject

  // ---------------------------------------------------------------- stage 1
  flit_t s1 [NUM_DIRS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_DIRS; p++) s1[p] <= '0;
    end else begin
      for (int p = 0; p < NUM_DIRS; p++) begin
        s1[p]       <= in_flit[p];
        s1[p].valid <= in_flit[p].valid & PORT_EN[p];
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  function automatic logic [NUM_DIRS-1:0] productive(flit_t f);
    logic [NUM_DIRS-1:0] m;
    m = '0;
    if (int'(f.dst_x) > XI) m[P_EAST]  = 1'b1;
    if (int'(f.dst_x) < XI) m[P_WEST]  = 1'b1;
    if (int'(f.dst_y) > YI) m[P_SOUTH] = 1'b1;
    if (int'(f.dst_y) < YI) m[P_NORTH] = 1'b1;
    return m;
  endfunction

  // X-Y routing: the x direction first, y once the column is reached
  function automatic logic [NUM_DIRS-1:0] xy_port(flit_t f);
    logic [NUM_DIRS-1:0] m;
    m = productive(f);
    if (m[P_EAST] | m[P_WEST]) m[P_NORTH] = 1'b0;
    if (m[P_EAST] | m[P_WEST]) m[P_SOUTH] = 1'b0;
    return m;
  endfunction

  function automatic int unsigned lowest(logic [NUM_DIRS-1:0] m);
    for (int unsigned p = 0; p < NUM_DIRS; p++) if (m[p]) return p;
    return 0;
  endfunction

  logic [NUM_DIRS-1:0] is_local;
  logic [NUM_DIRS-1:0] ej_onehot;
  logic [NUM_DIRS-1:0] rem_v;
  flit_t               ej_d;
  logic                ej_conf_d;
  flit_t               cand [NC];
  logic [NC-1:0]       cand_v;
  int unsigned         n_rem;
  int unsigned         rank [NC];
  flit_t               out_d [NUM_DIRS];
  logic [2:0]          defl_d;

  // ejection select and injection availability
  always_comb begin
    int unsigned best;
    logic        found;
    logic [1:0]  n_local;
    best    = 0;
    found   = 1'b0;
    n_local = '0;
    for (int unsigned p = 0; p < NUM_DIRS; p++) begin
      is_local[p] = s1[p].valid && (32'(s1[p].dst_x) == X) && (32'(s1[p].dst_y) == Y);
      if (is_local[p]) begin
        n_local = n_local + 2'd1;
        if (!found || prio_key(s1[p]) > prio_key(s1[best])) begin
          best  = p;
          found = 1'b1;
        end
      end
    end
    ej_onehot = '0;
    if (found) ej_onehot[best] = 1'b1;
    ej_d       = found ? s1[best] : '0;
    ej_conf_d  = (n_local > 2'd1);

    n_rem = 0;
    for (int unsigned p = 0; p < NUM_DIRS; p++) begin
      rem_v[p] = s1[p].valid & ~ej_onehot[p];
      if (rem_v[p]) n_rem++;
    end
    inj_free = (n_rem < N_PORTS);
  end

  // candidates for the output links: the flits not ejected, then the new flit
  always_comb begin
    for (int unsigned p = 0; p < NUM_DIRS; p++) begin
      cand[p]   = s1[p];
      cand_v[p] = rem_v[p];
    end
    cand[NUM_DIRS]   = inj_flit;
    cand_v[NUM_DIRS] = inj_flit.valid & inj_free;
  end

  // oldest-first ranking: rank 0 is the highest priority candidate
  always_comb begin
    for (int unsigned j = 0; j < NC; j++) begin
      rank[j] = 0;
      for (int unsigned k = 0; k < NC; k++) begin
        if (k != j && cand_v[k] &&
            ((prio_key(cand[k]) > prio_key(cand[j])) ||
             (prio_key(cand[k]) == prio_key(cand[j]) && k < j)))
          rank[j]++;
      end
    end
  end

  // port allocation in rank order
  always_comb begin
    logic [NUM_DIRS-1:0] avail;
    logic [NUM_DIRS-1:0] want_xy;
    logic [NUM_DIRS-1:0] want_any;
    int unsigned         sel;
    flit_t               f;
    avail    = PORT_EN;
    defl_d   = '0;
    f        = '0;
    want_xy  = '0;
    want_any = '0;
    sel      = 0;
    for (int unsigned p = 0; p < NUM_DIRS; p++) out_d[p] = '0;
    for (int unsigned r = 0; r < NC; r++) begin
      for (int unsigned j = 0; j < NC; j++) begin
        if (cand_v[j] && rank[j] == r) begin
          f        = cand[j];
          want_xy  = xy_port(f) & avail;
          want_any = productive(f) & avail;
          if (want_xy != '0) begin
            sel = lowest(want_xy);
          end else if (want_any != '0) begin
            sel = lowest(want_any);
          end else begin
            sel = lowest(avail);
            defl_d = defl_d + 3'd1;
          end
          avail[sel] = 1'b0;
          if (f.age != '1) f.age = f.age + 1'b1;
          out_d[sel] = f;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_DIRS; p++) out_flit[p] <= '0;
      ej_flit     <= '0;
      defl_cnt    <= '0;
      ej_conflict <= 1'b0;
    end else begin
      for (int p = 0; p < NUM_DIRS; p++) out_flit[p] <= out_d[p];
      ej_flit     <= ej_d;
      defl_cnt    <= defl_d;
      ej_conflict <= ej_conf_d;
    end
  end

  // a node may only inject into a free output link
  a_inj_free : assert property (@(posedge clk) disable iff (!rst_n)
                                inj_flit.valid |-> inj_free);

endmodule
