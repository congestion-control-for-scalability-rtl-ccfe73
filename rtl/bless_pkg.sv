// Shared types and constants of the bufferless (BLESS-style) mesh with
// source-throttling congestion control.
//
// A flit is the atomic unit of traffic: one link-width payload plus the header
// fields that every flit of a bufferless network must carry, because flits of
// one packet travel independently and may take different paths. The header
// holds the destination and source coordinates, a packet number and the flit's
// sequence number in its packet, and an age field. The age starts at 0 when the
// flit is injected and grows by one at every hop; routers give the oldest flit
// first choice of output port and break ties with the source and packet fields
// so that all flits in the network are totally ordered.
//
// Payload width 128 bits follows the link width named as typical for on-chip
// networks. Coordinate width 6 bits covers meshes up to 64x64 (4096 nodes), the
// largest configuration evaluated. Age, packet and sequence widths are this
// design's own choice.
package bless_pkg;

  localparam int unsigned DATA_W   = 128;  // link (flit payload) width
  localparam int unsigned COORD_W  = 6;    // x or y coordinate, up to 64x64
  localparam int unsigned AGE_W    = 8;    // hop-count age, saturating
  localparam int unsigned PKT_W    = 8;    // packet number per source
  localparam int unsigned SEQ_W    = 3;    // flit index in its packet

  // Router link ports: the four mesh directions index the link arrays;
  // y grows towards the south, x towards the east.
  localparam int unsigned P_NORTH = 0;
  localparam int unsigned P_EAST  = 1;
  localparam int unsigned P_SOUTH = 2;
  localparam int unsigned P_WEST  = 3;

  localparam int unsigned NUM_DIRS = 4;

  typedef struct packed {
    logic               valid;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [PKT_W-1:0]   pkt;
    logic [SEQ_W-1:0]   seq;
    logic               last;
    logic [AGE_W-1:0]   age;
    logic [DATA_W-1:0]  data;
  } flit_t;

  // Priority key of a flit: larger key = higher priority. Older flits win; on
  // equal age the lower source coordinate, then the lower packet number, then
  // the lower sequence number wins. The key is unique for every flit in flight
  // as long as a source does not reuse a packet number while its flits live.
  localparam int unsigned KEY_W = AGE_W + 2*COORD_W + PKT_W + SEQ_W;

  function automatic logic [KEY_W-1:0] prio_key(flit_t f);
    return {f.age, ~f.src_y, ~f.src_x, ~f.pkt, ~f.seq};
  endfunction

endpackage
