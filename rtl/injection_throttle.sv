// Injection throttle of one node.
//
// A throttled node is denied a fraction r of its injection opportunities. An
// opportunity is a cycle in which the node has a flit to inject and the router
// has a free output link. A counter modulo MAX_COUNT advances on every
// opportunity; the opportunity is allowed when the counter is at or above
// rate (rate = r * MAX_COUNT), and blocked otherwise, so exactly rate out of
// every MAX_COUNT opportunities are blocked, in one run at the start of each
// counter wrap.
//
// starved is high when the node tries to inject and cannot, for lack of a free
// link or because of the throttle; it feeds the starvation monitor.
// All outputs are combinational from the inputs and the counter, so the node
// can present the flit to the router in the same cycle. Reset is synchronous,
// active low.
//
// The counter-and-comparator structure and the 7-bit granularity
// (MAX_COUNT = 128) follow the document. The document's comparison is
// "count > rate", which would block one opportunity in 128 even at rate 0;
// this design uses "count >= rate" so that rate 0 never blocks.
module injection_throttle #(
  parameter int unsigned MAX_COUNT = 128,
  localparam int unsigned CW = $clog2(MAX_COUNT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] rate,        // blocked opportunities per MAX_COUNT
  input  logic          want,        // node has a flit waiting
  input  logic          link_free,   // router can accept a flit this cycle
  output logic          allow,       // inject now
  output logic          blocked,     // an opportunity was taken away
  output logic          starved      // wanted but could not inject
);

  logic [CW-1:0] inj_count;
  logic [CW-1:0] next_count;

  always_comb begin
    next_count = (32'(inj_count) == MAX_COUNT - 1) ? '0 : inj_count + 1'b1;
    allow      = want && link_free && (next_count >= rate);
    blocked    = want && link_free && !(next_count >= rate);
    starved    = want && !allow;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      inj_count <= '0;
    else if (want && link_free)
      inj_count <= next_count;
  end

endmodule
