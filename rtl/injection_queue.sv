// Injection (request) queue of one node: a FIFO of flits waiting to enter the
// bufferless network, since a flit that finds no free output link must wait at
// the node rather than inside the router.
//
// A circular buffer of DEPTH entries with write and read pointers and an
// occupancy counter. push writes in_flit when the queue is not full; pop
// removes the head (out_flit, valid while not empty). Both may happen in one
// cycle. count is the queue length that the congestion controller uses as its
// estimate of the node's network intensity (flits per instruction).
// Timing: a pushed flit is visible at the head the next cycle. Reset is
// synchronous, active low, and empties the queue.
//
// The queue itself and the use of its length follow the document; the depth
// (16 flits) and the FIFO organisation are this design's choices.
module injection_queue
  import bless_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  flit_t         in_flit,
  output logic          full,
  input  logic          pop,
  output flit_t         out_flit,
  output logic          empty,
  output logic [CW-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;

  assign full     = (32'(count) == DEPTH);
  assign empty    = (count == '0);
  assign out_flit = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
