// Windowed starvation-rate monitor of one node.
//
// A node is starved in a cycle when it tries to inject a flit but cannot,
// either because no output link is free or because its throttle blocks it. The
// starvation rate is the fraction of the last W cycles that were starved. The
// monitor keeps the last W starved bits in a shift register and a counter of
// the ones among them: each cycle the counter goes up by the bit entering the
// window and down by the bit leaving it, so it always holds the window sum.
// The rate is starve_cnt / W; the central controller does that division.
//
// Timing: the starved bit of cycle t is included in starve_cnt from cycle t+1.
// Reset (synchronous, active low) empties the window.
//
// The W-bit shift register and up/down counter with W = 128 follow the
// document's hardware description; the counter has one bit more than log2(W)
// so that a fully starved window (W ones) can be represented.
module starvation_monitor #(
  parameter int unsigned W = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 starved,
  output logic [$clog2(W+1)-1:0] starve_cnt
);

  logic [W-1:0] window;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window     <= '0;
      starve_cnt <= '0;
    end else begin
      window <= {window[W-2:0], starved};
      if (starved && !window[W-1])
        starve_cnt <= starve_cnt + 1'b1;
      else if (!starved && window[W-1])
        starve_cnt <= starve_cnt - 1'b1;
    end
  end

endmodule
