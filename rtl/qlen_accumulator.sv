// Queue-length monitor of one node.
//
// The controller ranks nodes by their average injection-queue length over a
// control period, used as an estimate of flits per instruction (the inverse
// of instructions per flit). This block adds the queue length of every cycle
// into an accumulator. On period_end it hands the sum of the period that ends
// with this cycle (this cycle's length included) to qlen_sum and restarts the
// accumulator; qlen_sum holds that value for the whole next period.
// Dividing by the period length, to get the average, is left to the central
// controller, which does it once per node per period.
//
// Reset is synchronous, active low. Averaging over the period is this design's
// reading of "average queue length"; the document does not give the hardware.
module qlen_accumulator #(
  parameter int unsigned QLEN_W = 5,
  parameter int unsigned SUM_W  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [QLEN_W-1:0] qlen,
  input  logic              period_end,
  output logic [SUM_W-1:0]  qlen_sum
);

  logic [SUM_W-1:0] acc;
  logic [SUM_W-1:0] acc_next;

  assign acc_next = acc + SUM_W'(qlen);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      qlen_sum <= '0;
    end else if (period_end) begin
      qlen_sum <= acc_next;
      acc      <= '0;
    end else begin
      acc      <= acc_next;
    end
  end

endmodule
