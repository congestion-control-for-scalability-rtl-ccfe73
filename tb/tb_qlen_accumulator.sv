// Self-checking testbench of qlen_accumulator: random queue lengths over
// periods of varying length; after each period_end the reported sum must equal
// the sum computed by the testbench and stay constant through the next period.
module tb_qlen_accumulator;
  logic clk = 0, rst_n = 0, period_end = 0;
  logic [4:0] qlen = '0;
  logic [23:0] qlen_sum;
  int checks = 0, failures = 0;

  qlen_accumulator #(.QLEN_W(5), .SUM_W(24)) dut (.clk, .rst_n, .qlen, .period_end, .qlen_sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, prev;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    prev = 0;
    for (int p = 0; p < 20; p++) begin
      int len;
      len = 50 + int'($urandom % 2000);
      sum = 0;
      for (int c = 0; c < len; c++) begin
        qlen       = 5'($urandom % 17);
        period_end = (c == len - 1);
        sum       += int'(qlen);
        #1;
        checks++;
        if (int'(qlen_sum) != prev) begin
          failures++;
          if (failures < 10) $display("held sum %0d expected %0d", qlen_sum, prev);
        end
        @(posedge clk); #1;
      end
      period_end = 0;
      checks++;
      if (int'(qlen_sum) != sum) begin
        failures++;
        $display("period %0d: sum %0d expected %0d", p, qlen_sum, sum);
      end
      prev = sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
