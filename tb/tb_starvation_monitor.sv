// Self-checking testbench of starvation_monitor at its default window (128).
// Drives random starved bits in phases of different density, including a run
// long enough to fill the window, and compares the counter every cycle with a
// sliding-window sum kept independently in the testbench.
module tb_starvation_monitor;
  localparam int W = 128;
  logic clk = 0, rst_n = 0, starved = 0;
  logic [$clog2(W+1)-1:0] starve_cnt;
  int checks = 0, failures = 0;
  bit hist [$];
  int exp_cnt;

  starvation_monitor #(.W(W)) dut (.clk, .rst_n, .starved, .starve_cnt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit s);
    starved = s;
    @(posedge clk);
    #1;
    hist.push_back(s);
    if (hist.size() > W) void'(hist.pop_front());
    exp_cnt = 0;
    foreach (hist[i]) exp_cnt += int'(hist[i]);
    checks++;
    if (int'(starve_cnt) != exp_cnt) begin
      failures++;
      if (failures < 10) $display("mismatch: cnt=%0d expected=%0d", starve_cnt, exp_cnt);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phases: density 10%, 50%, all ones, 90%, all zeros
    for (int i = 0; i < 1000; i++) step(($urandom % 10) == 0);
    for (int i = 0; i < 1000; i++) step(($urandom % 2) == 0);
    for (int i = 0; i < 300;  i++) step(1'b1);
    checks++;
    if (int'(starve_cnt) != W) begin failures++; $display("full window not reached"); end
    for (int i = 0; i < 1000; i++) step(($urandom % 10) != 0);
    for (int i = 0; i < 300;  i++) step(1'b0);
    checks++;
    if (starve_cnt != 0) begin failures++; $display("window did not drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
