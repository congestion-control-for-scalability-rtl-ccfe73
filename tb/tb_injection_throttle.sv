// Self-checking testbench of injection_throttle at its default granularity
// (MAX_COUNT = 128). For several rates it drives random want/link_free
// patterns and checks every cycle against a reference counter: allow, blocked
// and starved must match, and over each run of opportunities exactly `rate`
// out of every 128 must be blocked.
module tb_injection_throttle;
  localparam int MC = 128;
  logic clk = 0, rst_n = 0;
  logic [6:0] rate = '0;
  logic want = 0, link_free = 0;
  logic allow, blocked, starved;
  int checks = 0, failures = 0;
  int ref_cnt;

  injection_throttle #(.MAX_COUNT(MC)) dut (.clk, .rst_n, .rate, .want, .link_free,
                                            .allow, .blocked, .starved);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_rate(int r);
    int opps, nblk, nxt;
    bit e_allow;
    rate = 7'(r);
    opps = 0; nblk = 0;
    // align the reference with the hardware: reset the counter
    rst_n = 0; @(posedge clk); #1 rst_n = 1; ref_cnt = 0;
    while (opps < 4 * MC) begin
      want      = ($urandom % 4) != 0;
      link_free = ($urandom % 3) != 0;
      #1;
      nxt     = (ref_cnt == MC - 1) ? 0 : ref_cnt + 1;
      e_allow = want && link_free && (nxt >= r);
      checks++;
      if (allow != e_allow || blocked != (want && link_free && !e_allow) ||
          starved != (want && !e_allow)) begin
        failures++;
        if (failures < 10) $display("rate %0d: allow=%0b exp=%0b", r, allow, e_allow);
      end
      if (want && link_free) begin
        opps++;
        if (!e_allow) nblk++;
        ref_cnt = nxt;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (nblk != 4 * r) begin
      failures++;
      $display("rate %0d: %0d of %0d opportunities blocked, expected %0d", r, nblk, opps, 4*r);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_rate(0);
    run_rate(1);
    run_rate(57);   // 0.45 of 128
    run_rate(96);   // 0.75 of 128
    run_rate(127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
