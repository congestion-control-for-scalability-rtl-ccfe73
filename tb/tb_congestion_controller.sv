// Self-checking testbench of congestion_controller with 16 nodes and a short
// period of 256 cycles (so that the average queue length in Q8 equals the
// queue-length sum, which keeps the reference model simple). Each period the
// testbench sets random starvation counts and queue-length sums, in a mix of
// uncongested, lightly and heavily congested cases, and after update_done
// compares every throttle rate and throttle_active with the algorithm
// evaluated here. It also checks that update_done comes exactly 2*16+2 cycles
// after period_end, that period_end repeats every 256 cycles and that
// enable = 0 holds every rate at 0.
module tb_congestion_controller;
  localparam int N = 16, P = 256, W = 128;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [7:0]  starve_cnt [N];
  logic [23:0] qlen_sum   [N];
  logic        period_end, throttle_active, update_done;
  logic [6:0]  throttle_rate [N];
  int checks = 0, failures = 0;
  int n_active = 0, n_idle = 0, n_thr_nodes = 0;

  congestion_controller #(.N_NODES(N), .PERIOD(P), .W(W)) dut (
    .clk, .rst_n, .enable, .starve_cnt, .qlen_sum, .period_end,
    .throttle_rate, .throttle_active, .update_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (P * 60) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imin(int a, int b);
    return (a < b) ? a : b;
  endfunction

  task automatic new_inputs(int kind);
    for (int i = 0; i < N; i++) begin
      qlen_sum[i]   = 24'($urandom % (17 * 256));      // average 0..17 flits
      starve_cnt[i] = 8'($urandom % 40);                // sigma < 0.32
    end
    if (kind == 1) starve_cnt[$urandom % N] = 8'(W);    // one node fully starved
    if (kind == 2) for (int i = 0; i < N; i++) starve_cnt[i] = 8'(60 + $urandom % 69);
  endtask

  initial begin
    int t_pe, t_cyc, last_pe, kind;
    int exp_rate [N];
    bit exp_cong;
    longint sumq;
    for (int i = 0; i < N; i++) begin starve_cnt[i] = '0; qlen_sum[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    t_cyc = 0; last_pe = -1;
    for (int p = 0; p < 40; p++) begin
      kind   = p % 4;                 // 0: none, 1: one node, 2: many, 3: random
      enable = (p % 10) != 9;
      new_inputs(kind == 3 ? int'($urandom % 3) : kind);
      // wait for period_end
      while (!period_end) begin @(posedge clk); #1; t_cyc++; end
      t_pe = t_cyc;
      if (last_pe >= 0) begin
        checks++;
        if (t_pe - last_pe != P) begin failures++; $display("period %0d", t_pe - last_pe); end
      end
      last_pe = t_pe;
      // reference
      exp_cong = 0; sumq = 0;
      for (int i = 0; i < N; i++) begin
        int q, sig, th;
        q   = int'(qlen_sum[i]);
        sig = int'(starve_cnt[i]) * 256 / W;
        th  = imin((51 * q) / 256 + 90, 205);
        if (sig > th) exp_cong = 1;
        sumq += longint'(q);
      end
      for (int i = 0; i < N; i++) begin
        int q;
        q = int'(qlen_sum[i]);
        if (enable && exp_cong && longint'(q) * N > sumq)
          exp_rate[i] = imin((51 * q) / 256 + 115, 192) * 128 / 256;
        else
          exp_rate[i] = 0;
      end
      while (!update_done) begin @(posedge clk); #1; t_cyc++; end
      checks++;
      if (t_cyc - t_pe != 2 * N + 2) begin
        failures++; $display("update latency %0d", t_cyc - t_pe);
      end
      checks++;
      if (throttle_active != (exp_cong && enable)) begin
        failures++; $display("period %0d: active %0b expected %0b", p, throttle_active, exp_cong);
      end
      if (throttle_active) n_active++; else n_idle++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(throttle_rate[i]) != exp_rate[i]) begin
          failures++;
          if (failures < 20) $display("period %0d node %0d: rate %0d expected %0d",
                                      p, i, throttle_rate[i], exp_rate[i]);
        end
        if (exp_rate[i] != 0) n_thr_nodes++;
      end
      @(posedge clk); #1; t_cyc++;
    end
    checks++;
    if (n_active == 0 || n_idle == 0 || n_thr_nodes == 0) begin
      failures++; $display("coverage: active %0d idle %0d throttled %0d", n_active, n_idle, n_thr_nodes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
