// End-to-end testbench of bless_cc_noc at its default parameters (4x4 mesh,
// 16-flit injection queues, 128-cycle starvation window, 10,000-cycle control
// period).
//
// Every node carries a random traffic source: packets of 1 flit (request) or
// 3 flits (cache block), to uniformly random other nodes. Half of the nodes
// are network-heavy, the rest light, as in a mixed workload. The run has
// four phases:
//   0. a single packet crosses the empty mesh corner to corner; its latency
//      must be 3 cycles per hop plus 1 (18 + 1 for 6 hops);
//   1. light load with the controller enabled: the controller must not throttle;
//   2. heavy load with the controller disabled (baseline) for two periods;
//   3. heavy load with the controller enabled for three periods;
//   then all sources stop and the network must drain.
// A scoreboard checks that every flit is delivered exactly once, to its
// destination, with its header and payload intact. It counts how often each
// mechanism happened - deflection, ejection conflict, starvation, throttled
// injection, full injection queue, congestion detected, a node throttled,
// controller update - and fails for any that never did. It also checks that
// while throttling is active only nodes with above-average queues are
// throttled, and that light nodes are never throttled more than heavy ones on
// average.
module tb_bless_cc_noc;
  import bless_pkg::*;
  localparam int MX = 4, MY = 4, N = MX * MY, PERIOD = 10000;

  logic clk = 0, rst_n = 0, cc_enable = 1;
  logic               src_valid [N];
  logic               src_ready [N];
  logic [COORD_W-1:0] src_dst_x [N];
  logic [COORD_W-1:0] src_dst_y [N];
  logic               src_last  [N];
  logic [DATA_W-1:0]  src_data  [N];
  flit_t              ej_flit   [N];
  logic               period_end, throttle_active, cc_update_done;
  logic [6:0]         throttle_rate [N];
  logic [7:0]         starve_cnt [N];
  logic               ev_starved [N], ev_throttled [N], ev_injected [N], ev_ej_conflict [N];
  logic [2:0]         ev_deflect [N];
  logic [4:0]         qlen [N];

  bless_cc_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ traffic sources
  int  rate_pct [N];     // packet start probability per cycle, percent
  bit  heavy    [N];
  int  rem      [N];     // flits left in current packet
  int  len      [N];
  int  seqn     [N];
  int  pktn     [N];
  int  dstn     [N];
  bit  sources_on = 0;
  localparam int HOTSPOT = 5;         // a light node, e.g. a shared resource
  int  hv_pct = 60, lt_pct = 12, hs_pct = 0;

  // scoreboard: key {src, pkt, seq} -> destination node
  int  sb [int];
  longint n_sent = 0, n_recv = 0;
  longint delivered_phase = 0;

  function automatic int fkey(int s, int p, int q);
    return (s << 16) | ((p & 255) << 8) | q;
  endfunction

  // event counters
  longint c_defl = 0, c_ejc = 0, c_starve = 0, c_thr = 0, c_qfull = 0;
  longint c_active = 0, c_update = 0, c_nodes_thr = 0;
  longint thr_heavy = 0, thr_light = 0;

  // drive sources on the negative edge so the DUT sees stable inputs
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (rem[n] == 0 && sources_on && int'($urandom % 100) < rate_pct[n]) begin
        int d;
        d = int'($urandom % (N - 1));
        if (d >= n) d++;
        if (heavy[n] && int'($urandom % 100) < hs_pct) d = HOTSPOT;
        dstn[n] = d;
        len[n]  = ($urandom % 2 == 0) ? 1 : 3;
        rem[n]  = len[n];
        seqn[n] = 0;
      end
      src_valid[n] = (rem[n] > 0);
      src_dst_x[n] = COORD_W'(dstn[n] % MX);
      src_dst_y[n] = COORD_W'(dstn[n] / MX);
      src_last[n]  = (rem[n] == 1);
      src_data[n]  = {32'(n), 32'(pktn[n]), 32'(seqn[n]), 32'hC0FFEE};
    end
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        // accepted source flits
        if (src_valid[n] && src_ready[n]) begin
          int k;
          k = fkey(n, pktn[n], seqn[n]);
          checks++;
          if (sb.exists(k)) begin failures++; $display("packet number reused in flight"); end
          sb[k] = dstn[n];
          n_sent++;
          seqn[n]++;
          rem[n]--;
          if (rem[n] == 0) pktn[n]++;
        end
        if (src_valid[n] && !src_ready[n]) c_qfull++;
        // ejected flits
        if (ej_flit[n].valid) begin
          int s, k;
          s = int'(ej_flit[n].src_y) * MX + int'(ej_flit[n].src_x);
          k = fkey(s, int'(ej_flit[n].pkt), int'(ej_flit[n].seq));
          checks++;
          if (!sb.exists(k)) begin
            failures++;
            if (failures < 10) $display("unexpected flit at node %0d", n);
          end else begin
            if (sb[k] != n) begin failures++; $display("flit delivered to wrong node"); end
            sb.delete(k);
          end
          checks++;
          if (ej_flit[n].data[127:96] != 32'(s) || ej_flit[n].data[31:0] != 32'hC0FFEE ||
              ej_flit[n].data[39:32] != 8'(ej_flit[n].seq) || ej_flit[n].data[71:64] != ej_flit[n].pkt) begin
            failures++;
            if (failures < 10) $display("payload mismatch at node %0d", n);
          end
          n_recv++;
          delivered_phase++;
        end
        c_defl   += longint'(ev_deflect[n]);
        c_ejc    += longint'(ev_ej_conflict[n]);
        c_starve += longint'(ev_starved[n]);
        c_thr    += longint'(ev_throttled[n]);
        if (throttle_rate[n] != 0) begin
          if (heavy[n]) thr_heavy++; else thr_light++;
        end
      end
      if (throttle_active) c_active++;
      if (cc_update_done) begin
        int nthr;
        longint qs;
        c_update++;
        nthr = 0;
        for (int n = 0; n < N; n++) if (throttle_rate[n] != 0) nthr++;
        c_nodes_thr += nthr;
        $display("cycle %0d: controller update, active=%0b, %0d nodes throttled",
                 cycle, throttle_active, nthr);
        for (int n = 0; n < N; n++)
          $display("  node %0d sigma %0d/128 qavg_q8 %0d rate %0d", n, dut.u_cc.sig_snap[n], dut.u_cc.qavg[n], throttle_rate[n]);
        // throttled nodes must be the ones with above-mean queue length,
        // i.e. never all of them
        checks++;
        if (nthr == N) begin failures++; $display("all nodes throttled"); end
        checks++;
        if (!throttle_active && nthr != 0) begin failures++; $display("rates set while inactive"); end
      end
    end
  end

  task automatic wait_cycles(int c);
    repeat (c) @(posedge clk);
  endtask


  initial begin
    longint base_tp, cc_tp;
    int hs_pct_arg;
    if (!$value$plusargs("heavy=%d", hv_pct)) hv_pct = 60;
    if (!$value$plusargs("light=%d", lt_pct)) lt_pct = 12;
    if (!$value$plusargs("hotspot=%d", hs_pct_arg)) hs_pct_arg = 40;
    for (int n = 0; n < N; n++) begin
      rem[n] = 0; len[n] = 0; seqn[n] = 0; pktn[n] = 0; dstn[n] = (n + 1) % N;
      heavy[n] = (n % 2 == 0);
      rate_pct[n] = 0;
      src_valid[n] = 0; src_dst_x[n] = '0; src_dst_y[n] = '0; src_last[n] = 0; src_data[n] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase 0: single packet, corner to corner, empty network
    begin
      longint t_inj, t_ej;
      @(negedge clk);
      rem[0] = 1; dstn[0] = N - 1; seqn[0] = 0;
      t_inj = -1; t_ej = -1;
      for (int c = 0; c < 60; c++) begin
        @(posedge clk); #1;
        if (ev_injected[0] && t_inj < 0) t_inj = cycle;
        if (ej_flit[N-1].valid) t_ej = cycle;
      end
      checks++;
      if (t_ej - t_inj != 3 * 6 + 1) begin
        failures++; $display("corner-to-corner latency %0d, expected 19", t_ej - t_inj);
      end
      $display("corner-to-corner latency: %0d cycles for 6 hops", t_ej - t_inj);
    end

    // phase 1: light load, controller enabled, for one full period
    for (int n = 0; n < N; n++) rate_pct[n] = 2;
    sources_on = 1;
    @(posedge cc_update_done);
    wait_cycles(PERIOD);
    checks++;
    if (throttle_active) begin failures++; $display("throttling under light load"); end

    // phase 2: heavy load, baseline (controller disabled)
    cc_enable = 0;
    hs_pct = hs_pct_arg;
    for (int n = 0; n < N; n++) rate_pct[n] = heavy[n] ? hv_pct : lt_pct;
    @(posedge cc_update_done);
    delivered_phase = 0;
    wait_cycles(PERIOD);
    base_tp = delivered_phase;

    // phase 3: heavy load, controller enabled
    cc_enable = 1;
    @(posedge cc_update_done);
    wait_cycles(PERIOD);
    @(posedge cc_update_done);
    delivered_phase = 0;
    wait_cycles(PERIOD);
    cc_tp = delivered_phase;
    $display("delivered flits per period: baseline %0d, with congestion control %0d", base_tp, cc_tp);

    // drain
    sources_on = 0;
    wait_cycles(3000);
    checks++;
    if (sb.size() != 0) begin failures++; $display("%0d flits never delivered", sb.size()); end
    checks++;
    if (n_sent != n_recv) begin failures++; $display("sent %0d received %0d", n_sent, n_recv); end

    $display("flits sent %0d received %0d", n_sent, n_recv);
    $display("mechanisms: deflections=%0d eject_conflicts=%0d starved_cycles=%0d throttled=%0d",
             c_defl, c_ejc, c_starve, c_thr);
    $display("            queue_full_stalls=%0d active_cycles=%0d updates=%0d throttled_node_periods=%0d",
             c_qfull, c_active, c_update, c_nodes_thr);
    $display("            throttled node-cycles heavy=%0d light=%0d", thr_heavy, thr_light);
    if (c_defl == 0)      begin failures++; $display("no deflection happened"); end
    if (c_ejc == 0)       begin failures++; $display("no ejection conflict happened"); end
    if (c_starve == 0)    begin failures++; $display("no starvation happened"); end
    if (c_thr == 0)       begin failures++; $display("no throttled injection happened"); end
    if (c_qfull == 0)     begin failures++; $display("injection queue never filled"); end
    if (c_active == 0)    begin failures++; $display("congestion never detected"); end
    if (c_update == 0)    begin failures++; $display("controller never updated"); end
    if (c_nodes_thr == 0) begin failures++; $display("no node was throttled"); end
    checks += 8;
    checks++;
    if (thr_light > thr_heavy) begin failures++; $display("light nodes throttled more than heavy ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
