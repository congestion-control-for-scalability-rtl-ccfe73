// Self-checking testbench of bless_node: the corner node (0,0) of a 4x4 mesh,
// whose links go east and south. Checks, against values computed here:
//   1. packetisation: a 3-flit packet to (2,0) leaves on the east link with
//      source, packet and sequence numbers, last flag, age 1 and data intact,
//      one cycle after the flit could be injected;
//   2. ejection: a flit addressed to (0,0) arriving on the east link is
//      delivered on ej_flit two cycles later;
//   3. starvation by contention: with flits passing through on both links the
//      node cannot inject, ev_starved is high and nothing is lost; the next
//      packet is numbered 1 and its flit starts again at sequence 0;
//   4. throttling: at rate 64/128 with a full queue and free links exactly
//      half of the opportunities inject, and the starvation window settles at
//      exactly 64 starved cycles out of 128;
//   5. the queue-length sum closed by period_end equals the sum of qlen.
module tb_bless_node;
  import bless_pkg::*;
  logic clk = 0, rst_n = 0;
  logic src_valid = 0, src_ready, src_last = 0;
  logic [5:0] src_dst_x = '0, src_dst_y = '0;
  logic [127:0] src_data = '0;
  flit_t ej_flit, link_in [4], link_out [4];
  logic [6:0] throttle_rate = '0;
  logic period_end = 0;
  logic [7:0] starve_cnt;
  logic [23:0] qlen_sum;
  logic ev_starved, ev_throttled, ev_injected, ev_ej_conflict;
  logic [2:0] ev_deflect;
  logic [4:0] qlen;
  int checks = 0, failures = 0;

  bless_node #(.MESH_X(4), .MESH_Y(4), .X(0), .Y(0)) dut (
    .clk, .rst_n, .src_valid, .src_ready, .src_dst_x, .src_dst_y, .src_last, .src_data,
    .ej_flit, .link_in, .link_out, .throttle_rate, .period_end, .starve_cnt, .qlen_sum,
    .ev_starved, .ev_throttled, .ev_injected, .ev_deflect, .ev_ej_conflict, .qlen);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic push(int dx, int dy, bit last, logic [127:0] d);
    src_valid = 1; src_dst_x = 6'(dx); src_dst_y = 6'(dy); src_last = last; src_data = d;
    @(posedge clk); #1;
    src_valid = 0;
  endtask

  initial begin
    int inj, opp, qs;
    for (int p = 0; p < 4; p++) link_in[p] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. one packet of three flits to (2,0): X-Y routing sends it east
    fork
      begin
        push(2, 0, 0, 128'hA0);
        push(2, 0, 0, 128'hA1);
        push(2, 0, 1, 128'hA2);
      end
      begin
        for (int s = 0; s < 3; s++) begin
          int t;
          t = 0;
          while (!ev_injected) begin @(posedge clk); #1; t++; end
          @(posedge clk); #1;
          check(link_out[P_EAST].valid, "flit on east link one cycle after injection");
          check(link_out[P_EAST].dst_x == 2 && link_out[P_EAST].dst_y == 0, "destination");
          check(link_out[P_EAST].src_x == 0 && link_out[P_EAST].src_y == 0, "source");
          check(link_out[P_EAST].pkt == 0 && int'(link_out[P_EAST].seq) == s, "packet/sequence");
          check(link_out[P_EAST].last == (s == 2), "last flag");
          check(link_out[P_EAST].age == 1, "age after one hop");
          check(link_out[P_EAST].data == 128'hA0 + 128'(s), "payload");
          check(!link_out[P_SOUTH].valid, "nothing on south link");
        end
      end
    join

    // 2. ejection: flit for (0,0) arriving from the east
    begin
      flit_t f;
      f = '0; f.valid = 1; f.dst_x = 0; f.dst_y = 0; f.src_x = 3; f.src_y = 2;
      f.pkt = 8'h55; f.age = 8'd4; f.data = 128'hBEEF;
      link_in[P_EAST] = f;
      @(posedge clk); #1;
      link_in[P_EAST] = '0;
      check(!ej_flit.valid, "not ejected after one cycle");
      @(posedge clk); #1;
      check(ej_flit == f, "ejected flit after two cycles, unchanged");
    end
    repeat (3) @(posedge clk); #1;

    // 3. contention: both links busy with transit flits, node wants to inject
    begin
      flit_t a, b;
      int starved_cycles, seen;
      a = '0; a.valid = 1; a.dst_x = 3; a.dst_y = 3; a.age = 8'd9;  a.src_x = 3;
      b = '0; b.valid = 1; b.dst_x = 3; b.dst_y = 3; b.age = 8'd10; b.src_x = 2;
      src_dst_x = 1; src_dst_y = 1; src_last = 1; src_data = 128'hC0;
      starved_cycles = 0; seen = 0;
      for (int c = 0; c < 20; c++) begin
        src_valid = (c == 0);
        link_in[P_EAST]  = (c < 10) ? a : '0;
        link_in[P_SOUTH] = (c < 10) ? b : '0;
        #1;
        if (c >= 1 && c <= 10) begin
          check(!ev_injected && ev_starved, "no injection while both links carry transit flits");
          starved_cycles++;
        end
        if (link_out[P_EAST].valid)  seen++;
        if (link_out[P_SOUTH].valid) seen++;
        for (int p = 1; p <= 2; p++)
          if (link_out[p].valid && link_out[p].data == 128'hC0)
            check(link_out[p].pkt == 1 && link_out[p].seq == 0 && link_out[p].last,
                  "second packet numbered 1, its single flit seq 0");
        @(posedge clk); #1;
      end
      // 10 cycles of 2 transit flits plus the injected flit
      check(seen == 21, $sformatf("all flits leave the router (%0d)", seen));
      check(qlen == 0, "queued flit injected after contention");
    end

    // 4. throttling at rate 64/128 with the queue kept non-empty
    throttle_rate = 7'd64;
    inj = 0; opp = 0;
    for (int c = 0; c < 1280 + 200; c++) begin
      src_valid = 1; src_dst_x = 3; src_dst_y = 0; src_last = 1; src_data = 128'(c);
      #1;
      if (c >= 200) begin
        if (!dut.u_throttle.link_free) failures++;
        if (ev_injected) inj++;
        if (ev_injected || ev_throttled) opp++;
      end
      @(posedge clk); #1;
    end
    src_valid = 0;
    check(opp == 1280, $sformatf("every cycle an opportunity (%0d)", opp));
    check(inj == 640, $sformatf("half of the opportunities inject (%0d)", inj));
    check(starve_cnt == 64, $sformatf("starvation window holds 64 (%0d)", starve_cnt));

    // 5. queue-length sum: close a period and compare
    throttle_rate = 7'd127;
    qs = 0;
    for (int c = 0; c < 300; c++) begin
      src_valid = (c % 3 == 0); src_dst_x = 3; src_dst_y = 3; src_last = 1;
      period_end = (c == 100) || (c == 299);
      #1;
      if (c > 100) qs += int'(qlen);
      @(posedge clk); #1;
    end
    src_valid = 0; period_end = 0;
    check(int'(qlen_sum) == qs, $sformatf("queue-length sum %0d expected %0d", qlen_sum, qs));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
