// Self-checking testbench of bless_router in a 4x4 mesh: one centre router
// (1,1) with four links and one corner router (0,0) with two. Each cycle every
// existing input link carries a random flit with some probability, and the
// node offers a new flit (never addressed to itself) whenever inj_free says a link is left. The testbench
// keeps its own copy of the flits inside each router and checks, two cycles
// after the flits arrived:
//   - every flit leaves exactly once, on an existing link or on the ejection
//     port, with its age one higher (saturating) unless ejected;
//   - the ejected flit is the highest-priority one addressed to the router;
//   - oldest-first allocation: a flit that did not get its X-Y port found it
//     taken by a higher-priority flit, and a flit sent on a non-productive
//     port found all its productive ports taken by higher-priority flits;
//   - inj_free is high exactly when fewer flits remain than links exist.
// It also counts deflections, ejection conflicts and refused injections and
// fails if any of them never happened.
module tb_bless_router;
  import bless_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_defl = 0, n_ejc = 0, n_inj = 0, n_nofree = 0, n_nonxy = 0;

  flit_t in_c [4], out_c [4], ej_c, inj_c;
  flit_t in_k [4], out_k [4], ej_k, inj_k;
  logic  free_c, free_k, ejconf_c, ejconf_k;
  logic [2:0] defl_c, defl_k;

  bless_router #(.MESH_X(4), .MESH_Y(4), .X(1), .Y(1)) u_c (
    .clk, .rst_n, .in_flit(in_c), .out_flit(out_c), .inj_free(free_c),
    .inj_flit(inj_c), .ej_flit(ej_c), .defl_cnt(defl_c), .ej_conflict(ejconf_c));
  bless_router #(.MESH_X(4), .MESH_Y(4), .X(0), .Y(0)) u_k (
    .clk, .rst_n, .in_flit(in_k), .out_flit(out_k), .inj_free(free_k),
    .inj_flit(inj_k), .ej_flit(ej_k), .defl_cnt(defl_k), .ej_conflict(ejconf_k));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int serial = 0;

  function automatic flit_t rand_flit(int x, int y, bit not_self = 0);
    flit_t f;
    f = '0;
    f.valid = 1'b1;
    // bias towards this router so that ejection conflicts occur
    if ($urandom % 3 == 0) begin f.dst_x = 6'(x); f.dst_y = 6'(y); end
    else begin f.dst_x = 6'($urandom % 4); f.dst_y = 6'($urandom % 4); end
    if (not_self && int'(f.dst_x) == x && int'(f.dst_y) == y) f.dst_x = 6'((x + 1) % 4);
    f.src_x = 6'($urandom % 4);
    f.src_y = 6'($urandom % 4);
    f.pkt   = 8'(serial);
    f.seq   = 3'(serial >> 8);
    serial++;
    f.age   = ($urandom % 8 == 0) ? 8'hff : 8'($urandom % 40);
    f.data  = {$urandom, $urandom, $urandom, $urandom};
    return f;
  endfunction

  function automatic logic [KEY_W-1:0] key(flit_t f);
    return {f.age, ~f.src_y, ~f.src_x, ~f.pkt, ~f.seq};
  endfunction

  function automatic flit_t aged(flit_t f);
    flit_t g;
    g = f;
    if (g.age != 8'hff) g.age = g.age + 1;
    return g;
  endfunction

  // productive directions and X-Y direction (N=0, E=1, S=2, W=3)
  function automatic bit [3:0] prod(flit_t f, int x, int y);
    bit [3:0] m;
    m = '0;
    if (int'(f.dst_x) > x) m[1] = 1;
    if (int'(f.dst_x) < x) m[3] = 1;
    if (int'(f.dst_y) > y) m[2] = 1;
    if (int'(f.dst_y) < y) m[0] = 1;
    return m;
  endfunction

  function automatic bit [3:0] xyp(flit_t f, int x, int y);
    bit [3:0] m;
    m = prod(f, x, y);
    if (m[1] || m[3]) m[0] = 0;
    if (m[1] || m[3]) m[2] = 0;
    return m;
  endfunction

  // check one router's outputs against the flits it held one cycle earlier
  task automatic check(int x, int y, bit [3:0] en, flit_t cand [$],
                       flit_t outs [4], flit_t ej, logic [2:0] defl_hw);
    flit_t locals [$];
    flit_t exp_ej;
    flit_t rest [$];
    int    defl;
    bit    found;
    exp_ej = '0;
    foreach (cand[i])
      if (int'(cand[i].dst_x) == x && int'(cand[i].dst_y) == y) locals.push_back(cand[i]);
    foreach (locals[i]) if (!exp_ej.valid || key(locals[i]) > key(exp_ej)) exp_ej = locals[i];
    if (locals.size() > 1) n_ejc++;
    checks++;
    if (ej != exp_ej) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) ejection mismatch", x, y);
    end
    foreach (cand[i]) if (!(exp_ej.valid && cand[i] == exp_ej)) rest.push_back(cand[i]);
    // every remaining flit appears exactly once on an existing output
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (outs[p].valid && !en[p]) begin failures++; $display("flit on missing port %0d", p); end
    end
    defl = 0;
    foreach (rest[i]) begin
      int hits, port;
      hits = 0; port = -1;
      for (int p = 0; p < 4; p++) if (outs[p].valid && outs[p] == aged(rest[i])) begin hits++; port = p; end
      checks++;
      if (hits != 1) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d) flit lost or duplicated (%0d)", x, y, hits);
        continue;
      end
      // oldest-first: ports preferred over the one taken must hold older flits
      begin
        bit [3:0] pm, xm;
        pm = prod(rest[i], x, y) & en;
        xm = xyp(rest[i], x, y) & en;
        if (!pm[port]) begin
          defl++;
          for (int p = 0; p < 4; p++) if (pm[p]) begin
            checks++;
            if (!(outs[p].valid && key(outs[p]) > key(aged(rest[i])))) begin
              failures++;
              if (failures < 10) $display("(%0d,%0d) needless deflection", x, y);
            end
          end
        end else if (!xm[port]) begin
          n_nonxy++;
          for (int p = 0; p < 4; p++) if (xm[p]) begin
            checks++;
            if (!(outs[p].valid && key(outs[p]) > key(aged(rest[i])))) begin
              failures++;
              if (failures < 10) $display("(%0d,%0d) X-Y port not taken", x, y);
            end
          end
        end
      end
    end
    checks++;
    if (int'(defl_hw) != defl) begin failures++; $display("deflection count %0d vs %0d", defl_hw, defl); end
    n_defl += defl;
    // no extra flits
    begin
      int nout;
      nout = 0;
      for (int p = 0; p < 4; p++) if (outs[p].valid) nout++;
      checks++;
      if (nout != rest.size()) begin failures++; $display("output count %0d vs %0d", nout, rest.size()); end
    end
  endtask

  initial begin
    flit_t prev_c [4], prev_k [4];
    flit_t cand_c [$], cand_k [$], next_c [$], next_k [$];
    bit [3:0] en_c, en_k;
    en_c = 4'b1111;
    en_k = 4'b0110;   // corner (0,0): east and south only
    for (int p = 0; p < 4; p++) begin in_c[p] = '0; in_k[p] = '0; prev_c[p] = '0; prev_k[p] = '0; end
    inj_c = '0; inj_k = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int load, nrem_c, nrem_k;
      @(posedge clk); #1;
      if (k >= 2) begin
        check(1, 1, en_c, cand_c, out_c, ej_c, defl_c);
        check(0, 0, en_k, cand_k, out_k, ej_k, defl_k);
      end
      // expected inj_free from the flits latched last cycle
      next_c = {}; next_k = {};
      for (int p = 0; p < 4; p++) begin
        if (prev_c[p].valid) next_c.push_back(prev_c[p]);
        if (prev_k[p].valid) next_k.push_back(prev_k[p]);
      end
      nrem_c = 0; nrem_k = 0;
      foreach (next_c[i]) if (!(next_c[i].dst_x == 1 && next_c[i].dst_y == 1)) nrem_c++;
      foreach (next_k[i]) if (!(next_k[i].dst_x == 0 && next_k[i].dst_y == 0)) nrem_k++;
      if (nrem_c < next_c.size()) nrem_c = next_c.size() - 1;
      else nrem_c = next_c.size();
      if (nrem_k < next_k.size()) nrem_k = next_k.size() - 1;
      else nrem_k = next_k.size();
      if (k >= 1) begin
        checks += 2;
        if (free_c != (nrem_c < 4)) begin failures++; $display("centre inj_free wrong"); end
        if (free_k != (nrem_k < 2)) begin failures++; $display("corner inj_free wrong"); end
      end
      if (!free_c) n_nofree++;
      // injection offers
      inj_c = (free_c && $urandom % 4 != 0) ? rand_flit(1, 1, 1) : '0;
      inj_k = (free_k && $urandom % 4 != 0) ? rand_flit(0, 0, 1) : '0;
      if (inj_c.valid) begin inj_c.age = '0; next_c.push_back(inj_c); n_inj++; end
      if (inj_k.valid) begin inj_k.age = '0; next_k.push_back(inj_k); end
      cand_c = next_c; cand_k = next_k;
      // new link inputs, with a load that varies over time
      load = ((k / 500) % 3 == 0) ? 30 : 85;
      for (int p = 0; p < 4; p++) begin
        in_c[p] = (($urandom % 100) < load) ? rand_flit(1, 1) : '0;
        in_k[p] = (en_k[p] && ($urandom % 100) < load) ? rand_flit(0, 0) : '0;
      end
      prev_c = in_c; prev_k = in_k;
    end
    checks++;
    if (n_defl == 0 || n_ejc == 0 || n_inj == 0 || n_nofree == 0 || n_nonxy == 0) begin
      failures++;
    end
    $display("deflections=%0d eject_conflicts=%0d injections=%0d no_free_link=%0d second_choice=%0d",
             n_defl, n_ejc, n_inj, n_nofree, n_nonxy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
