// Self-checking testbench of injection_queue (default depth 16). Random pushes
// and pops, respecting full and empty, are checked against a queue model:
// head flit, count, full and empty every cycle, so FIFO order, wrap-around and
// simultaneous push/pop are all covered.
module tb_injection_queue;
  import bless_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty;
  flit_t in_flit, out_flit;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model [$];
  int n_full = 0;

  injection_queue #(.DEPTH(D)) dut (.clk, .rst_n, .push, .in_flit, .full, .pop,
                                    .out_flit, .empty, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_flit = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias = ((i / 1000) % 2 == 0) ? 70 : 30;   // alternate filling and draining
      push = !full && (($urandom % 100) < bias);
      pop  = !empty && (($urandom % 100) < 100 - bias);
      in_flit = '0;
      in_flit.valid = 1'b1;
      in_flit.data  = {$urandom, $urandom, $urandom, $urandom};
      in_flit.pkt   = 8'(i);
      #1;
      checks++;
      if (int'(count) != model.size() || empty != (model.size() == 0) ||
          full != (model.size() == D)) begin
        failures++;
        if (failures < 10) $display("count %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (out_flit != model[0]) begin
          failures++;
          if (failures < 10) $display("head mismatch at %0d", i);
        end
      end
      if (full) n_full++;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(in_flit);
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
