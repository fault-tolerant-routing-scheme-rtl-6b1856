// tb_switch_allocator: checks wormhole allocation. Inputs 0 and 1 both send
// 3-flit packets to output 2: the packet that wins keeps the output until
// its tail, the other follows, and the flits never interleave. Then checks
// round-robin alternation between repeated contenders, that `allow` and
// `out_ready` gate grants, that `want` ignores `allow`, and at most one grant
// per input and per output in every cycle of a random phase.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [NPORT-1:0] req_valid = '0, req_head = '0, req_tail = '0, out_ready = '1, allow = '1;
  logic [2:0] req_port [NPORT];
  logic [NPORT-1:0] want, in_gnt, out_fire, locked;
  logic [2:0] out_sel [NPORT];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int left [NPORT];   // flits left in each input's packet
  int order [$];
  logic [NPORT-1:0] g;

  task automatic drive;
    for (int i = 0; i < NPORT; i++) begin
      req_valid[i] = left[i] > 0;
      req_head[i]  = left[i] == 3;
      req_tail[i]  = left[i] == 1;
    end
  endtask

  initial begin
    for (int i = 0; i < NPORT; i++) begin req_port[i] = 3'd2; left[i] = 0; end
    @(negedge clk); rst_n = 1;
    left[0] = 3; left[1] = 3;
    for (int c = 0; c < 8; c++) begin
      drive();
      #1;
      check($countones(in_gnt) <= 1, "one grant to output 2");
      if (in_gnt != 0) begin
        for (int i = 0; i < NPORT; i++) if (in_gnt[i]) begin order.push_back(i); end
      end
      g = in_gnt;
      @(negedge clk);
      for (int i = 0; i < NPORT; i++) if (g[i]) left[i]--;
    end
    check(order.size() == 6, $sformatf("six flits moved %p", order));
    check(order[0] == order[1] && order[1] == order[2], "first packet not interleaved");
    check(order[3] == order[4] && order[4] == order[5] && order[3] != order[0], "second packet follows");
    // round robin: both keep sending packets; winners must alternate
    order.delete();
    for (int k = 0; k < 4; k++) begin
      left[0] = 3; left[1] = 3;
      while (left[0] > 0 || left[1] > 0) begin
        drive(); #1;
        for (int i = 0; i < NPORT; i++) if (in_gnt[i] && req_head[i]) order.push_back(i);
        g = in_gnt;
        @(negedge clk);
        for (int i = 0; i < NPORT; i++) if (g[i]) left[i]--;
      end
    end
    for (int k = 1; k < order.size(); k++) check(order[k] != order[k-1], "round-robin alternation");
    // gating
    left[3] = 3; req_port[3] = 3'd1; drive();
    allow[1] = 0; #1;
    check(want[1] && !in_gnt[3], "allow low blocks grant but not want");
    allow[1] = 1; out_ready[1] = 0; #1;
    check(!want[1] && !in_gnt[3], "out_ready low blocks");
    out_ready[1] = 1; #1;
    check(in_gnt[3] && out_sel[1] == 3'd3, "grant when ready and allowed");
    @(negedge clk); left[3] = 0; drive();
    flush = 1; @(negedge clk); flush = 0;
    check(locked == 0, "flush drops locks");
    // random phase: structural properties
    for (int c = 0; c < 1000; c++) begin
      for (int i = 0; i < NPORT; i++) begin
        req_valid[i] = $urandom_range(0, 1); req_head[i] = $urandom_range(0, 1);
        req_tail[i] = $urandom_range(0, 1); req_port[i] = 3'($urandom_range(0, 4));
      end
      allow = 5'($urandom); out_ready = 5'($urandom);
      #1;
      check($countones(in_gnt) == $countones(out_fire), "grants match fires");
      for (int o = 0; o < NPORT; o++)
        if (out_fire[o]) check(allow[o] && out_ready[o] && req_valid[out_sel[o]] &&
                               req_port[out_sel[o]] == 3'(o), "fire is legal");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
