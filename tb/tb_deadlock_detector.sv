// tb_deadlock_detector: with THRESH = 10, a head that waits must trigger a
// recomputation after exactly 10 cycles, then (network interface free) an
// ejection 10 cycles later; without a free network interface a second
// recomputation instead. A packet whose head has left is flagged stuck. A
// tail leaving clears everything, and a packet moving in time never
// triggers anything.
module tb_deadlock_detector;
  import noc_pkg::*;
  localparam int TH = 10;
  logic clk = 0, rst_n = 0, flush = 0, ni_free = 1;
  logic [NPORT-1:0] head_wait = '0, body_wait = '0, tail_sent = '0;
  logic [NPORT-1:0] recompute, eject, stuck, detect;
  int checks = 0, failures = 0;

  deadlock_detector #(.THRESH(TH)) dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles until a strobe on port p
  task automatic wait_for(int p, output int n);
    n = 0;
    while (!recompute[p] && !eject[p] && !stuck[p] && n < 100) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    @(negedge clk); rst_n = 1;
    head_wait[0] = 1;
    n = 0;
    while (!recompute[0] && n < 100) begin @(negedge clk); n++; end
    check(n == TH, $sformatf("first recompute after %0d cycles", n));
    check(detect[0] && !eject[0], "detect with recompute");
    @(negedge clk);
    n = 1;
    while (!detect[0] && n < 100) begin @(negedge clk); n++; end
    check(n == TH + 1 && !recompute[0], $sformatf("second detection after %0d cycles", n));
    @(negedge clk);
    check(eject[0], "ejection when NI free");
    tail_sent[0] = 1; head_wait[0] = 0; @(negedge clk); tail_sent[0] = 0;
    check(!eject[0], "tail clears eject");
    // NI not free: recompute twice
    ni_free = 0; head_wait[1] = 1;
    repeat (2) begin
      n = 0;
      while (!recompute[1] && n < 100) begin @(negedge clk); n++; end
      check(n <= TH + 1 && n >= TH, "recompute while NI busy");
      @(negedge clk);
      check(!eject[1], "no eject while NI busy");
    end
    head_wait[1] = 0; tail_sent[1] = 1; @(negedge clk); tail_sent[1] = 0;
    // head gone, body blocked
    body_wait[2] = 1;
    repeat (TH + 2) @(negedge clk);
    check(stuck[2] && !recompute[2], "stuck packet flagged");
    body_wait[2] = 0; tail_sent[2] = 1; @(negedge clk); tail_sent[2] = 0;
    check(!stuck[2], "tail clears stuck");
    // a packet that moves on time
    head_wait[3] = 1; repeat (TH - 3) @(negedge clk);
    head_wait[3] = 0; body_wait[3] = 1; @(negedge clk);
    body_wait[3] = 0; tail_sent[3] = 1; @(negedge clk); tail_sent[3] = 0;
    repeat (TH) begin check(!detect[3], "no detection for a moving packet"); @(negedge clk); end
    flush = 1; head_wait[4] = 1; repeat (2 * TH) @(negedge clk);
    check(!detect[4], "flush holds counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
