// tb_dms_controller: with the East MUX faulty, the North MUX (its ring
// predecessor) must be shared: alternate between the two outputs when both
// want it, serve whichever one wants it otherwise, and never allow both in
// one cycle. Other outputs stay unaffected. Also checks the wrap-around case
// (faulty North served by Local), a second faulty MUX left unusable, and
// that test mode switches sharing off.
module tb_dms_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [NPORT-1:0] mux_fault = '0, want = '0;
  logic active, phase;
  logic [2:0] fm, sm;
  logic [NPORT-1:0] allow, usable;
  int checks = 0, failures = 0;

  dms_controller dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served_f, served_s;
    logic last;
    @(negedge clk); rst_n = 1;
    #1 check(!active && allow == '1 && usable == '1, "no fault: all allowed");
    mux_fault[P_E] = 1;
    #1 check(active && fm == P_E && sm == P_N, "East faulty, shared by North");
    check(usable == '1, "East still usable through DMS");
    want = 5'b11111;
    served_f = 0; served_s = 0;
    for (int c = 0; c < 20; c++) begin
      #1;
      check(allow[P_E] != allow[P_N], "exactly one of the pair allowed");
      check(allow[P_S] && allow[P_W] && allow[P_L], "others unaffected");
      if (c > 0) check(phase != last, "alternation when both want");
      last = phase;
      if (allow[P_E]) served_f++; else served_s++;
      @(negedge clk);
    end
    check(served_f == 10 && served_s == 10, "equal share");
    want = 5'b00010;
    repeat (3) begin #1 check(allow[P_E] && phase, "only faulty output wants"); @(negedge clk); end
    want = 5'b00001;
    repeat (3) begin #1 check(allow[P_N] && !allow[P_E], "only own output wants"); @(negedge clk); end
    mux_fault = 5'b00001;
    #1 check(active && fm == P_N && sm == P_L, "wrap-around: Local serves North");
    mux_fault = 5'b00101;
    #1 check(active && fm == P_N && !usable[P_S] && !allow[P_S], "second faulty MUX unusable");
    mux_fault = 5'b10001;
    #1 check(!active && !usable[P_N], "neighbour faulty too: no sharing");
    enable = 0; mux_fault = 5'b00010;
    #1 check(!active && allow[P_E], "test mode: no sharing, all MUXes driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
