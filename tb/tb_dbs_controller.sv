// tb_dbs_controller: walks the buffer-swapping sequence with the North
// buffer faulty and checks CPS, CTS enables and the FP_R/SP_R/DP_R registers
// in each state:
//   S0: North CPS 10, CTS 0; SP empty; DP = North.
//   S1: North CPS 10, CTS 0; substitute East CPS 01, CTS 1; DP = North.
//       The controller must wait while a packet is open on East's link or
//       East's buffer is not empty.
//   S2: North CPS 00, CTS 1; East CPS 10, CTS 0; DP = East; swap on.
// After the North packet's tail it returns to S0, and the next request picks
// the next healthy port (South) round-robin. Also checks the test-mode reset.
module tb_dbs_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [NPORT-1:0] buf_fault = '0, link_valid = '0, link_xfer = '0, link_tail = '0,
                    link_head = '0, fifo_empty = '1;
  logic swap;
  logic [2:0] fp_r, sp_r, dp_r;
  logic [1:0] state;
  cps_e cps [NPORT];
  logic [NPORT-1:0] cts_en;
  int checks = 0, failures = 0;

  dbs_controller dut (.*);
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

  task automatic tick; @(negedge clk); endtask

  initial begin
    tick; rst_n = 1;
    buf_fault[P_N] = 1;
    tick;
    // S0
    check(state == 0 && cps[P_N] == CPS_BLOCKED && !cts_en[P_N], "S0: north blocked");
    check(fp_r == P_N && dp_r == P_N && !swap, "S0: FP_R=N DP_R=N");
    check(cps[P_E] == CPS_NORMAL && cts_en[P_E], "S0: east normal");
    // a packet opens on the east link before the request
    link_xfer[P_E] = 1; link_head[P_E] = 1; tick; link_xfer = '0; link_head = '0;
    link_valid[P_N] = 1;   // R2 requests the faulty buffer
    tick;
    check(state == 1 && sp_r == P_E, "S1 entered with SP_R=E");
    check(cps[P_N] == CPS_BLOCKED && !cts_en[P_N], "S1: north still blocked");
    check(cps[P_E] == CPS_PREP && cts_en[P_E], "S1: east CPS 01 CTS 1");
    check(dp_r == P_N, "S1: DP_R=N");
    repeat (3) tick;
    check(state == 1, "S1 holds while east packet open");
    fifo_empty[P_E] = 0;   // the tail is written into the east buffer
    link_xfer[P_E] = 1; link_tail[P_E] = 1; tick; link_xfer = '0; link_tail = '0;
    tick;
    check(state == 1, "S1 holds while east buffer not empty");
    fifo_empty[P_E] = 1;
    tick; tick;
    check(state == 2 && swap, "S2 entered");
    check(cps[P_N] == CPS_NORMAL && cts_en[P_N], "S2: north CPS 00 CTS 1");
    check(cps[P_E] == CPS_BLOCKED && !cts_en[P_E], "S2: east CPS 10 CTS 0");
    check(dp_r == P_E, "S2: DP_R=E");
    // packet 0 passes through the north link
    link_xfer[P_N] = 1; link_head[P_N] = 1; tick; link_head = '0;
    tick; tick;
    check(state == 2, "S2 holds until tail");
    link_tail[P_N] = 1; tick; link_xfer = '0; link_tail = '0; link_valid = '0;
    check(state == 0 && !swap && dp_r == P_N, "back to S0 after tail");
    // next request: round-robin picks South
    link_valid[P_N] = 1; tick;
    check(state == 1 && sp_r == P_S, "round-robin substitute South");
    tick; tick;
    check(state == 2 && cps[P_S] == CPS_BLOCKED, "S2 with South");
    enable = 0; tick; enable = 1; link_valid = '0;
    check(state == 0, "test mode returns to S0");
    // a second faulty buffer is skipped as a substitute
    buf_fault[P_W] = 1;
    link_valid[P_N] = 1; tick;
    check(state == 1 && sp_r == P_S, "aborted swap keeps the round-robin position");
    tick;
    check(state == 2, "S2 again");
    link_xfer[P_N] = 1; link_tail[P_N] = 1; tick; link_xfer = 0; link_tail = 0;
    check(state == 0, "S0 again");
    link_valid[P_N] = 1; tick;
    check(state == 1 && sp_r == P_L, "faulty West skipped, Local chosen");
    check(cps[P_W] == CPS_BLOCKED && !cts_en[P_W], "second faulty buffer blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
