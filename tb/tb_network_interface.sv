// tb_network_interface: node (2,1). Checks that injected PE flits reach the
// router side unchanged with a correct CRC and that no head is offered while
// CPS is 01; that a packet addressed to this node is delivered to the PE; that
// a packet addressed elsewhere (ejected for deadlock recovery) is stored and
// injected again whole, with priority over new PE packets; that ni_free drops
// when the re-send memory cannot take a full packet; and that a corrupted
// flit is flagged.
module tb_network_interface;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pe_in_valid = 0, pe_in_ready, pe_out_valid, pe_crc_err, pe_out_ready = 1;
  flit_t pe_in_flit, pe_out_flit;
  logic r_in_valid, r_in_cts = 0, r_out_valid = 0, r_out_cts, ni_free, resend_evt;
  cflit_t r_in_flit, r_out_flit;
  cps_e r_in_cps = CPS_NORMAL, r_out_cps;
  int checks = 0, failures = 0;
  flit_t got [$];
  flit_t delivered [$];
  int crc_errs = 0;

  network_interface #(.X(2), .Y(1), .RS_DEPTH(16)) dut (.*);
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

  function automatic flit_t mk(ftype_e t, int dx, int dy, int k);
    flit_t f;
    f.ftype = t;
    f.data  = (t == FT_HEAD) ? {4'(dx), 4'(dy), 4'd2, 4'd1, 16'(k)} : 32'(k * 7 + 1);
    return f;
  endfunction

  // router side sink: records flits accepted from the interface
  always @(posedge clk) if (r_in_valid && r_in_cts) begin
    got.push_back(r_in_flit.flit);
    if (r_in_flit.crc != crc8(r_in_flit.flit)) begin failures++; $display("FAIL bad crc injected"); end
    checks++;
  end
  always @(posedge clk) if (pe_out_valid) delivered.push_back(pe_out_flit);

  task automatic pe_send(int n, int dx, int dy, int k);
    for (int i = 0; i < n; i++) begin
      pe_in_flit = mk(i == 0 ? FT_HEAD : (i == n - 1 ? FT_TAIL : FT_BODY), dx, dy, k + i);
      pe_in_valid = 1;
      @(posedge clk);
      while (!pe_in_ready) @(posedge clk);
      #1;
    end
    pe_in_valid = 0;
  endtask

  task automatic eject(int n, int dx, int dy, int k, bit corrupt);
    for (int i = 0; i < n; i++) begin
      r_out_flit.flit = mk(i == 0 ? FT_HEAD : (i == n - 1 ? FT_TAIL : FT_BODY), dx, dy, k + i);
      r_out_flit.crc  = crc8(r_out_flit.flit) ^ 8'(corrupt && i == 1);
      r_out_valid = 1;
      @(posedge clk);
      while (!r_out_cts) @(posedge clk);
      #1;
    end
    r_out_valid = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    check(ni_free && r_out_cps == CPS_NORMAL, "free after reset");
    // injection with CPS 01: the head must wait
    r_in_cps = CPS_PREP; r_in_cts = 1;
    fork pe_send(4, 5, 5, 100); join_none
    repeat (5) @(negedge clk);
    check(got.size() == 0 && !r_in_valid, "no head offered while CPS is 01");
    r_in_cps = CPS_NORMAL;
    repeat (8) @(negedge clk);
    check(got.size() == 4, "4 flits injected");
    check(got.size() == 4 && got[0] == mk(FT_HEAD, 5, 5, 100) && got[3] == mk(FT_TAIL, 5, 5, 103), "injected contents");
    got.delete();
    // delivery to this node
    eject(3, 2, 1, 200, 0);
    @(negedge clk);
    check(delivered.size() == 3 && delivered[0] == mk(FT_HEAD, 2, 1, 200), "delivered to PE");
    check(got.size() == 0, "own packet not re-sent");
    // recovery packet: held by the router side until r_in_cts returns
    r_in_cts = 0;
    eject(8, 6, 0, 300, 0);
    @(negedge clk);
    check(ni_free, "room for another full packet with 8 of 16 slots used");
    eject(2, 0, 3, 350, 0);
    @(negedge clk);
    check(!ni_free, "ni_free low with fewer than 8 free slots");
    check(delivered.size() == 3, "foreign packet not delivered");
    // a PE packet is waiting too: the recovered one goes first
    fork pe_send(2, 0, 0, 400); join_none
    repeat (2) @(negedge clk);
    r_in_cts = 1;
    repeat (20) @(negedge clk);
    check(got.size() == 12, $sformatf("recovered and new packets injected (%0d)", got.size()));
    check(got.size() == 12 && got[0] == mk(FT_HEAD, 6, 0, 300) && got[7] == mk(FT_TAIL, 6, 0, 307),
          "recovered packet re-sent whole and first");
    check(got.size() == 12 && got[8] == mk(FT_HEAD, 0, 3, 350), "second recovered packet next");
    check(got.size() == 12 && got[10] == mk(FT_HEAD, 0, 0, 400), "PE packet after them");
    check(ni_free, "memory free again");
    // CRC error on delivery
    fork eject(3, 2, 1, 500, 1); join_none
    repeat (6) @(negedge clk);
    check(crc_errs == 1, "one corrupted flit flagged");
    check(delivered.size() == 6, "corrupted packet still delivered, flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (pe_crc_err) crc_errs++;
endmodule
