// tb_router: one router at (1,1) of a 3 x 3 mesh; the testbench plays its
// four neighbours and the network interface. Every packet carries a unique
// id; the scoreboard checks that each packet leaves exactly once, with its
// flits intact and in order, and (where no fault forces a detour) through an
// output that brings it closer to its destination. Phases:
//   1 power-on self-test finds nothing; idle latency is 3 cycles;
//   2 random traffic from all five inputs;
//   3 a faulty North buffer: self-test finds it, North traffic is carried
//     through substitute buffers (DBS) while other inputs keep sending;
//   4 a faulty East MUX: self-test finds it, the North MUX is shared (DMS);
//   5 a MUX breaks during traffic: the output CRC check catches it and the
//     router tests itself;
//   6 a corrupted flit on the West link marks it as a hard link fault;
//   7 East output blocked: deadlock detection recomputes the route;
//   8 all links blocked: the packet is ejected to the network interface.
// Each mechanism's occurrences are counted and one that never happens is a
// failure.
module tb_router;
  import noc_pkg::*;
  localparam int TH = 24;
  logic clk = 0, rst_n = 0;
  logic [NPORT-1:0] in_valid = '0, in_cts, out_valid, out_cts = '1;
  cflit_t in_flit [NPORT];
  cps_e in_cps [NPORT];
  cflit_t out_flit [NPORT];
  cps_e out_cps [NPORT];
  logic ni_free = 1, bist_req = 0;
  logic [NPORT-1:0] fi_buf = '0, fi_mux = '0;
  rstat_t stat;
  int checks = 0, failures = 0;

  router #(.X(1), .Y(1), .DIMX(3), .DIMY(3), .DEPTH(8), .THRESH(TH)) dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ traffic
  cflit_t txq [NPORT][$];
  flit_t  sent [int][$];        // id -> flits
  int     dst_of [int];
  int     recv_cnt [int];
  flit_t  rx_cur [NPORT][$];
  int     next_id = 1;
  logic   corrupt_next [NPORT];
  int     strict = 1;           // outputs must be productive
  int     got_port [int];

  function automatic cflit_t wrap(flit_t f, bit bad);
    cflit_t c;
    c.flit = f;
    c.crc  = crc8(f) ^ 8'(bad);
    return c;
  endfunction

  task automatic send_pkt(int p, int dx, int dy, int len);
    int id;
    flit_t f;
    flit_t q [$];
    id = next_id++;
    for (int i = 0; i < len; i++) begin
      f.ftype = (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
      f.data  = (i == 0) ? {4'(dx), 4'(dy), 4'd0, 4'd0, 16'(id)} : {16'(id), 16'(i)};
      q.push_back(f);
      txq[p].push_back(wrap(f, 0));
    end
    sent[id] = q;
    dst_of[id]   = dy * 3 + dx;
    recv_cnt[id] = 0;
  endtask

  always @(negedge clk)
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = txq[p].size() > 0 && !(is_head(txq[p][0].flit) && in_cps[p] == CPS_PREP);
      in_flit[p]  = (txq[p].size() > 0) ? txq[p][0] : '0;
      if (corrupt_next[p] && txq[p].size() > 0) in_flit[p].crc = ~in_flit[p].crc;
    end

  always @(posedge clk)
    for (int p = 0; p < NPORT; p++)
      if (in_valid[p] && in_cts[p]) begin
        void'(txq[p].pop_front());
        corrupt_next[p] <= 1'b0;
      end

  function automatic bit productive(int o, int d);
    int dx = d % 3, dy = d / 3;
    case (o)
      0: return dy < 1;
      1: return dx > 1;
      2: return dy > 1;
      3: return dx < 1;
      default: return d == 4;
    endcase
  endfunction

  int t_in [int];
  int t_out [int];
  always @(posedge clk)
    for (int p = 0; p < NPORT; p++)
      if (rst_n && in_valid[p] && in_cts[p] && is_head(in_flit[p].flit))
        t_in[int'(in_flit[p].flit.data[15:0])] = int'($time / 10);

  always @(posedge clk)
    for (int o = 0; o < NPORT; o++)
      if (rst_n && out_valid[o] && out_cts[o]) begin
        if (is_head(out_flit[o].flit)) t_out[int'(out_flit[o].flit.data[15:0])] = int'($time / 10);
        rx_cur[o].push_back(out_flit[o].flit);
        if (out_flit[o].crc != crc8(out_flit[o].flit)) begin
          failures++; $display("FAIL bad CRC at output %0d: %h t=%0t", o, out_flit[o], $time);
        end
        if (is_tail(out_flit[o].flit)) begin
          int id;
          id = int'(rx_cur[o][0].data[15:0]);
          checks++;
          if (!sent.exists(id)) begin failures++; $display("FAIL unknown packet at %0d %p t=%0t", o, rx_cur[o], $time); end
          else if (out_flit[o].flit.data == 0 && rx_cur[o].size() <= sent[id].size()) begin
            // packet closed early by fault handling: counted, not compared
            recv_cnt[id]++;
          end else begin
            bit same;
            recv_cnt[id]++;
            got_port[id] = o;
            same = rx_cur[o].size() == sent[id].size();
            foreach (rx_cur[o][k]) if (same && rx_cur[o][k] != sent[id][k]) same = 0;
            if (!same) begin failures++; $display("FAIL packet %0d corrupted at %0d", id, o); end
            if (strict && !productive(o, dst_of[id])) begin
              failures++; $display("FAIL packet %0d left through unproductive port %0d", id, o);
            end
          end
          rx_cur[o].delete();
        end
      end

  task automatic drain(int maxc);
    int c = 0;
    bit busy;
    do begin
      @(negedge clk); c++;
      busy = 0;
      for (int p = 0; p < NPORT; p++) if (txq[p].size() > 0) busy = 1;
      foreach (recv_cnt[id]) if (recv_cnt[id] == 0) busy = 1;
    end while (busy && c < maxc);
    repeat (4) @(negedge clk);
  endtask

  function automatic int missing();
    int m = 0;
    foreach (recv_cnt[id]) if (recv_cnt[id] != 1) m++;
    return m;
  endfunction

  // ------------------------------------------------------------ event counters
  int n_bist, n_swapflit, n_s1, n_s2, n_dms, n_linkerr, n_intra, n_detect, n_reroute, n_eject, n_mis, n_drop;
  logic tm_q;
  always @(posedge clk) if (rst_n) begin
    tm_q <= stat.test_mode;
    if (stat.test_mode && !tm_q) n_bist++;
    if (stat.swapped_flit) n_swapflit++;
    if (stat.dbs_state == 1) n_s1++;
    if (stat.dbs_state == 2) n_s2++;
    if (stat.dms_shared) n_dms++;
    n_linkerr += $countones(stat.link_err);
    if (stat.intra_err) n_intra++;
    n_detect  += $countones(stat.dl_detect);
    n_reroute += $countones(stat.dl_reroute);
    n_eject   += $countones(stat.dl_eject);
    if (stat.misroute) n_mis++;
    n_drop    += $countones(stat.drop);
  end

  task automatic wait_test;
    int c = 0;
    while (!stat.test_mode && c < 10) begin @(negedge clk); c++; end
    while (stat.test_mode) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic random_traffic(int n, logic [NPORT-1:0] ports);
    for (int k = 0; k < n; k++) begin
      int p, d;
      do p = $urandom_range(0, 4); while (!ports[p]);
      do d = $urandom_range(0, 8); while (d == 4 && p == 4);
      send_pkt(p, d % 3, d / 3, $urandom_range(2, 8));
    end
  endtask

  initial begin
    int lat;
    for (int p = 0; p < NPORT; p++) begin out_cps[p] = CPS_NORMAL; corrupt_next[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // ---- 1
    wait_test();
    check(stat.buf_fault == 0 && stat.mux_fault == 0 && stat.link_fault == 0, "power-on test clean");
    send_pkt(P_W, 2, 1, 4);
    drain(200);
    lat = t_out.exists(1) && t_in.exists(1) ? t_out[1] - t_in[1] : -1;
    check(lat == 3, $sformatf("idle latency %0d cycles", lat));
    // ---- 2
    random_traffic(60, 5'b11111);
    drain(4000);
    check(missing() == 0, "phase 2: all packets delivered once");
    // ---- 3 faulty North buffer
    fi_buf[P_N] = 1;
    bist_req = 1; @(negedge clk); bist_req = 0;
    wait_test();
    check(stat.buf_fault == 5'b00001, $sformatf("BIST finds North buffer (%b)", stat.buf_fault));
    for (int k = 0; k < 12; k++) begin
      send_pkt(P_N, 1, 2, $urandom_range(2, 8));
      send_pkt(P_E, 0, $urandom_range(0, 2), $urandom_range(2, 8));
      send_pkt(P_S, 1, 0, $urandom_range(2, 8));
    end
    drain(6000);
    check(missing() == 0, "phase 3: all packets delivered through DBS");
    // ---- 4 faulty East MUX
    fi_buf = '0; fi_mux[P_E] = 1;
    bist_req = 1; @(negedge clk); bist_req = 0;
    wait_test();
    check(stat.mux_fault == 5'b00010 && stat.buf_fault == 0, $sformatf("BIST finds East MUX (%b)", stat.mux_fault));
    check(stat.dms_active, "DMS active");
    for (int k = 0; k < 15; k++) begin
      send_pkt(P_W, 2, 1, $urandom_range(2, 8));     // to East
      send_pkt(P_S, 1, 0, $urandom_range(2, 8));     // to North
      send_pkt(P_L, 2, 1, $urandom_range(2, 8));
    end
    drain(6000);
    check(missing() == 0, "phase 4: all packets delivered through DMS");
    // ---- 5 MUX breaks during traffic
    strict = 0;
    for (int k = 0; k < 10; k++) send_pkt(P_N, 1, 2, 8);
    repeat (12) @(negedge clk);
    fi_mux[P_S] = 1;
    wait_test();
    check(stat.mux_fault[P_S], "online fault found after intra-router CRC error");
    drain(3000);
    // ---- 6 link error on West
    send_pkt(P_W, 2, 1, 3);
    corrupt_next[P_W] = 1;
    repeat (6) @(negedge clk);
    check(stat.link_fault == 5'b01000 && in_cps[P_W] == CPS_LINKFAULT && !in_cts[P_W], "West link marked faulty");
    txq[P_W].delete();
    // clear faults for the deadlock phases
    fi_mux = '0; fi_buf = '0;
    bist_req = 1; @(negedge clk); bist_req = 0;
    wait_test();
    foreach (recv_cnt[id]) recv_cnt[id] = 1;
    // ---- 7 East blocked: a packet fills the East output register, the next
    //      packet's head waits in its buffer and must be rerouted
    out_cts[P_E] = 0;
    send_pkt(P_N, 2, 1, 4);
    send_pkt(P_S, 2, 1, 4);
    begin
      int id;
      id = next_id - 1;
      repeat (4 * TH) @(negedge clk);
      check((recv_cnt[id] == 1 && got_port.exists(id) && got_port[id] != P_E) ||
            (recv_cnt[id-1] == 1 && got_port.exists(id-1) && got_port[id-1] != P_E),
            "waiting packet rerouted around blocked East");
      out_cts[P_E] = 1;
      drain(400);
      check(missing() == 0, "blocked packet delivered after East reopens");
    end
    // ---- 8 North, East and West links dead: no route left, so the packet
    //      is ejected to the network interface
    out_cps[P_N] = CPS_LINKFAULT; out_cps[P_E] = CPS_LINKFAULT; out_cps[P_W] = CPS_LINKFAULT;
    send_pkt(P_S, 2, 1, 4);
    begin
      int id;
      id = next_id - 1;
      drain(600);
      check(recv_cnt[id] == 1 && got_port.exists(id) && got_port[id] == P_L, "ejected to the network interface");
    end
    for (int p = 0; p < NPORT; p++) out_cps[p] = CPS_NORMAL;
    // ---- mechanism counts
    $display("events: bist=%0d s1=%0d s2=%0d swapflit=%0d dms=%0d linkerr=%0d intra=%0d detect=%0d reroute=%0d eject=%0d misroute=%0d drop=%0d",
             n_bist, n_s1, n_s2, n_swapflit, n_dms, n_linkerr, n_intra, n_detect, n_reroute, n_eject, n_mis, n_drop);
    check(n_bist >= 5, "self-test runs");
    check(n_s1 > 0 && n_s2 > 0 && n_swapflit > 0, "buffer swapping happened");
    check(n_dms > 0, "MUX sharing happened");
    check(n_linkerr > 0, "link CRC error happened");
    check(n_intra > 0, "intra-router CRC error happened");
    check(n_detect > 0 && n_reroute > 0, "deadlock detection and reroute happened");
    check(n_eject > 0, "ejection happened");
    check(n_mis > 0, "misroute happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
