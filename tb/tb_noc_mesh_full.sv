// tb_noc_mesh_full: the end-to-end test of tb_noc_mesh run on the mesh
// with every parameter at its default (8 x 8 nodes, buffers of 8 flits).
// Every node sends PKTS_PER_NODE random packets of 2 to 8 flits to random
// other nodes; the scoreboard checks delivery, destination and contents.
// Faults from power-on: faulty North buffer at (1,1), faulty East MUX at
// (2,2), broken wire on the link (1,2)->(2,2); a MUX breaks at (1,1) during
// traffic, and the PE at (7,7) stops accepting for a while to force
// deadlock recovery. Each mechanism must occur at least once.
module tb_noc_mesh_full;
  import noc_pkg::*;
  localparam int DX = 8, DY = 8, NN = DX * DY;
  localparam int PKTS_PER_NODE = 12;
  localparam int MAX_LOST = 12;
  localparam int WATCHDOG = 60000;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0] pe_in_valid = '0, pe_in_ready, pe_out_valid, pe_crc_err, pe_out_ready = '1;
  logic [NN-1:0] resend_evt, bist_req = '0;
  flit_t pe_in_flit [NN];
  flit_t pe_out_flit [NN];
  logic [NPORT-1:0] fi_buf [NN];
  logic [NPORT-1:0] fi_mux [NN];
  logic [3:0] fi_link [NN];
  rstat_t stat [NN];
  int checks = 0, failures = 0;

  noc_mesh dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ traffic
  flit_t txq [NN][$];
  int    dst_of [int];
  int    len_of [int];
  int    recv_cnt [int];
  int    next_id = 1;
  int    n_sent = 0, n_ok = 0, n_trunc = 0;
  flit_t rx_cur [NN][$];

  function automatic flit_t body(int id, int i, int len);
    flit_t f;
    f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
    f.data  = {16'(id), 16'(i)};
    return f;
  endfunction

  task automatic gen_pkt(int s);
    int d, id, len;
    flit_t f;
    do d = $urandom_range(0, NN - 1); while (d == s);
    len = $urandom_range(2, 8);
    id  = next_id++;
    f.ftype = FT_HEAD;
    f.data  = {4'(d % DX), 4'(d / DX), 4'(s % DX), 4'(s / DX), 16'(id)};
    txq[s].push_back(f);
    for (int i = 1; i < len; i++) txq[s].push_back(body(id, i, len));
    dst_of[id] = d; len_of[id] = len; recv_cnt[id] = 0;
    n_sent++;
  endtask

  always @(negedge clk)
    for (int n = 0; n < NN; n++) begin
      pe_in_valid[n] = txq[n].size() > 0;
      pe_in_flit[n]  = (txq[n].size() > 0) ? txq[n][0] : '0;
    end

  always @(posedge clk)
    if (rst_n) for (int n = 0; n < NN; n++) begin
      if (pe_in_valid[n] && pe_in_ready[n]) void'(txq[n].pop_front());
      if (pe_out_valid[n]) begin
        if (pe_crc_err[n]) begin failures++; $display("FAIL CRC error delivered at %0d", n); end
        rx_cur[n].push_back(pe_out_flit[n]);
        if (is_tail(pe_out_flit[n])) begin
          int id;
          bit ok;
          id = int'(rx_cur[n][0].data[15:0]);
          checks++;
          if (!is_head(rx_cur[n][0]) || !dst_of.exists(id)) begin
            failures++; $display("FAIL unknown packet at node %0d", n);
          end else if (pe_out_flit[n].data == 0 && rx_cur[n].size() <= len_of[id]) begin
            n_trunc++;
            recv_cnt[id]++;
          end else begin
            recv_cnt[id]++;
            ok = (dst_of[id] == n) && (rx_cur[n].size() == len_of[id]);
            for (int i = 1; i < rx_cur[n].size(); i++)
              if (ok && rx_cur[n][i] != body(id, i, len_of[id])) ok = 0;
            if (!ok) begin failures++; $display("FAIL packet %0d wrong at node %0d dst=%0d len=%0d got %p t=%0t", id, n, dst_of[id], len_of[id], rx_cur[n], $time); end
            else n_ok++;
          end
          rx_cur[n].delete();
        end
      end
    end

  // ------------------------------------------------------------ event counters
  int n_bist, n_swap, n_dms, n_linkerr, n_intra, n_detect, n_reroute, n_eject, n_mis, n_drop, n_resend;
  logic [NN-1:0] tm_q = '0;
  always @(posedge clk) if (rst_n) for (int n = 0; n < NN; n++) begin
    tm_q[n] <= stat[n].test_mode;
    if (stat[n].test_mode && !tm_q[n]) n_bist++;
    if (stat[n].swapped_flit) n_swap++;
    if (stat[n].dms_shared) n_dms++;
    n_linkerr += $countones(stat[n].link_err);
    if (stat[n].intra_err) n_intra++;
    n_detect  += $countones(stat[n].dl_detect);
    n_reroute += $countones(stat[n].dl_reroute);
    n_eject   += $countones(stat[n].dl_eject);
    if (stat[n].misroute) n_mis++;
    n_drop    += $countones(stat[n].drop);
    if (resend_evt[n]) n_resend++;
  end

  function automatic int pending();
    int m = 0;
    foreach (recv_cnt[id]) if (recv_cnt[id] == 0) m++;
    return m;
  endfunction

  localparam int N11 = 1 * DX + 1, N22 = 2 * DX + 2, N12 = 2 * DX + 1, N33 = 7 * DX + 7;

  initial begin
    int c;
    for (int n = 0; n < NN; n++) begin fi_buf[n] = '0; fi_mux[n] = '0; fi_link[n] = '0; end
    fi_buf[N11][P_N] = 1;
    fi_mux[N22][P_E] = 1;
    fi_link[N12][P_E] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    check(stat[N11].buf_fault == 5'b00001, "power-on test finds the North buffer at (1,1)");
    check(stat[N22].mux_fault == 5'b00010, "power-on test finds the East MUX at (2,2)");
    for (int k = 0; k < PKTS_PER_NODE; k++) for (int n = 0; n < NN; n++) gen_pkt(n);
    // a MUX breaks while traffic runs
    repeat (400) @(negedge clk);
    fi_mux[N11][P_S] = 1;
    // a PE stops accepting for a while
    pe_out_ready[N33] = 0;
    repeat (1500) @(negedge clk);
    pe_out_ready[N33] = 1;
    c = 0;
    while (pending() > MAX_LOST && c < WATCHDOG - 5000) begin @(negedge clk); c++; end
    repeat (3000) @(negedge clk);
    $display("sent=%0d ok=%0d truncated=%0d missing=%0d", n_sent, n_ok, n_trunc, pending());
    $display("events: bist=%0d swapflit=%0d dms=%0d linkerr=%0d intra=%0d detect=%0d reroute=%0d eject=%0d resend=%0d misroute=%0d drop=%0d",
             n_bist, n_swap, n_dms, n_linkerr, n_intra, n_detect, n_reroute, n_eject, n_resend, n_mis, n_drop);
    check(n_trunc + pending() <= MAX_LOST, "lost and truncated packets within bound");
    check(n_ok + n_trunc + pending() == n_sent, "every packet accounted for");
    check(stat[N12].link_fault == 0, "link fault seen at the receiving router only");
    check(stat[N12 + 1].link_fault == 5'b01000, "link (1,2)->(2,2) marked faulty at (2,2) West");
    check(stat[N11].mux_fault[P_S], "online MUX fault found at (1,1)");
    check(n_bist >= NN + 1, "self-test runs (power-on and online)");
    check(n_swap > 0, "buffer swapping happened");
    check(n_dms > 0, "MUX sharing happened");
    check(n_linkerr > 0, "link CRC error happened");
    check(n_intra > 0, "intra-router CRC error happened");
    check(n_detect > 0, "deadlock detection happened");
    check(n_reroute > 0, "reroute happened");
    check(n_eject > 0, "ejection to the network interface happened");
    check(n_resend > 0, "network interface re-sent a packet");
    check(n_mis > 0, "misroute around a fault happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
