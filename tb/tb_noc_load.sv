// tb_noc_load: latency under uniform random traffic on the mesh at its
// default size (8 x 8 nodes, buffers of 8 flits), for the evaluation
// workload: packet injection rates (PIR, packets per cycle per node) of
// 0.005, 0.007, 0.009, 0.013, 0.015, 0.0215, 0.023 and 0.025, packets of 2 to 8 flits to uniformly random destinations,
// once with no faults and once with faulty input buffers handled by dynamic
// buffer swapping (DBS).
//
// Each point resets the network (the power-on self-test then finds the
// injected buffer faults), injects by an independent Bernoulli draw per node
// and cycle for WARM + MEAS cycles, and measures the latency (creation of
// the packet at the source queue to delivery of its tail) of the packets
// created after the warm-up. The run lengths are scaled down from the
// 20,000 warm-up and 50,000 total cycles of the reference evaluation so the
// whole sweep simulates in minutes. Checks: every packet arrives intact at
// its destination, no packet is lost (buffer faults found by the self-test
// cost capacity, never data), buffer swapping really happens in the DBS
// runs, and the average latency stays below LAT_MAX (no saturation at these
// loads). Average latencies are printed per point.
module tb_noc_load;
  import noc_pkg::*;
  localparam int DX = 8, DY = 8, NN = DX * DY;
  localparam int WARM = 2000, MEAS = 5000, DRAIN_MAX = 4000;
  localparam int NPIR = 8;
  localparam int PIR_E4 [NPIR] = '{50, 70, 90, 130, 150, 215, 230, 250};   // PIR x 10000
  localparam int LAT_MAX = 150;
  localparam int WATCHDOG = 2 * NPIR * (60 + WARM + MEAS + DRAIN_MAX + 100);

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
  flit_t   txq [NN][$];
  int      dst_of [int];
  int      len_of [int];
  longint  t_gen [int];
  bit      measured [int];
  int      next_id, n_sent, n_rcv, n_bad, n_meas;
  longint  lat_sum, cyc;
  flit_t   rx_cur [NN][$];
  int      n_swap;

  function automatic flit_t body(int id, int i, int len);
    flit_t f;
    f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
    f.data  = {16'(id), 16'(i)};
    return f;
  endfunction

  task automatic gen_pkt(int s, bit meas);
    int d, id, len;
    flit_t f;
    do d = $urandom_range(0, NN - 1); while (d == s);
    len = $urandom_range(2, 8);
    id  = next_id;
    next_id = next_id + 1;
    f.ftype = FT_HEAD;
    f.data  = {4'(d % DX), 4'(d / DX), 4'(s % DX), 4'(s / DX), 16'(id)};
    txq[s].push_back(f);
    for (int i = 1; i < len; i++) txq[s].push_back(body(id, i, len));
    dst_of[id] = d; len_of[id] = len; t_gen[id] = cyc; measured[id] = meas;
    n_sent++;
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(negedge clk)
    for (int n = 0; n < NN; n++) begin
      pe_in_valid[n] = rst_n && txq[n].size() > 0;
      pe_in_flit[n]  = (txq[n].size() > 0) ? txq[n][0] : '0;
    end

  always @(posedge clk)
    if (rst_n) for (int n = 0; n < NN; n++) begin
      if (pe_in_valid[n] && pe_in_ready[n]) void'(txq[n].pop_front());
      if (stat[n].swapped_flit) n_swap++;
      if (pe_out_valid[n]) begin
        if (pe_crc_err[n]) begin n_bad++; $display("FAIL CRC error delivered at %0d", n); end
        rx_cur[n].push_back(pe_out_flit[n]);
        if (is_tail(pe_out_flit[n])) begin
          int id;
          bit ok;
          id = int'(rx_cur[n][0].data[15:0]);
          ok = is_head(rx_cur[n][0]) && dst_of.exists(id);
          if (ok) ok = (dst_of[id] == n) && (rx_cur[n].size() == len_of[id]);
          for (int i = 1; i < rx_cur[n].size(); i++)
            if (ok && rx_cur[n][i] != body(id, i, len_of[id])) ok = 0;
          if (!ok) begin n_bad++; $display("FAIL packet %0d wrong at node %0d", id, n); end
          else begin
            n_rcv++;
            if (measured[id]) begin n_meas++; lat_sum += cyc - t_gen[id]; end
          end
          rx_cur[n].delete();
        end
      end
    end

  // ------------------------------------------------------------ sweep
  task automatic run_point(int pir_e4, bit dbs, output real avg);
    int c;
    rst_n = 0;
    for (int n = 0; n < NN; n++) begin
      txq[n].delete(); rx_cur[n].delete();
      fi_buf[n] = '0; fi_mux[n] = '0; fi_link[n] = '0;
    end
    // DBS runs: one faulty input buffer in eight routers spread over the mesh
    if (dbs)
      for (int k = 0; k < 8; k++) fi_buf[(k * 9 + 3 * (k % 2)) % NN][k % NPORT] = 1;
    dst_of.delete(); len_of.delete(); t_gen.delete(); measured.delete();
    next_id = 1; n_sent = 0; n_rcv = 0; n_bad = 0; n_meas = 0; lat_sum = 0; cyc = 0; n_swap = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);           // power-on self-test
    if (dbs) begin
      int nf = 0;
      for (int n = 0; n < NN; n++) nf += $countones(stat[n].buf_fault);
      check(nf == 8, "self-test finds the eight faulty buffers");
    end
    for (int t = 0; t < WARM + MEAS; t++) begin
      for (int n = 0; n < NN; n++)
        if ($urandom_range(0, 9999) < pir_e4) gen_pkt(n, t >= WARM);
      @(negedge clk);
    end
    c = 0;
    while (n_rcv + n_bad < n_sent && c < DRAIN_MAX) begin @(negedge clk); c++; end
    avg = (n_meas > 0) ? real'(lat_sum) / n_meas : 0.0;
    $display("%s PIR=0.%04d sent=%0d received=%0d measured=%0d avg_latency=%0.1f swapped_flits=%0d",
             dbs ? "DBS      " : "no faults", pir_e4, n_sent, n_rcv, n_meas, avg, n_swap);
    check(n_bad == 0, "every delivered packet intact and at its destination");
    check(n_rcv == n_sent, "no packet lost");
    check(n_meas > 0 && avg < LAT_MAX, "average latency below saturation bound");
    if (dbs) check(n_swap > 0, "buffer swapping happened");
  endtask

  initial begin
    real lat [2][NPIR];
    for (int cfg = 0; cfg < 2; cfg++)
      for (int p = 0; p < NPIR; p++) run_point(PIR_E4[p], cfg == 1, lat[cfg][p]);
    // at the lowest load the latency is set by the hop count: 64-node mesh,
    // mean distance about 5.3 hops, 3 cycles per hop plus serialisation
    check(lat[0][0] > 10.0 && lat[0][0] < 40.0, "zero-load latency in expected range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
