// router: five-port (North, East, South, West, Local) wormhole router of the
// fault-tolerant mesh, able to keep working with a faulty input buffer, a
// faulty crossbar MUX or a broken link.
//
// Datapath, in the order a flit passes it:
//   input CRC check -> buffer swapper -> test MUX 1 -> input FIFO (DEPTH)
//   -> test MUX 2 -> crossbar with MUX swapper -> output CRC check
//   -> output register -> link.
// Control: odd-even route computation per input (one cycle, result kept in
// a register until the tail flit leaves), round-robin switch allocation with
// wormhole locking, DBS controller (buffer faults), DMS controller (MUX
// faults), deadlock detector (reroute, then eject to the local network
// interface), and the BIST unit that runs after reset, on request and after
// an output CRC error, and produces the buffer/MUX fault maps used by DBS
// and DMS.
//
// Link interface (per port): in_valid/in_flit from upstream, in_cts/in_cps
// back to it; out_valid/out_flit to downstream, out_cts/out_cps from it. A
// flit moves when valid and CTS are both high at a clock edge. CTS and CPS
// are driven from registers only. A head flit is not offered while the
// downstream CPS is 01 (port about to be lent for buffer swapping).
// Latency through an idle router: 3 cycles from the flit's acceptance on the
// input link to its acceptance on the output link; it is offered there 2
// cycles after input acceptance (FIFO write, route computation, switch
// traversal into the output register).
// Some sub-block outputs are left unconnected on purpose: the BIST done
// strobe (test_mode falling is used instead), the computed CRC values (only
// the error flags matter), the FIFO free counts and the detector's `stuck`
// flags (a packet whose head already left cannot be rerouted; it stays
// visible through dl_detect).
//
// Fault handling that is this implementation's own (the design gives only
// detection by CRC): a flit failing the input CRC marks the link as a hard
// fault (CPS 11, CTS 0 for good); if a packet was open on that link a
// zero-payload tail closes it, otherwise the flit is dropped. An upstream
// router discards flits it holds for an output whose CPS is 11. A flit
// failing the output CRC is replaced by a closing tail (or dropped if it is
// a head) and starts the self-test, which empties the buffers; packets cut
// this way are closed with a zero-payload tail on the outputs that were
// locked, and orphan body flits arriving afterwards are discarded.
// `fi_buf` and `fi_mux` are fault-injection inputs for verification: each
// flips data bit 0 at the output of that buffer or crossbar MUX.
module router
  import noc_pkg::*;
#(
  parameter int X      = 0,
  parameter int Y      = 0,
  parameter int DIMX   = 8,
  parameter int DIMY   = 8,
  parameter int DEPTH  = 8,
  parameter int THRESH = 64,
  parameter int XB_PAT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // input links
  input  logic [NPORT-1:0] in_valid,
  input  cflit_t           in_flit  [NPORT],
  output logic [NPORT-1:0] in_cts,
  output cps_e             in_cps   [NPORT],
  // output links
  output logic [NPORT-1:0] out_valid,
  output cflit_t           out_flit [NPORT],
  input  logic [NPORT-1:0] out_cts,
  input  cps_e             out_cps  [NPORT],
  // network interface memory has room for a recovered packet
  input  logic             ni_free,
  // self-test request and fault injection
  input  logic             bist_req,
  input  logic [NPORT-1:0] fi_buf,
  input  logic [NPORT-1:0] fi_mux,
  output rstat_t           stat
);
  localparam int FW = $clog2(DEPTH + 1);
  localparam logic [COORD_W-1:0] CX = COORD_W'(X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(Y);

  // ---------------------------------------------------------------- BIST
  logic             test_mode, bist_done, por;
  logic [NPORT-1:0] buf_fault, mux_fault;
  logic             tp1_en, tp2_en, b_push, b_pop, b_flush;
  cflit_t           tp_flit;
  logic [2:0]       xb_sel;
  cflit_t           fifo_dout [NPORT];
  cflit_t           xb_out    [NPORT];
  logic             intra_err;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) por <= 1'b1;
    else        por <= 1'b0;

  bist_unit #(.DEPTH(DEPTH), .XB_PAT(XB_PAT)) u_bist (
    .clk, .rst_n, .start(por || bist_req || intra_err),
    .test_mode, .done(bist_done), .buf_fault, .mux_fault,
    .tp1_en, .tp2_en, .tp_flit, .fifo_push(b_push), .fifo_pop(b_pop),
    .fifo_flush(b_flush), .xb_sel, .fifo_dout, .xb_out);

  // ---------------------------------------------------------------- input side
  logic [NPORT-1:0] link_fault, link_err, link_xfer, link_open;
  logic [NPORT-1:0] lk_push, lk_head, lk_tail;
  cflit_t           lk_flit [NPORT];
  logic [NPORT-1:0] crc_bad;
  logic [CRC_W-1:0] crc_in_calc [NPORT];

  logic             dbs_swap;
  logic [2:0]       fp_r, sp_r, dp_r;
  logic [1:0]       dbs_state;
  cps_e             dbs_cps [NPORT];
  logic [NPORT-1:0] dbs_cts_en;

  logic [NPORT-1:0] fifo_empty, fifo_full, fifo_space, fifo_push, fifo_pop;
  logic [NPORT-1:0] sw_push, link_space;
  cflit_t           sw_din [NPORT];
  cflit_t           fifo_din [NPORT];
  cflit_t           fifo_raw [NPORT];
  logic [FW-1:0]    fifo_free [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    crc_unit u_crc_in (.valid(link_xfer[p]), .cf(in_flit[p]),
                       .crc_calc(crc_in_calc[p]), .err(crc_bad[p]));
    assign link_xfer[p] = in_valid[p] && in_cts[p];
    assign link_err[p]  = crc_bad[p];
    assign lk_head[p]   = is_head(in_flit[p].flit);
    assign lk_tail[p]   = is_tail(in_flit[p].flit);
    // a corrupted flit is dropped, or turned into a closing tail if a packet is open
    assign lk_push[p]   = link_xfer[p] && (!crc_bad[p] || link_open[p]);
    always_comb begin
      lk_flit[p] = in_flit[p];
      if (crc_bad[p]) begin
        lk_flit[p].flit.ftype = FT_TAIL;
        lk_flit[p].flit.data  = '0;
        lk_flit[p].crc        = crc8(lk_flit[p].flit);
      end
    end
    assign in_cts[p] = !test_mode && !link_fault[p] && dbs_cts_en[p] && link_space[p];
    assign in_cps[p] = link_fault[p] ? CPS_LINKFAULT : dbs_cps[p];
    assign fifo_space[p] = !fifo_full[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_fault <= '0;
      link_open  <= '0;
    end else begin
      link_fault <= link_fault | link_err;
      for (int p = 0; p < NPORT; p++)
        if (test_mode) link_open[p] <= 1'b0;
        else if (link_xfer[p] && (lk_tail[p] || crc_bad[p])) link_open[p] <= 1'b0;
        else if (link_xfer[p] && lk_head[p]) link_open[p] <= 1'b1;
    end
  end

  dbs_controller u_dbs (
    .clk, .rst_n, .enable(!test_mode), .buf_fault,
    .link_valid(in_valid & ~link_fault), .link_xfer, .link_tail(lk_tail | crc_bad),
    .link_head(lk_head & ~crc_bad), .fifo_empty,
    .swap(dbs_swap), .fp_r, .sp_r, .dp_r, .state(dbs_state), .cps(dbs_cps), .cts_en(dbs_cts_en));

  buffer_swapper u_swap (
    .swap(dbs_swap), .fp(fp_r), .sp(sp_r), .link_push(lk_push), .link_flit(lk_flit),
    .fifo_space, .fifo_push(sw_push), .fifo_din(sw_din), .link_space);

  // ---------------------------------------------------------------- buffers
  logic [NPORT-1:0] in_gnt, orphan;

  for (genvar p = 0; p < NPORT; p++) begin : g_fifo
    assign fifo_din[p]  = tp1_en ? tp_flit : sw_din[p];
    assign fifo_push[p] = tp1_en ? b_push  : sw_push[p];
    assign fifo_pop[p]  = test_mode ? b_pop : (in_gnt[p] || orphan[p]);
    flit_fifo #(.W(CFLIT_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .flush(b_flush), .push(fifo_push[p]), .din(fifo_din[p]),
      .pop(fifo_pop[p]), .dout(fifo_raw[p]), .empty(fifo_empty[p]),
      .full(fifo_full[p]), .free(fifo_free[p]));
    always_comb begin
      fifo_dout[p] = fifo_raw[p];
      if (fi_buf[p]) fifo_dout[p].flit.data[0] = !fifo_raw[p].flit.data[0];
    end
  end

  // ---------------------------------------------------------------- route computation
  logic [NPORT-1:0] route_v, excl_v, in_prog;
  logic [2:0]       route_port [NPORT];
  logic [2:0]       excl_port  [NPORT];
  logic [2:0]       rc_port    [NPORT];
  logic [NPORT-1:0] rc_found, rc_min;
  logic [NPORT-1:0] out_ok, dms_usable;
  logic [NPORT-1:0] head_wait, body_wait, tail_sent;
  logic [NPORT-1:0] dl_recompute, dl_eject, dl_stuck, dl_detect;
  logic [NPORT-1:0] front_head, front_tail;

  always_comb begin
    out_ok = dms_usable;
    if (Y == 0)        out_ok[P_N] = 1'b0;
    if (X == DIMX - 1) out_ok[P_E] = 1'b0;
    if (Y == DIMY - 1) out_ok[P_S] = 1'b0;
    if (X == 0)        out_ok[P_W] = 1'b0;
    for (int o = 0; o < 4; o++)
      if (out_cps[o] == CPS_LINKFAULT) out_ok[o] = 1'b0;
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_rc
    assign front_head[p] = !fifo_empty[p] && is_head(fifo_dout[p].flit);
    assign front_tail[p] = is_tail(fifo_dout[p].flit);
    routing_unit u_rc (
      .cur_x(CX), .cur_y(CY), .head(fifo_dout[p].flit), .in_port(3'(p)),
      .out_ok, .out_pref(out_cts), .excl_en(excl_v[p]), .excl(excl_port[p]),
      .eject(dl_eject[p]), .out_port(rc_port[p]), .found(rc_found[p]), .minimal(rc_min[p]));
    assign orphan[p]    = !test_mode && !fifo_empty[p] && !is_head(fifo_dout[p].flit)
                          && !in_prog[p] && !route_v[p];
    assign head_wait[p] = !test_mode && front_head[p] && !in_prog[p];
    assign body_wait[p] = !test_mode && in_prog[p];
    assign tail_sent[p] = in_gnt[p] && front_tail[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      route_v <= '0;
      excl_v  <= '0;
      in_prog <= '0;
      for (int p = 0; p < NPORT; p++) begin
        route_port[p] <= 3'd0;
        excl_port[p]  <= 3'd0;
      end
    end else if (test_mode) begin
      route_v <= '0;
      excl_v  <= '0;
      in_prog <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        if (in_gnt[p] && front_tail[p]) begin
          route_v[p] <= 1'b0;
          excl_v[p]  <= 1'b0;
          in_prog[p] <= 1'b0;
        end else if (in_gnt[p] && front_head[p]) begin
          in_prog[p] <= 1'b1;
        end else if (dl_detect[p] && head_wait[p]) begin
          route_v[p]   <= 1'b0;
          excl_v[p]    <= 1'b1;
          excl_port[p] <= route_port[p];
        end else if (!route_v[p] && head_wait[p] && rc_found[p]) begin
          route_v[p]    <= 1'b1;
          route_port[p] <= rc_port[p];
        end
      end
    end
  end

  deadlock_detector #(.THRESH(THRESH)) u_dl (
    .clk, .rst_n, .flush(test_mode), .head_wait, .body_wait, .tail_sent, .ni_free,
    .recompute(dl_recompute), .eject(dl_eject), .stuck(dl_stuck), .detect(dl_detect));

  // ---------------------------------------------------------------- switch allocation, DMS
  logic [NPORT-1:0] sa_req, out_ready, sa_want, sa_allow, out_fire, sa_locked;
  logic [2:0]       sa_out_sel [NPORT];
  logic [2:0]       xb_sel_v   [NPORT];
  logic             dms_active, dms_phase;
  logic [2:0]       dms_fm, dms_sm;
  cflit_t           xb_in [NPORT];

  assign sa_req = route_v & ~fifo_empty & {NPORT{!test_mode}};

  switch_allocator u_sa (
    .clk, .rst_n, .flush(test_mode), .req_valid(sa_req), .req_port(route_port),
    .req_head(front_head), .req_tail(front_tail),
    .out_ready, .allow(sa_allow), .want(sa_want), .in_gnt, .out_sel(sa_out_sel),
    .out_fire, .locked(sa_locked));

  dms_controller u_dms (
    .clk, .rst_n, .enable(!test_mode), .mux_fault, .want(sa_want),
    .active(dms_active), .fm(dms_fm), .sm(dms_sm), .phase(dms_phase),
    .allow(sa_allow), .usable(dms_usable));

  always_comb
    for (int p = 0; p < NPORT; p++) begin
      xb_in[p]    = tp2_en ? tp_flit : fifo_dout[p];
      xb_sel_v[p] = tp2_en ? xb_sel  : sa_out_sel[p];
    end

  crossbar_dms u_xb (
    .in_data(xb_in), .sel(xb_sel_v), .dms_active, .fm(dms_fm), .sm(dms_sm),
    .phase(dms_phase), .fi_mux, .out_data(xb_out));

  // ---------------------------------------------------------------- output side
  logic [NPORT-1:0] ov, out_acc, out_drain, xb_bad, close_pend;
  cflit_t           of [NPORT];
  logic [CRC_W-1:0] crc_out_calc [NPORT];
  cflit_t           close_flit;

  always_comb begin
    close_flit.flit.ftype = FT_TAIL;
    close_flit.flit.data  = '0;
    close_flit.crc        = crc8(close_flit.flit);
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    crc_unit u_crc_out (.valid(out_fire[o]), .cf(xb_out[o]),
                        .crc_calc(crc_out_calc[o]), .err(xb_bad[o]));
    assign out_valid[o] = ov[o] && !(is_head(of[o].flit) && out_cps[o] == CPS_PREP);
    assign out_flit[o]  = of[o];
    assign out_acc[o]   = out_valid[o] && out_cts[o];
    assign out_drain[o] = ov[o] && (o != P_L) && (out_cps[o] == CPS_LINKFAULT);
    assign out_ready[o] = !ov[o] || out_acc[o] || out_drain[o];
  end
  assign intra_err = |xb_bad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov         <= '0;
      close_pend <= '0;
      for (int o = 0; o < NPORT; o++) of[o] <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (out_ready[o]) ov[o] <= 1'b0;
        if (out_fire[o] && !(xb_bad[o] && is_head(xb_out[o].flit))) begin
          ov[o] <= 1'b1;
          of[o] <= xb_bad[o] ? close_flit : xb_out[o];
        end else if (close_pend[o] && out_ready[o]) begin
          ov[o]         <= 1'b1;
          of[o]         <= close_flit;
          close_pend[o] <= 1'b0;
        end
        // a packet cut by entering test mode is closed on its output
        if (intra_err && sa_locked[o] && !(out_fire[o] && (front_tail[sa_out_sel[o]] || xb_bad[o])))
          close_pend[o] <= 1'b1;
        if (bist_req && !test_mode && sa_locked[o] && !(out_fire[o] && front_tail[sa_out_sel[o]]))
          close_pend[o] <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- status
  always_comb begin
    stat.test_mode    = test_mode;
    stat.buf_fault    = buf_fault;
    stat.mux_fault    = mux_fault;
    stat.link_fault   = link_fault;
    stat.dbs_state    = dbs_state;
    stat.dms_active   = dms_active;
    stat.dms_shared   = dms_active && out_fire[dms_fm];
    stat.swapped_flit = dbs_swap && sw_push[sp_r];
    stat.link_err     = link_err;
    stat.intra_err    = intra_err;
    stat.dl_detect    = dl_detect;
    stat.dl_reroute   = dl_recompute;
    stat.dl_eject     = '0;
    stat.misroute     = 1'b0;
    for (int p = 0; p < NPORT; p++) begin
      if (in_gnt[p] && front_head[p] && dl_eject[p] && route_port[p] == 3'(P_L)) stat.dl_eject[p] = 1'b1;
      if (!route_v[p] && head_wait[p] && rc_found[p] && !rc_min[p] && !dl_eject[p]) stat.misroute = 1'b1;
    end
    stat.drop = out_drain;
  end

  a_swap_dp: assert property (@(posedge clk) disable iff (!rst_n) dbs_swap |-> dp_r == sp_r);
endmodule
