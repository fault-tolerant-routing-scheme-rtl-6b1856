// routing_unit: route computation for the head flit of one input buffer.
//
// Fault-free routing uses the odd-even turn model (minimal, adaptive and
// deadlock-free): with x growing East and y growing South, East-bound packets
// may turn North/South only in odd columns or in their source column, and
// may not enter an even destination column from its left neighbour by a
// last East hop unless allowed; West-bound packets may turn North/South only
// in even columns. Among the allowed directions the unit drops outputs whose
// link is faulty or absent (`out_ok`), and an output named by `excl` when
// the deadlock detector asks for a recomputation. If several remain it
// prefers one whose output has room now (`out_pref`), then the lowest port.
// If none remains it misroutes to any healthy output other than the arrival
// port and `excl`, which is how packets get around hard link faults.
// `eject` forces the Local port (deadlock recovery through the network
// interface). Purely combinational.
// The odd-even algorithm and the reroute/eject steps follow the design; the
// selection order and the misroute fallback are this implementation's own.
module routing_unit
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  flit_t              head,
  input  logic [2:0]         in_port,
  input  logic [NPORT-1:0]   out_ok,
  input  logic [NPORT-1:0]   out_pref,
  input  logic               excl_en,
  input  logic [2:0]         excl,
  input  logic               eject,
  output logic [2:0]         out_port,
  output logic               found,
  output logic               minimal
);
  logic [NPORT-1:0] avail, cand, fall;
  logic signed [COORD_W:0] e0, e1;
  logic [COORD_W-1:0] dx, dy, sx;

  always_comb begin
    dx = hd_dx(head);
    dy = hd_dy(head);
    sx = hd_sx(head);
    e0 = $signed({1'b0, dx}) - $signed({1'b0, cur_x});
    e1 = $signed({1'b0, dy}) - $signed({1'b0, cur_y});
    avail = '0;
    if (e0 == 0 && e1 == 0) begin
      avail[P_L] = 1'b1;
    end else if (e0 == 0) begin
      if (e1 > 0) avail[P_S] = 1'b1; else avail[P_N] = 1'b1;
    end else if (e0 > 0) begin
      if (e1 == 0) avail[P_E] = 1'b1;
      else begin
        if (cur_x[0] || cur_x == sx) begin
          if (e1 > 0) avail[P_S] = 1'b1; else avail[P_N] = 1'b1;
        end
        if (dx[0] || e0 != 1) avail[P_E] = 1'b1;
      end
    end else begin
      avail[P_W] = 1'b1;
      if (!cur_x[0] && e1 != 0) begin
        if (e1 > 0) avail[P_S] = 1'b1; else avail[P_N] = 1'b1;
      end
    end
  end

  always_comb begin
    logic [NPORT-1:0] keep;
    keep = out_ok;
    if (excl_en) keep[excl] = 1'b0;
    cand = avail & keep;
    fall = keep;
    fall[P_L] = 1'b0;
    fall[in_port] = 1'b0;
    found    = 1'b0;
    minimal  = 1'b0;
    out_port = 3'(P_L);
    if (eject) begin
      found    = out_ok[P_L];
      out_port = 3'(P_L);
    end else if (avail[P_L]) begin
      found    = out_ok[P_L];
      minimal  = 1'b1;
      out_port = 3'(P_L);
    end else if (cand != '0) begin
      found   = 1'b1;
      minimal = 1'b1;
      for (int p = NPORT - 1; p >= 0; p--)
        if (cand[p]) out_port = 3'(p);
      for (int p = NPORT - 1; p >= 0; p--)
        if (cand[p] && out_pref[p]) out_port = 3'(p);
    end else if (fall != '0) begin
      found = 1'b1;
      for (int p = NPORT - 1; p >= 0; p--)
        if (fall[p]) out_port = 3'(p);
    end
  end
endmodule
