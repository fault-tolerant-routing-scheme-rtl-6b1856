// switch_allocator: gives each output port to one input buffer per cycle.
//
// Input i requests output req_port[i] when req_valid[i] is high (a flit with a
// computed route waits at the head of its buffer). Wormhole switching: a head
// flit wins an output through a per-output round-robin arbiter and the output
// stays locked to that input until the tail flit passes, so packets never
// interleave on a link. An output can be granted only when `out_ready` says
// its output register can take a flit and `allow` (from the DMS controller)
// says its crossbar MUX is available this cycle. `want[o]` tells the DMS
// controller which outputs have a flit that could move now; it does not
// depend on `allow`. `flush` (test mode) drops all locks.
// Outputs: grant per input (pop its buffer), and per output the selected
// input and a fire strobe. The design only names this block; the round-robin
// and wormhole policy are the usual ones and this implementation's choice.
module switch_allocator
  import noc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [NPORT-1:0] req_valid,
  input  logic [2:0]       req_port [NPORT],
  input  logic [NPORT-1:0] req_head,
  input  logic [NPORT-1:0] req_tail,
  input  logic [NPORT-1:0] out_ready,
  input  logic [NPORT-1:0] allow,
  output logic [NPORT-1:0] want,
  output logic [NPORT-1:0] in_gnt,
  output logic [2:0]       out_sel [NPORT],
  output logic [NPORT-1:0] out_fire,
  output logic [NPORT-1:0] locked
);
  logic [2:0]       owner [NPORT];
  logic [2:0]       ptr   [NPORT];
  logic [NPORT-1:0] head_req [NPORT];
  logic [NPORT-1:0] arb_any;
  logic [2:0]       arb_idx [NPORT];

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      head_req[o] = '0;
      for (int i = 0; i < NPORT; i++)
        head_req[o][i] = req_valid[i] && req_head[i] && (req_port[i] == 3'(o));
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_arb
    rr_arbiter #(.N(NPORT)) u_arb (
      .req(head_req[o]), .ptr(ptr[o]), .any(arb_any[o]), .idx(arb_idx[o]));
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      out_sel[o] = locked[o] ? owner[o] : arb_idx[o];
      if (locked[o])
        want[o] = req_valid[owner[o]] && (req_port[owner[o]] == 3'(o)) && out_ready[o];
      else
        want[o] = arb_any[o] && out_ready[o];
    end
  end

  always_comb begin
    in_gnt   = '0;
    out_fire = '0;
    for (int o = 0; o < NPORT; o++)
      if (want[o] && allow[o]) begin
        out_fire[o]        = 1'b1;
        in_gnt[out_sel[o]] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= '0;
      for (int o = 0; o < NPORT; o++) begin
        owner[o] <= 3'd0;
        ptr[o]   <= 3'd0;
      end
    end else if (flush) begin
      locked <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (out_fire[o]) begin
          if (!locked[o]) begin
            owner[o] <= out_sel[o];
            ptr[o]   <= (out_sel[o] == 3'(NPORT - 1)) ? 3'd0 : out_sel[o] + 3'd1;
          end
          locked[o] <= !req_tail[out_sel[o]];
        end
      end
    end
  end

  // a flit that is not a head may only move through an output locked to its input
  a_wormhole: assert property (@(posedge clk) disable iff (!rst_n || flush)
    (out_fire[0] && !req_head[out_sel[0]]) |-> locked[0]);
endmodule
