// dbs_controller: Dynamic Buffer Swapping for one router.
//
// When the built-in self-test marks an input buffer as faulty, that port's
// link is not dead: its packets can be held, one at a time, in the buffer of
// another (healthy) port. The controller runs the three-state scheme of the
// design for the faulty port FP:
//   S0  FP's link is blocked (CPS 10, CTS 0). A flit waiting on FP's link is a
//       request for the faulty buffer and moves the controller to S1, choosing
//       the substitute port SP round-robin among the healthy ports.
//   S1  SP's link gets CPS 01: its upstream router may finish the packet it
//       is sending but must not start a new one, so packets cannot interleave
//       in SP's buffer. When SP's buffer is empty and no packet is open on
//       SP's link, go to S2.
//   S2  The buffer swapper steers FP's link into SP's buffer (FP: CPS 00 with
//       CTS from SP's buffer; SP: CPS 10, CTS 0). When the tail flit of the
//       swapped packet has been accepted, return to S0 and advance the
//       round-robin pointer.
// Registers FP_R, SP_R and DP_R (the buffer that FP's link writes) are kept
// as in the design. Only one faulty buffer (the lowest-numbered) is swapped;
// further faulty buffers stay blocked, which is this implementation's
// choice. `enable` low (test mode) returns the controller to S0.
// Outputs depend only on registers, so the CPS/CTS enables sent to the
// neighbours carry no combinational path from their own inputs.
module dbs_controller
  import noc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [NPORT-1:0] buf_fault,    // faulty input buffers (from BIST)
  input  logic [NPORT-1:0] link_valid,   // upstream presents a flit on link p
  input  logic [NPORT-1:0] link_xfer,    // a flit is accepted on link p
  input  logic [NPORT-1:0] link_tail,    // ... and it is a tail flit
  input  logic [NPORT-1:0] link_head,    // ... and it is a head flit
  input  logic [NPORT-1:0] fifo_empty,
  output logic             swap,         // buffer swapper active (S2)
  output logic [2:0]       fp_r,
  output logic [2:0]       sp_r,
  output logic [2:0]       dp_r,
  output logic [1:0]       state,        // 0: S0, 1: S1, 2: S2
  output cps_e             cps    [NPORT],
  output logic [NPORT-1:0] cts_en        // link p may be written (space permitting)
);
  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2} dbs_state_e;

  dbs_state_e st;
  logic       fp_valid;
  logic [2:0] fp_c, rr_ptr, sp_c;
  logic       sp_found;
  logic [NPORT-1:0] pkt_open;   // a packet is in progress on link p

  // lowest-numbered faulty buffer
  always_comb begin
    fp_valid = 1'b0;
    fp_c     = 3'd0;
    for (int p = NPORT - 1; p >= 0; p--)
      if (buf_fault[p]) begin
        fp_valid = 1'b1;
        fp_c     = 3'(p);
      end
  end

  // round-robin search for a healthy substitute, starting after rr_ptr
  always_comb begin
    logic [2:0] c;
    sp_found = 1'b0;
    sp_c     = 3'd0;
    for (int k = NPORT; k >= 1; k--) begin
      c = 3'((int'(rr_ptr) + k) % NPORT);
      if (!buf_fault[c] && c != fp_c) begin
        sp_found = 1'b1;
        sp_c     = c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S0;
      fp_r     <= 3'd0;
      sp_r     <= 3'd0;
      dp_r     <= 3'd0;
      rr_ptr   <= 3'd0;
      pkt_open <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++)
        if (!enable) pkt_open[p] <= 1'b0;
        else if (link_xfer[p] && link_tail[p]) pkt_open[p] <= 1'b0;
        else if (link_xfer[p] && link_head[p]) pkt_open[p] <= 1'b1;
      if (!enable || !fp_valid) begin
        st   <= S0;
        fp_r <= fp_c;
        dp_r <= fp_c;
      end else begin
        case (st)
          S0: begin
            fp_r <= fp_c;
            dp_r <= fp_c;
            if (link_valid[fp_c] && sp_found) begin
              st   <= S1;
              sp_r <= sp_c;
            end
          end
          S1: if (fifo_empty[sp_r] && !pkt_open[sp_r] && !link_xfer[sp_r]) begin
            st   <= S2;
            dp_r <= sp_r;
          end
          S2: if (link_xfer[fp_r] && link_tail[fp_r]) begin
            st     <= S0;
            dp_r   <= fp_r;
            rr_ptr <= sp_r;
          end
          default: st <= S0;
        endcase
      end
    end
  end

  assign swap  = (st == S2);
  assign state = st;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      cps[p]    = buf_fault[p] ? CPS_BLOCKED : CPS_NORMAL;
      cts_en[p] = !buf_fault[p];
    end
    if (fp_valid) begin
      case (st)
        S1: begin
          cps[sp_r] = CPS_PREP;
        end
        S2: begin
          cps[fp_r]    = CPS_NORMAL;
          cts_en[fp_r] = 1'b1;
          cps[sp_r]    = CPS_BLOCKED;
          cts_en[sp_r] = 1'b0;
        end
        default: ;
      endcase
    end
  end

  a_sp_healthy: assert property (@(posedge clk) disable iff (!rst_n)
                                 (st == S2) |-> (!buf_fault[sp_r] && sp_r != fp_r));
endmodule
