// deadlock_detector: blockage detection and recovery for the five input
// buffers of a router.
//
// Each buffer has a counter that starts when a head flit is at the front of
// the buffer and counts every cycle until the packet's tail flit has left.
// When it reaches THRESH the packet is treated as deadlocked:
//   * if its head flit has not left yet, the first time the route is
//     recomputed with the current output excluded (`recompute`, the reset of
//     RC and SA); if it blocks again and the network interface has free
//     memory (`ni_free`), the packet is sent to the local network interface
//     (`eject`), which re-sends it later; without free memory the route is
//     recomputed again;
//   * if its head has already left, the packet can no longer be redirected
//     and `stuck` is raised for it.
// The counter is cleared on every recovery action and when the tail leaves.
// `recompute` is a one-cycle pulse, `eject` stays high until the tail leaves.
// The counter, its start/stop rule and the two recovery steps follow the
// design; the threshold (not given there) and counting from the moment the
// head reaches the front of the buffer are this implementation's choices.
module deadlock_detector
  import noc_pkg::*;
#(
  parameter int THRESH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [NPORT-1:0] head_wait,   // head flit at the front, not yet sent
  input  logic [NPORT-1:0] body_wait,   // head sent, tail not yet sent
  input  logic [NPORT-1:0] tail_sent,
  input  logic             ni_free,
  output logic [NPORT-1:0] recompute,
  output logic [NPORT-1:0] eject,
  output logic [NPORT-1:0] stuck,
  output logic [NPORT-1:0] detect      // threshold reached this cycle
);
  localparam int CW = $clog2(THRESH + 1);
  logic [CW-1:0] cnt   [NPORT];
  logic [NPORT-1:0] tried;   // one recomputation already done for this packet

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      detect[i]    = (cnt[i] == CW'(THRESH)) && (head_wait[i] || body_wait[i]);
      recompute[i] = detect[i] && head_wait[i] && !eject[i] && (!tried[i] || !ni_free);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tried <= '0;
      eject <= '0;
      stuck <= '0;
      for (int i = 0; i < NPORT; i++) cnt[i] <= '0;
    end else if (flush) begin
      tried <= '0;
      eject <= '0;
      stuck <= '0;
      for (int i = 0; i < NPORT; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NPORT; i++) begin
        if (tail_sent[i]) begin
          cnt[i]   <= '0;
          tried[i] <= 1'b0;
          eject[i] <= 1'b0;
          stuck[i] <= 1'b0;
        end else if (detect[i]) begin
          cnt[i] <= '0;
          if (head_wait[i] && !eject[i]) begin
            if (tried[i] && ni_free) eject[i] <= 1'b1;
            tried[i] <= 1'b1;
          end else if (!head_wait[i]) begin
            stuck[i] <= 1'b1;
            cnt[i]   <= cnt[i];
          end
        end else if (head_wait[i] || body_wait[i]) begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end
endmodule
