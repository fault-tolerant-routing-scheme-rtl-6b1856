// buffer_swapper: connects the five physical input links to the five input
// FIFOs of the router.
//
// Normally link p writes FIFO p. While `swap` is high, the link of the faulty
// port `fp` is steered into the FIFO of the substitute port `sp` instead, and
// the substitute's own link is cut off (its CTS is held low by the DBS
// controller, so nothing arrives there). The CTS a link sees is the
// "space available" signal of the FIFO it currently writes. Purely
// combinational: a flit accepted on a link is written in the same cycle's
// clock edge. The design names this block and its role; the multiplexer
// structure is the simplest that performs it.
module buffer_swapper
  import noc_pkg::*;
#(
  parameter int N = NPORT
) (
  input  logic         swap,
  input  logic [2:0]   fp,
  input  logic [2:0]   sp,
  input  logic [N-1:0] link_push,      // link p delivers a flit this cycle
  input  cflit_t       link_flit [N],
  input  logic [N-1:0] fifo_space,     // FIFO q can accept flits
  output logic [N-1:0] fifo_push,
  output cflit_t       fifo_din  [N],
  output logic [N-1:0] link_space      // space seen by link p
);
  always_comb begin
    for (int q = 0; q < N; q++) begin
      fifo_push[q] = link_push[q];
      fifo_din[q]  = link_flit[q];
      link_space[q] = fifo_space[q];
    end
    if (swap) begin
      fifo_push[sp]  = link_push[fp];
      fifo_din[sp]   = link_flit[fp];
      fifo_push[fp]  = 1'b0;
      link_space[fp] = fifo_space[sp];
      link_space[sp] = 1'b0;
    end
  end
endmodule
