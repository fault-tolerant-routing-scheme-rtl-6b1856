// flit_fifo: one input buffer of the router, a synchronous first-in
// first-out queue of DEPTH entries of W bits (default: 8 flits with CRC).
//
// Write with `push`, read the oldest entry on `dout` (valid whenever `empty`
// is low) and remove it with `pop`; both may happen in the same cycle.
// `flush` empties the queue (used when the router enters and leaves test
// mode). `free` is the number of empty slots and is used to compute the
// link's CTS. Pushing when full or popping when empty is an error that the
// assertions flag; the queue ignores such requests. The depth of 8 is the
// buffer size of the evaluated network; the storage is a plain array with
// read and write pointers, an implementation choice.
module flit_fifo #(
  parameter int W     = noc_pkg::CFLIT_W,
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;
  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign free    = CW'(DEPTH) - count;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || flush) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush) pop |-> !empty);
endmodule
