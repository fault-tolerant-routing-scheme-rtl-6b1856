// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants the first requester at or after position `ptr` (wrapping around).
// Purely combinational: the caller keeps `ptr` and moves it past the winner
// when the grant is used, which gives every requester a turn.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] ptr,
  output logic                 any,
  output logic [$clog2(N)-1:0] idx
);
  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      int c;
      c = (int'(ptr) + k) % N;
      if (req[c]) begin
        any = 1'b1;
        idx = $clog2(N)'(c);
      end
    end
  end
endmodule
