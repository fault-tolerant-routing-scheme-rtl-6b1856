// bist_unit: built-in self-test and diagnosis of the router's input buffers
// and crossbar MUXes.
//
// On `start` (after reset, on an intra-router CRC error, or on request) the
// router enters test mode (`test_mode` high: links are stalled and normal
// traffic is held off) and the unit runs:
//   FLUSH  empty all five buffers;
//   WR     test pattern 1 (a 32-bit LFSR sequence, wrapped as flits with a
//          valid CRC) is written into all five buffers through the MUX in front
//          of each buffer, DEPTH flits so every slot is used;
//   RD     the buffers are read out; signature analyzer 1 compacts each
//          buffer's output in its own MISR lane while a reference MISR
//          compacts the regenerated pattern sequence;
//   XB     test pattern 2 is applied to all crossbar inputs through the MUX
//          behind each buffer; every output MUX selects input 0, 1, ... 4 in
//          turn for XB_PAT cycles each, and signature analyzer 2 compacts
//          every MUX output against a reference MISR;
//   CMP    a lane whose signature differs from the reference marks that
//          buffer (`buf_fault`) or MUX (`mux_fault`) faulty;
//   CLEAN  empty the buffers again, then leave test mode with a `done` pulse.
// Fault maps are registers that keep their value until the next test.
// The structure (BIST controller, two test-pattern sources, two signature
// analyzers, MUXes in front of and behind the buffers) is the design's; the
// LFSR and MISR polynomials, the sequence and its lengths are this
// implementation's. Test mode lasts 3 + 2*DEPTH + 5*XB_PAT cycles (39 at the defaults).
module bist_unit
  import noc_pkg::*;
#(
  parameter int DEPTH  = 8,
  parameter int XB_PAT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             test_mode,
  output logic             done,
  output logic [NPORT-1:0] buf_fault,
  output logic [NPORT-1:0] mux_fault,
  // test access to the datapath
  output logic             tp1_en,      // buffers take tp_flit instead of link data
  output logic             tp2_en,      // crossbar takes tp_flit instead of buffer data
  output cflit_t           tp_flit,
  output logic             fifo_push,
  output logic             fifo_pop,
  output logic             fifo_flush,
  output logic [2:0]       xb_sel,      // input selected by every output MUX
  input  cflit_t           fifo_dout [NPORT],
  input  cflit_t           xb_out    [NPORT]
);
  typedef enum logic [2:0] {
    B_IDLE, B_FLUSH, B_WR, B_RD, B_XB, B_CMP, B_CLEAN
  } bist_state_e;

  localparam logic [31:0] SEED = 32'hACE1_1D5B;
  localparam int          CNTW = $clog2(2 * DEPTH + 5 * XB_PAT + 2);

  bist_state_e st;
  logic [31:0]       lfsr;
  logic [CNTW-1:0]   cnt;
  logic [CFLIT_W-1:0] sig1 [NPORT];
  logic [CFLIT_W-1:0] sig2 [NPORT];
  logic [CFLIT_W-1:0] ref1, ref2;

  function automatic logic [31:0] lfsr_next(logic [31:0] v);
    // x^32 + x^22 + x^2 + x + 1, Galois form
    return v[0] ? ((v >> 1) ^ 32'h8020_0003) : (v >> 1);
  endfunction

  function automatic logic [CFLIT_W-1:0] misr(logic [CFLIT_W-1:0] s, logic [CFLIT_W-1:0] d);
    logic [CFLIT_W-1:0] r;
    r = {s[CFLIT_W-2:0], s[CFLIT_W-1]} ^ d;
    if (s[CFLIT_W-1]) r = r ^ CFLIT_W'(8'h1D);
    return r;
  endfunction

  always_comb begin
    tp_flit.flit.ftype = FT_BODY;
    tp_flit.flit.data  = lfsr;
    tp_flit.crc        = crc8(tp_flit.flit);
  end

  assign test_mode  = (st != B_IDLE);
  assign fifo_flush = (st == B_FLUSH) || (st == B_CLEAN);
  assign fifo_push  = (st == B_WR);
  assign fifo_pop   = (st == B_RD);
  assign tp1_en     = test_mode;
  assign tp2_en     = (st == B_XB);
  assign xb_sel     = 3'(int'(cnt) / XB_PAT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= B_IDLE;
      lfsr      <= SEED;
      cnt       <= '0;
      ref1      <= '0;
      ref2      <= '0;
      buf_fault <= '0;
      mux_fault <= '0;
      done      <= 1'b0;
      for (int p = 0; p < NPORT; p++) begin
        sig1[p] <= '0;
        sig2[p] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (st)
        B_IDLE: if (start) st <= B_FLUSH;
        B_FLUSH: begin
          lfsr <= SEED;
          cnt  <= '0;
          ref1 <= '0;
          ref2 <= '0;
          for (int p = 0; p < NPORT; p++) begin
            sig1[p] <= '0;
            sig2[p] <= '0;
          end
          st <= B_WR;
        end
        B_WR: begin
          lfsr <= lfsr_next(lfsr);
          cnt  <= cnt + 1'b1;
          if (int'(cnt) == DEPTH - 1) begin
            cnt  <= '0;
            lfsr <= SEED;
            st   <= B_RD;
          end
        end
        B_RD: begin
          lfsr <= lfsr_next(lfsr);
          ref1 <= misr(ref1, tp_flit);
          for (int p = 0; p < NPORT; p++) sig1[p] <= misr(sig1[p], fifo_dout[p]);
          cnt <= cnt + 1'b1;
          if (int'(cnt) == DEPTH - 1) begin
            cnt <= '0;
            st  <= B_XB;
          end
        end
        B_XB: begin
          lfsr <= lfsr_next(lfsr);
          ref2 <= misr(ref2, tp_flit);
          for (int p = 0; p < NPORT; p++) sig2[p] <= misr(sig2[p], xb_out[p]);
          cnt <= cnt + 1'b1;
          if (int'(cnt) == 5 * XB_PAT - 1) st <= B_CMP;
        end
        B_CMP: begin
          for (int p = 0; p < NPORT; p++) begin
            buf_fault[p] <= (sig1[p] != ref1);
            mux_fault[p] <= (sig2[p] != ref2);
          end
          st <= B_CLEAN;
        end
        B_CLEAN: begin
          st   <= B_IDLE;
          done <= 1'b1;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
