// crossbar_dms: the router's crossbar with the MUX swapper of Dynamic MUX
// Swapping.
//
// Output o is normally driven by MUX o, which picks one of the five input
// buffers with sel[o]. When `dms_active` is set, the faulty MUX `fm` is cut
// off and MUX `sm` (its ring predecessor) is switched onto output `fm`
// through the ring switches: in phase 1 it takes sel[fm] and drives output
// fm, in phase 0 it takes sel[sm] and drives its own output. This mirrors the
// pass switches C1-C5 (MUX onto the ring) and C6-C10 (MUX onto its own
// output) of the design. `fi_mux` is a fault-injection input for
// verification: it flips data bit 0 at the output of a MUX, modelling a
// broken MUX that the output CRC check and the self-test then expose.
// The design describes 4x1 MUXes (no U-turn input); these MUXes have all five
// inputs because, with buffer swapping, a buffer may hold a packet that must
// leave through the buffer's own port. Purely combinational.
module crossbar_dms
  import noc_pkg::*;
(
  input  cflit_t           in_data [NPORT],
  input  logic [2:0]       sel     [NPORT],
  input  logic             dms_active,
  input  logic [2:0]       fm,
  input  logic [2:0]       sm,
  input  logic             phase,
  input  logic [NPORT-1:0] fi_mux,
  output cflit_t           out_data [NPORT]
);
  cflit_t     mux_out [NPORT];
  logic [2:0] msel    [NPORT];

  always_comb begin
    for (int m = 0; m < NPORT; m++) begin
      msel[m] = sel[m];
      if (dms_active && 3'(m) == sm && phase) msel[m] = sel[fm];
      mux_out[m] = in_data[msel[m] < 3'(NPORT) ? msel[m] : 3'd0];
      if (fi_mux[m]) mux_out[m].flit.data[0] = !mux_out[m].flit.data[0];
    end
    for (int o = 0; o < NPORT; o++)
      out_data[o] = (dms_active && 3'(o) == fm) ? mux_out[sm] : mux_out[o];
  end
endmodule
