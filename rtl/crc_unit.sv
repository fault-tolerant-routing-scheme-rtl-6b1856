// crc_unit: CRC generator and checker for one flit.
//
// `crc_calc` is the CRC-8 (polynomial 0x07) of the 34 flit bits; the network
// interface attaches it to every flit it injects. `err` is high when a valid
// flit arrives with a CRC that does not match its contents. One instance sits
// at every router input, where a mismatch means the link corrupted the flit,
// and one at every router output, where a mismatch on a flit that passed the
// input check means the router's buffer or crossbar corrupted it. The check
// is purely combinational. The design places a CRC check at both sides of
// the router; the polynomial and the per-flit granularity are choices of
// this implementation.
module crc_unit
  import noc_pkg::*;
(
  input  logic       valid,
  input  cflit_t     cf,
  output logic [CRC_W-1:0] crc_calc,
  output logic       err
);
  assign crc_calc = crc8(cf.flit);
  assign err      = valid && (crc_calc != cf.crc);
endmodule
