// network_interface: connects a processing element (PE) to the Local port of
// its router, and holds packets that the router sends back for deadlock
// recovery.
//
// Injection: the PE offers flits (valid/ready); the interface attaches the
// CRC-8 and presents them to the router's Local input with the same
// valid/CTS/CPS rules as a router link (no new head while CPS is 01).
// Ejection: flits arrive from the router's Local output. A packet whose head
// names this node is delivered to the PE (`pe_out_*`, with `pe_crc_err` set
// for a flit whose CRC fails). A packet addressed elsewhere has been ejected
// by the router's deadlock recovery: it is stored whole in the re-send memory
// (RS_DEPTH flits) and injected again once complete, ahead of new PE packets
// but only between packets. `ni_free` tells the router that the memory has
// room for a packet of MAX_PKT flits. CTS towards the router is high when the
// PE can take a flit and the re-send memory is not full.
// The re-send behaviour (send blocked packets to the local PE's memory and
// send them again, only when there are free slots) follows the design; the
// memory size and the arbitration are this implementation's choices.
module network_interface
  import noc_pkg::*;
#(
  parameter int X        = 0,
  parameter int Y        = 0,
  parameter int RS_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // PE injection
  input  logic   pe_in_valid,
  input  flit_t  pe_in_flit,
  output logic   pe_in_ready,
  // PE delivery
  output logic   pe_out_valid,
  output flit_t  pe_out_flit,
  output logic   pe_crc_err,
  input  logic   pe_out_ready,
  // router Local input
  output logic   r_in_valid,
  output cflit_t r_in_flit,
  input  logic   r_in_cts,
  input  cps_e   r_in_cps,
  // router Local output
  input  logic   r_out_valid,
  input  cflit_t r_out_flit,
  output logic   r_out_cts,
  output cps_e   r_out_cps,
  output logic   ni_free,
  output logic   resend_evt     // a recovered packet's head re-enters the network
);
  localparam int FW = $clog2(RS_DEPTH + 1);

  // ---------------------------------------------------------------- ejection
  logic   ej_acc, ej_resend_pkt, ej_to_rs;
  logic   rs_full, rs_empty, rs_push, rs_pop;
  cflit_t rs_dout;
  logic [FW-1:0] rs_free;
  logic [FW-1:0] rs_pkts;     // complete packets held
  logic   crc_bad;
  logic [CRC_W-1:0] crc_calc;

  assign r_out_cts = pe_out_ready && !rs_full;
  assign r_out_cps = CPS_NORMAL;
  assign ej_acc    = r_out_valid && r_out_cts;
  assign ej_to_rs  = is_head(r_out_flit.flit)
                     ? (hd_dx(r_out_flit.flit) != COORD_W'(X) || hd_dy(r_out_flit.flit) != COORD_W'(Y))
                     : ej_resend_pkt;
  assign rs_push   = ej_acc && ej_to_rs;

  crc_unit u_crc (.valid(ej_acc && !ej_to_rs), .cf(r_out_flit), .crc_calc, .err(crc_bad));

  assign pe_out_valid = ej_acc && !ej_to_rs;
  assign pe_out_flit  = r_out_flit.flit;
  assign pe_crc_err   = crc_bad;

  flit_fifo #(.W(CFLIT_W), .DEPTH(RS_DEPTH)) u_rs (
    .clk, .rst_n, .flush(1'b0), .push(rs_push), .din(r_out_flit), .pop(rs_pop),
    .dout(rs_dout), .empty(rs_empty), .full(rs_full), .free(rs_free));

  assign ni_free = (rs_free >= FW'(MAX_PKT));

  // ---------------------------------------------------------------- injection
  logic   ov, busy, from_rs;
  cflit_t of;
  logic   out_ok, load, src_valid;
  cflit_t src_flit;

  assign r_in_valid = ov && !(is_head(of.flit) && r_in_cps == CPS_PREP);
  assign r_in_flit  = of;
  assign out_ok     = !ov || (r_in_valid && r_in_cts);

  always_comb begin
    logic use_rs;
    use_rs = busy ? from_rs : (rs_pkts != '0);
    if (use_rs) begin
      src_valid = !rs_empty;
      src_flit  = rs_dout;
    end else begin
      src_valid      = pe_in_valid;
      src_flit.flit  = pe_in_flit;
      src_flit.crc   = crc8(pe_in_flit);
    end
    load        = out_ok && src_valid;
    pe_in_ready = out_ok && !use_rs;
    rs_pop      = load && use_rs;
  end

  assign resend_evt = rs_pop && is_head(rs_dout.flit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov            <= 1'b0;
      of            <= '0;
      busy          <= 1'b0;
      from_rs       <= 1'b0;
      ej_resend_pkt <= 1'b0;
      rs_pkts       <= '0;
    end else begin
      if (out_ok) ov <= 1'b0;
      if (load) begin
        ov <= 1'b1;
        of <= src_flit;
        if (is_head(src_flit.flit)) from_rs <= rs_pop;
        busy <= !is_tail(src_flit.flit);
      end
      if (ej_acc && is_head(r_out_flit.flit)) ej_resend_pkt <= ej_to_rs;
      rs_pkts <= rs_pkts + FW'(rs_push && is_tail(r_out_flit.flit))
                         - FW'(rs_pop && is_tail(rs_dout.flit));
    end
  end
endmodule
