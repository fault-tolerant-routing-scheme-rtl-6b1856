// noc_mesh: DIMX x DIMY mesh network-on-chip built from fault-tolerant
// routers, with one network interface per node (default 8 x 8, the size of
// the evaluated network).
//
// Router (x, y) sits at node n = y*DIMX + x; x grows East and y grows South.
// Neighbouring routers are joined by a link in each direction (valid, flit
// with CRC, CTS, CPS). Links off the edge of the mesh are tied inactive and
// the routers never route to them. Each node's Local port is joined to its
// network interface, whose PE side is brought out as ports.
//
// Ports per node: PE injection (pe_in_*), PE delivery (pe_out_*: a flit is
// delivered in each cycle pe_out_valid is high, which can only happen while
// pe_out_ready is high), the router's ni_free-driven recovery activity
// (resend_evt) and status (stat). Verification inputs: bist_req starts a
// self-test; fi_buf / fi_mux flip data bit 0 at the output of a router's
// buffer / crossbar MUX; fi_link[n][d] flips data bit 0 on the wires of
// router n's output link in direction d (a broken link wire). All other
// choices are those of router and network_interface.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int DIMX     = 8,
  parameter int DIMY     = 8,
  parameter int DEPTH    = 8,
  parameter int THRESH   = 64,
  parameter int RS_DEPTH = 16,
  localparam int NN      = DIMX * DIMY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NN-1:0]    pe_in_valid,
  input  flit_t            pe_in_flit   [NN],
  output logic [NN-1:0]    pe_in_ready,
  output logic [NN-1:0]    pe_out_valid,
  output flit_t            pe_out_flit  [NN],
  output logic [NN-1:0]    pe_crc_err,
  input  logic [NN-1:0]    pe_out_ready,
  output logic [NN-1:0]    resend_evt,
  input  logic [NN-1:0]    bist_req,
  input  logic [NPORT-1:0] fi_buf  [NN],
  input  logic [NPORT-1:0] fi_mux  [NN],
  input  logic [3:0]       fi_link [NN],
  output rstat_t           stat    [NN]
);
  // per-router link bundles
  logic [NPORT-1:0] r_in_valid  [NN];
  cflit_t           r_in_flit   [NN][NPORT];
  logic [NPORT-1:0] r_in_cts    [NN];
  cps_e             r_in_cps    [NN][NPORT];
  logic [NPORT-1:0] r_out_valid [NN];
  cflit_t           r_out_flit  [NN][NPORT];
  logic [NPORT-1:0] r_out_cts   [NN];
  cps_e             r_out_cps   [NN][NPORT];
  logic [NN-1:0]    ni_free;

  for (genvar y = 0; y < DIMY; y++) begin : g_y
    for (genvar x = 0; x < DIMX; x++) begin : g_x
      localparam int N = y * DIMX + x;

      router #(.X(x), .Y(y), .DIMX(DIMX), .DIMY(DIMY), .DEPTH(DEPTH), .THRESH(THRESH)) u_router (
        .clk, .rst_n,
        .in_valid(r_in_valid[N]), .in_flit(r_in_flit[N]), .in_cts(r_in_cts[N]), .in_cps(r_in_cps[N]),
        .out_valid(r_out_valid[N]), .out_flit(r_out_flit[N]), .out_cts(r_out_cts[N]), .out_cps(r_out_cps[N]),
        .ni_free(ni_free[N]), .bist_req(bist_req[N]), .fi_buf(fi_buf[N]), .fi_mux(fi_mux[N]),
        .stat(stat[N]));

      network_interface #(.X(x), .Y(y), .RS_DEPTH(RS_DEPTH)) u_ni (
        .clk, .rst_n,
        .pe_in_valid(pe_in_valid[N]), .pe_in_flit(pe_in_flit[N]), .pe_in_ready(pe_in_ready[N]),
        .pe_out_valid(pe_out_valid[N]), .pe_out_flit(pe_out_flit[N]), .pe_crc_err(pe_crc_err[N]),
        .pe_out_ready(pe_out_ready[N]),
        .r_in_valid(r_in_valid[N][P_L]), .r_in_flit(r_in_flit[N][P_L]),
        .r_in_cts(r_in_cts[N][P_L]), .r_in_cps(r_in_cps[N][P_L]),
        .r_out_valid(r_out_valid[N][P_L]), .r_out_flit(r_out_flit[N][P_L]),
        .r_out_cts(r_out_cts[N][P_L]), .r_out_cps(r_out_cps[N][P_L]),
        .ni_free(ni_free[N]), .resend_evt(resend_evt[N]));

      // mesh links: input port d of router N is fed by the neighbour in direction d
      for (genvar d = 0; d < 4; d++) begin : g_d
        localparam int NX = (d == 1) ? x + 1 : (d == 3) ? x - 1 : x;
        localparam int NY = (d == 2) ? y + 1 : (d == 0) ? y - 1 : y;
        localparam int OD = (d + 2) % 4;   // the neighbour's port facing back
        if (NX >= 0 && NX < DIMX && NY >= 0 && NY < DIMY) begin : g_link
          localparam int M = NY * DIMX + NX;
          always_comb begin
            r_in_flit[N][d] = r_out_flit[M][OD];
            if (fi_link[M][OD]) r_in_flit[N][d].flit.data[0] = !r_out_flit[M][OD].flit.data[0];
          end
          assign r_in_valid[N][d] = r_out_valid[M][OD];
          assign r_out_cts[N][d]  = r_in_cts[M][OD];
          assign r_out_cps[N][d]  = r_in_cps[M][OD];
        end else begin : g_edge
          assign r_in_flit[N][d]  = '0;
          assign r_in_valid[N][d] = 1'b0;
          assign r_out_cts[N][d]  = 1'b0;
          assign r_out_cps[N][d]  = CPS_NORMAL;
        end
      end
    end
  end
endmodule
