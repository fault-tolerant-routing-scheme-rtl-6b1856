// noc_pkg: types and constants shared by the fault-tolerant mesh router, its
// network interface and their testbenches.
//
// A flit is a 2-bit type plus a 32-bit payload. The head flit payload holds
// the destination and source coordinates of the packet; body and tail flits
// carry data. Every flit travels with an 8-bit CRC computed once at the
// injecting network interface and checked again at every router input (link
// errors) and every router output (errors inside the router).
//
// Port numbering follows the ring order of the crossbar MUXes (North, East,
// South, West, Local): this order decides which MUX may stand in for a faulty
// one. The mesh x coordinate grows towards East, y grows towards South.
//
// Link handshake: the upstream side holds `valid` and `flit` steady until the
// downstream side returns CTS (current transmit status) = 1 in the same cycle.
// CTS and the 2-bit CPS (current port status) come only from registers of the
// downstream side. CPS codes: 00 port in normal use, 01 port about to be lent
// out as a substitute buffer (finish the current packet, start no new one),
// 10 port blocked, 11 hard link fault (route around it). The first three codes
// follow the DBS state table of the design; 11 is this implementation's own.
package noc_pkg;

  localparam int NPORT      = 5;
  localparam int DATA_W     = 32;
  localparam int CRC_W      = 8;
  localparam int COORD_W    = 4;   // up to 16x16 meshes
  localparam int MAX_PKT    = 8;   // packet size (2,8): 2 to 8 flits

  typedef enum logic [2:0] {
    P_N = 3'd0, P_E = 3'd1, P_S = 3'd2, P_W = 3'd3, P_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00, FT_HEAD = 2'b01, FT_TAIL = 2'b10, FT_HEADTAIL = 2'b11
  } ftype_e;

  typedef enum logic [1:0] {
    CPS_NORMAL = 2'b00, CPS_PREP = 2'b01, CPS_BLOCKED = 2'b10, CPS_LINKFAULT = 2'b11
  } cps_e;

  typedef struct packed {
    ftype_e             ftype;
    logic [DATA_W-1:0]  data;
  } flit_t;

  typedef struct packed {
    flit_t              flit;
    logic [CRC_W-1:0]   crc;
  } cflit_t;   // flit with its CRC, as stored in buffers and sent on links

  localparam int FLIT_W  = $bits(flit_t);
  localparam int CFLIT_W = $bits(cflit_t);

  // Head payload layout: [31:28] dst x, [27:24] dst y, [23:20] src x,
  // [19:16] src y, [15:0] free for the application.
  function automatic logic [COORD_W-1:0] hd_dx(flit_t f); return f.data[31:28]; endfunction
  function automatic logic [COORD_W-1:0] hd_dy(flit_t f); return f.data[27:24]; endfunction
  function automatic logic [COORD_W-1:0] hd_sx(flit_t f); return f.data[23:20]; endfunction
  function automatic logic [COORD_W-1:0] hd_sy(flit_t f); return f.data[19:16]; endfunction

  function automatic logic is_head(flit_t f); return f.ftype[0]; endfunction
  function automatic logic is_tail(flit_t f); return f.ftype[1]; endfunction

  // CRC-8, polynomial x^8 + x^2 + x + 1 (0x07), initial value 0, over the
  // 34 flit bits from MSB to LSB.
  function automatic logic [CRC_W-1:0] crc8(flit_t f);
    logic [CRC_W-1:0] c;
    logic [FLIT_W-1:0] b;
    logic fb;
    c = '0;
    b = f;
    for (int i = FLIT_W - 1; i >= 0; i--) begin
      fb = c[7] ^ b[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  // Status and event strobes of one router, for monitoring and testing.
  typedef struct packed {
    logic             test_mode;     // BIST running
    logic [4:0]       buf_fault;     // input buffers found faulty
    logic [4:0]       mux_fault;     // crossbar MUXes found faulty
    logic [4:0]       link_fault;    // input links marked as hard faults
    logic [1:0]       dbs_state;     // 0: S0, 1: S1, 2: S2
    logic             dms_active;    // a MUX is time-shared
    logic             dms_shared;    // the shared MUX moved a flit for the faulty output
    logic             swapped_flit;  // a flit entered a substitute buffer
    logic [4:0]       link_err;      // input CRC mismatch (strobe)
    logic             intra_err;     // output CRC mismatch (strobe)
    logic [4:0]       dl_detect;     // deadlock threshold reached (strobe)
    logic [4:0]       dl_reroute;    // route recomputed (strobe)
    logic [4:0]       dl_eject;      // packet head sent to the local NI for recovery (strobe)
    logic             misroute;      // a head took a non-minimal output (strobe)
    logic [4:0]       drop;          // flit discarded at an output to a dead link (strobe)
  } rstat_t;

  // Ring neighbour whose MUX stands in for a faulty output MUX: the previous
  // port in the order N, E, S, W, L (the North MUX serves East, Local serves North).
  function automatic logic [2:0] ring_prev(logic [2:0] p);
    return (p == 3'd0) ? 3'd4 : p - 3'd1;
  endfunction

  function automatic logic [2:0] opposite(logic [2:0] p);
    case (p)
      3'd0: return 3'd2;
      3'd1: return 3'd3;
      3'd2: return 3'd0;
      3'd3: return 3'd1;
      default: return 3'd4;
    endcase
  endfunction

endpackage
