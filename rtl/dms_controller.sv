// dms_controller: Dynamic MUX Swapping control for one router.
//
// Each output port has its own crossbar MUX; the MUXes form a ring in the
// order North, East, South, West, Local, and a MUX can be switched onto the
// output of its ring successor. When the self-test marks MUX `fm` faulty, the
// MUX of the previous port in the ring, `sm`, is time-shared between its own
// output and output `fm`. Each cycle the controller decides whom `sm` serves:
// if only one of the two outputs has a flit ready it gets the MUX, if both do
// they alternate (phase 1 = faulty output served, as in the left half of the
// design's DMS figure; phase 0 = own output). The buffer dependencies of the
// routing do not change, so this sharing adds no deadlock.
// `allow[o]` tells the switch allocator which outputs may move a flit this
// cycle; `usable[o]` tells route computation which outputs can be reached at
// all. Only the lowest-numbered faulty MUX is covered, and only if its ring
// neighbour is healthy; other faulty MUXes leave their outputs unusable
// (implementation choice). `enable` low (test mode) turns the sharing off.
module dms_controller
  import noc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [NPORT-1:0] mux_fault,
  input  logic [NPORT-1:0] want,
  output logic             active,
  output logic [2:0]       fm,
  output logic [2:0]       sm,
  output logic             phase,
  output logic [NPORT-1:0] allow,
  output logic [NPORT-1:0] usable
);
  logic last_faulty;   // the shared MUX last served the faulty output
  logic found;

  always_comb begin
    found = 1'b0;
    fm    = 3'd0;
    for (int p = NPORT - 1; p >= 0; p--)
      if (mux_fault[p]) begin
        found = 1'b1;
        fm    = 3'(p);
      end
    sm     = ring_prev(fm);
    active = enable && found && !mux_fault[sm];

    if (!active)           phase = 1'b0;
    else if (want[fm] && want[sm]) phase = !last_faulty;
    else                   phase = want[fm];

    for (int p = 0; p < NPORT; p++) begin
      usable[p] = !mux_fault[p] || !enable;
      allow[p]  = usable[p];
    end
    if (active) begin
      usable[fm] = 1'b1;
      allow[fm]  = phase;
      allow[sm]  = !phase;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_faulty <= 1'b0;
    else if (active && (want[fm] || want[sm])) last_faulty <= phase;
  end
endmodule
