// tb_bist_unit: connects the self-test unit to five real input buffers and a
// crossbar, injects a bit-flip fault into a chosen buffer and a chosen MUX,
// and checks that exactly those are reported, that a fault-free run reports
// nothing, that test mode lasts 3 + 2*DEPTH + 5*XB_PAT cycles and that
// the buffers are left empty.
module tb_bist_unit;
  import noc_pkg::*;
  localparam int DEPTH = 8, XB_PAT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic test_mode, done, tp1_en, tp2_en, fifo_push, fifo_pop, fifo_flush;
  logic [NPORT-1:0] buf_fault, mux_fault, fi_buf = '0, fi_mux = '0, empty;
  cflit_t tp_flit;
  logic [2:0] xb_sel;
  cflit_t fifo_raw [NPORT];
  cflit_t fifo_dout [NPORT];
  cflit_t xb_out [NPORT];
  cflit_t xb_in [NPORT];
  logic [2:0] sel [NPORT];
  int checks = 0, failures = 0;

  bist_unit #(.DEPTH(DEPTH), .XB_PAT(XB_PAT)) dut (.*);
  always #5 clk = !clk;

  for (genvar p = 0; p < NPORT; p++) begin : g_f
    logic full;
    logic [$clog2(DEPTH+1)-1:0] free;
    flit_fifo #(.W(CFLIT_W), .DEPTH(DEPTH)) u_f (
      .clk, .rst_n, .flush(fifo_flush), .push(fifo_push), .din(tp_flit), .pop(fifo_pop),
      .dout(fifo_raw[p]), .empty(empty[p]), .full, .free);
    always_comb begin
      fifo_dout[p] = fifo_raw[p];
      if (fi_buf[p]) fifo_dout[p].flit.data[0] = !fifo_raw[p].flit.data[0];
      xb_in[p] = tp2_en ? tp_flit : fifo_dout[p];
      sel[p]   = xb_sel;
    end
  end
  crossbar_dms u_xb (.in_data(xb_in), .sel, .dms_active(1'b0), .fm(3'd0), .sm(3'd0),
                     .phase(1'b0), .fi_mux, .out_data(xb_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int cyc);
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (test_mode && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check(!test_mode, "idle after reset");
    run(cyc);
    check(cyc == 3 + 2 * DEPTH + 5 * XB_PAT, $sformatf("test length %0d", cyc));
    check(buf_fault == 0 && mux_fault == 0, "fault-free run");
    check(empty == '1, "buffers left empty");
    for (int k = 0; k < 6; k++) begin
      int b, m;
      b = $urandom_range(0, 4); m = $urandom_range(0, 4);
      fi_buf = '0; fi_mux = '0; fi_buf[b] = 1; fi_mux[m] = 1;
      run(cyc);
      check(buf_fault == fi_buf, $sformatf("buffer fault located: %b", buf_fault));
      check(mux_fault == fi_mux, $sformatf("mux fault located: %b", mux_fault));
    end
    fi_buf = 5'b10001; fi_mux = 5'b00110;
    run(cyc);
    check(buf_fault == fi_buf && mux_fault == fi_mux, "multiple faults located");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
