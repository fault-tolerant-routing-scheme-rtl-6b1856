// tb_crossbar_dms: checks that every output copies the input its MUX
// selects, that with DMS on the faulty output is driven by the shared MUX
// with the faulty output's select in phase 1 and the shared MUX's own output
// keeps its select in phase 0, and that a MUX fault flips bit 0.
module tb_crossbar_dms;
  import noc_pkg::*;
  cflit_t in_data [NPORT];
  logic [2:0] sel [NPORT];
  logic dms_active, phase;
  logic [2:0] fm, sm;
  logic [NPORT-1:0] fi_mux;
  cflit_t out_data [NPORT];
  int checks = 0, failures = 0;

  crossbar_dms dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int p = 0; p < NPORT; p++) begin
        in_data[p] = cflit_t'({2'($urandom), 32'($urandom), 8'($urandom)});
        sel[p] = 3'($urandom_range(0, 4));
      end
      fm = 3'($urandom_range(0, 4));
      sm = ring_prev(fm);
      dms_active = $urandom_range(0, 1);
      phase = $urandom_range(0, 1);
      fi_mux = '0;
      #1;
      for (int o = 0; o < NPORT; o++) begin
        if (dms_active && o == fm)
          check(out_data[o] == in_data[phase ? sel[fm] : sel[sm]], "faulty output via shared MUX");
        else if (dms_active && o == sm)
          check(out_data[o] == in_data[phase ? sel[fm] : sel[sm]], "shared MUX own output");
        else
          check(out_data[o] == in_data[sel[o]], "normal path");
      end
      dms_active = 0;
      fi_mux[fm] = 1;
      #1;
      check(out_data[fm].flit.data[0] != in_data[sel[fm]].flit.data[0] &&
            out_data[fm].flit.data[31:1] == in_data[sel[fm]].flit.data[31:1], "fault flips bit 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
