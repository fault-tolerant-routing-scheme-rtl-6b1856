// tb_crc_unit: checks the CRC-8 of random flits against a polynomial long
// division written independently here, and that every single-bit error in
// the flit or in the CRC field is flagged.
module tb_crc_unit;
  import noc_pkg::*;
  logic valid;
  cflit_t cf;
  logic [CRC_W-1:0] crc_calc;
  logic err;
  int checks = 0, failures = 0;

  crc_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // remainder of M(x) * x^8 divided by x^8 + x^2 + x + 1
  function automatic logic [7:0] ref_crc(logic [FLIT_W-1:0] m);
    logic [FLIT_W+7:0] r;
    r = {m, 8'h00};
    for (int i = FLIT_W + 7; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0];
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      cf.flit = {2'($urandom), 32'($urandom)};
      cf.crc  = ref_crc(cf.flit);
      valid = 1;
      #1;
      check(crc_calc == ref_crc(cf.flit), "crc value");
      check(!err, "no error on good flit");
      valid = 0;
      cf.crc = cf.crc ^ 8'h01;
      #1;
      check(!err, "err only with valid");
      valid = 1;
      #1;
      check(err, "crc field error");
      cf.crc = ref_crc(cf.flit);
      cf.flit = cf.flit ^ (34'd1 << $urandom_range(0, FLIT_W - 1));
      #1;
      check(err, "single flit bit error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
