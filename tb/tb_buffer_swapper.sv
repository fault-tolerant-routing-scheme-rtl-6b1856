// tb_buffer_swapper: checks the identity connection without swapping and,
// for every faulty/substitute pair, that the faulty link writes the
// substitute buffer, the substitute link is cut off and sees no space.
module tb_buffer_swapper;
  import noc_pkg::*;
  logic swap;
  logic [2:0] fp, sp;
  logic [NPORT-1:0] link_push, fifo_space, fifo_push, link_space;
  cflit_t link_flit [NPORT];
  cflit_t fifo_din [NPORT];
  int checks = 0, failures = 0;

  buffer_swapper dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int p = 0; p < NPORT; p++) link_flit[p] = cflit_t'({2'(p), 32'h100 * (p + 1), 8'(p)});
    for (int n = 0; n < 200; n++) begin
      swap = $urandom_range(0, 1);
      fp = 3'($urandom_range(0, 4));
      sp = 3'((fp + $urandom_range(1, 4)) % 5);
      link_push  = 5'($urandom);
      fifo_space = 5'($urandom);
      #1;
      for (int q = 0; q < NPORT; q++) begin
        if (!swap || (q != fp && q != sp)) begin
          check(fifo_push[q] == link_push[q] && fifo_din[q] == link_flit[q], "identity path");
          check(link_space[q] == fifo_space[q], "identity space");
        end
      end
      if (swap) begin
        check(fifo_push[sp] == link_push[fp], "faulty link pushes substitute");
        check(fifo_din[sp] == link_flit[fp], "faulty link data to substitute");
        check(!fifo_push[fp], "faulty buffer never written");
        check(link_space[fp] == fifo_space[sp], "faulty link sees substitute space");
        check(!link_space[sp], "substitute link blocked");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
