// tb_flit_fifo: self-checking test of the input buffer.
// Random push/pop traffic against a queue model, filling to full, pop on
// empty, simultaneous push/pop and flush; checks data order, empty/full and
// the free-slot count every cycle.
module tb_flit_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] free;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit p, bit q, logic [W-1:0] d);
    push = p && (model.size() < DEPTH);
    pop  = q && (model.size() > 0);
    din  = d;
    @(negedge clk);
    if (push) model.push_back(d);
    if (pop) void'(model.pop_front());
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    check(int'(free) == DEPTH - model.size(), "free count");
    if (model.size() > 0) check(dout == model[0], $sformatf("dout %h exp %h", dout, model[0]));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && free == DEPTH, "after reset");
    for (int i = 0; i < DEPTH; i++) step(1, 0, W'(16'h1000 + i));
    check(full, "full after DEPTH pushes");
    step(1, 0, 16'hdead);          // ignored, full
    for (int i = 0; i < 3; i++) step(1, 1, W'(16'h2000 + i));
    for (int i = 0; i < DEPTH; i++) step(0, 1, '0);
    check(empty, "empty after drain");
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 1), $urandom_range(0, 1), W'($urandom));
    for (int i = 0; i < 4; i++) step(1, 0, W'(i));
    flush = 1;
    @(negedge clk);
    flush = 0;
    model.delete();
    check(empty && free == DEPTH, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
