// tb_routing_unit: checks the odd-even route computation on random
// positions in an 8 x 8 mesh. For every head flit the chosen output must be
// productive (bring the packet closer), obey the odd-even turn rules
// (East-bound: North/South only in an odd column or the source column, no
// East hop into an even destination column from a column where a turn is
// still needed... checked as "East only if dest column odd or more than one
// column left" when a vertical move is still needed; West-bound: North/South
// only in an even column), and avoid outputs marked not ok or excluded.
// With every productive output blocked it must misroute to a healthy,
// non-arrival port; `eject` and an arrived packet must give Local.
module tb_routing_unit;
  import noc_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y;
  flit_t head;
  logic [2:0] in_port, excl, out_port;
  logic [NPORT-1:0] out_ok, out_pref;
  logic excl_en, eject, found, minimal;
  int checks = 0, failures = 0;

  routing_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cur=(%0d,%0d) dst=(%0d,%0d) out=%0d", what,
                                         cur_x, cur_y, hd_dx(head), hd_dy(head), out_port); end
  endtask

  function automatic bit productive(int p, int cx, int cy, int dx, int dy);
    case (p)
      0: return dy < cy;
      1: return dx > cx;
      2: return dy > cy;
      3: return dx < cx;
      default: return 0;
    endcase
  endfunction

  initial begin
    int cx, cy, dx, dy, sx, sy;
    for (int n = 0; n < 4000; n++) begin
      cx = $urandom_range(0, 7); cy = $urandom_range(0, 7);
      dx = $urandom_range(0, 7); dy = $urandom_range(0, 7);
      // a source from which odd-even routing could have reached (cx, cy)
      sx = (dx >= cx) ? $urandom_range(0, cx) : $urandom_range(cx, 7);
      sy = $urandom_range(0, 7);
      cur_x = 4'(cx); cur_y = 4'(cy);
      head.ftype = FT_HEAD;
      head.data  = {4'(dx), 4'(dy), 4'(sx), 4'(sy), 16'h0};
      in_port  = 3'($urandom_range(0, 4));
      out_ok   = 5'b11111;
      out_pref = 5'($urandom);
      excl_en  = 0; excl = 0; eject = 0;
      #1;
      if (dx == cx && dy == cy) begin
        check(out_port == P_L && found && minimal, "arrived -> Local");
        continue;
      end
      check(found && minimal, "minimal route found");
      check(productive(int'(out_port), cx, cy, dx, dy), "productive");
      if (dx > cx && (out_port == P_N || out_port == P_S))
        check(cx % 2 == 1 || cx == sx, "east-bound turn only in odd or source column");
      if (dx < cx && (out_port == P_N || out_port == P_S))
        check(cx % 2 == 0, "west-bound turn only in even column");
      if (dx > cx && out_port == P_E && dy != cy)
        check(dx % 2 == 1 || dx - cx != 1, "no last east hop into even column before turning");
      // exclusion and blocked links
      excl_en = 1; excl = out_port;
      #1;
      check(found && out_port != excl, "excluded output avoided");
      excl_en = 0;
      out_ok = 5'b10000;
      for (int p = 0; p < 4; p++) if (!productive(p, cx, cy, dx, dy)) out_ok[p] = 1'b1;
      out_ok[in_port] = 1'b0;
      #1;
      if (out_ok[3:0] != 0) begin
        check(found && !minimal && out_ok[out_port] && out_port != P_L && out_port != in_port,
              "misroute to healthy non-minimal port");
      end else check(!found, "no route when everything is blocked");
      eject = 1;
      #1;
      check(found == out_ok[P_L] && out_port == P_L, "eject -> Local");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
