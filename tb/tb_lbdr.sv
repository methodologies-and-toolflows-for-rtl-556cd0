// tb_lbdr: self-checking test of the LBDR routing logic.
//
// Every switch of a 4x4 mesh is given the configuration bits of XY routing
// (connectivity set where a neighbour exists, turn bits that forbid Y-to-X
// turns), and every destination is tried: the output must be the single
// port that XY routing (first X, then Y) picks, computed here directly from
// the coordinates. Then one link is disabled per case, so that no port is
// selected for a destination straight across it, and the output must be
// the configured deroute port.
module tb_lbdr;
  import ft_pkg::*;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  always #5 clk = ~clk;

  lbdr_cfg_t cfg;
  logic [COORD_W-1:0] dx, dy;
  logic [PORTS-1:0] out;
  lbdr dut (.cfg_i(cfg), .dst_x_i(dx), .dst_y_i(dy), .out_o(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lbdr_cfg_t xy_cfg(input int x, input int y);
    lbdr_cfg_t c;
    c = '0;
    c.my_x = COORD_W'(x);
    c.my_y = COORD_W'(y);
    c.cn = y > 0; c.cs = y < 3; c.cw = x > 0; c.ce = x < 3;
    c.rnn = 1; c.rss = 1; c.ree = 1; c.rww = 1;
    c.ren = 1; c.res = 1; c.rwn = 1; c.rws = 1;   // X first, then turn to Y
    c.rne = 0; c.rnw = 0; c.rse = 0; c.rsw = 0;   // no turn from Y to X
    return c;
  endfunction

  function automatic int xy_port(input int x, input int y, input int tx, input int ty);
    if (tx > x) return int'(P_EAST);
    if (tx < x) return int'(P_WEST);
    if (ty < y) return int'(P_NORTH);
    if (ty > y) return int'(P_SOUTH);
    return int'(P_LOCAL);
  endfunction

  int n_der = 0;
  initial begin
    int e;
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int tx = 0; tx < 4; tx++)
          for (int ty = 0; ty < 4; ty++) begin
            cfg = xy_cfg(x, y);
            dx = COORD_W'(tx);
            dy = COORD_W'(ty);
            #1;
            e = xy_port(x, y, tx, ty);
            chk(out == PORTS'(1 << e),
                $sformatf("(%0d,%0d)->(%0d,%0d): got %b expected port %0d", x, y, tx, ty, out, e));
            // disable the chosen link: deroute to a random port
            if (e != int'(P_LOCAL)) begin
              cfg.cn = cfg.cn && e != int'(P_NORTH);
              cfg.ce = cfg.ce && e != int'(P_EAST);
              cfg.cs = cfg.cs && e != int'(P_SOUTH);
              cfg.cw = cfg.cw && e != int'(P_WEST);
              cfg.dr = 2'($urandom);
              #1;
              case (cfg.dr)
                2'd0: e = int'(P_NORTH);
                2'd1: e = int'(P_EAST);
                2'd2: e = int'(P_WEST);
                default: e = int'(P_SOUTH);
              endcase
              chk(out == PORTS'(1 << e), $sformatf("deroute (%0d,%0d)->(%0d,%0d) dr=%0d: got %b",
                                                   x, y, tx, ty, cfg.dr, out));
              n_der++;
            end
            @(posedge clk);
          end
    chk(n_der > 0, "deroutes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
