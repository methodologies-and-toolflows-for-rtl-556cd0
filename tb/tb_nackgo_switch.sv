// tb_nackgo_switch: self-checking test of the 5x5 NACK/GO switch.
//
// The switch sits at (1,1) of a mesh and is given XY-routing configuration
// bits. Five packet sources (one per input port) send 4-flit packets to the
// tiles one hop away and to the local tile, and five checking sinks (one per
// output port, each with the coordinates of the tile behind it) receive them.
// Phase 1: one clean stream from the west input to the east output; its
// flit rate is checked. Phase 2: all inputs at once with random destinations,
// random stalls and refusals at the sinks, trash cycles and bit flips on the
// input links. The sinks check routing, packet integrity and ordering; at
// the end every packet sent must have been received, and the switch's event
// outputs must have reported nacks.
module tb_nackgo_switch;
  import ft_pkg::*;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int LEN = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  lbdr_cfg_t cfg;
  logic  [PORTS-1:0] in_valid, in_trash, in_stall, in_nack;
  code_t in_code [PORTS];
  logic  [PORTS-1:0] out_valid, out_trash, out_stall, out_nack;
  code_t out_code [PORTS];
  logic  [2*COORD_W-1:0] tdst [PORTS];
  logic  [PORTS-1:0] lresp [PORTS];
  logic  [3:0] ev;

  nackgo_switch dut (
    .clk, .rst_n, .block_i(1'b0), .cfg_i(cfg),
    .in_valid_i(in_valid), .in_trash_i(in_trash), .in_code_i(in_code),
    .in_stall_o(in_stall), .in_nack_o(in_nack),
    .out_valid_o(out_valid), .out_trash_o(out_trash), .out_code_o(out_code),
    .out_stall_i(out_stall), .out_nack_i(out_nack),
    .test_mode_i(1'b0), .test_dst_i(tdst), .lbdr_resp_o(lresp), .ev_o(ev));

  // destinations per output port: local, N, E, S, W of (1,1)
  localparam logic [7:0] DST [PORTS] = '{8'h11, 8'h10, 8'h21, 8'h12, 8'h01};

  logic [PORTS-1:0] go;
  logic [7:0] dsel [PORTS];
  int p_trash = 0, p_link = 0, p_stall = 0, p_nack = 0;
  int m_pkts [PORTS], m_done [PORTS], m_lerr [PORTS], m_res [PORTS];
  int s_pkts [PORTS], s_flits [PORTS], s_err [PORTS], s_nacks [PORTS], s_trash [PORTS];

  for (genvar i = 0; i < PORTS; i++) begin : g_m
    ng_master #(.SRC(i), .LEN(LEN)) u_m (
      .clk, .rst_n, .go_i(go[i]), .dst_i(dsel[i]), .p_trash_i(p_trash), .p_link_i(p_link),
      .valid_o(in_valid[i]), .trash_o(in_trash[i]), .code_o(in_code[i]),
      .stall_i(in_stall[i]), .nack_i(in_nack[i]),
      .pkts_o(m_pkts[i]), .done_o(m_done[i]), .link_err_o(m_lerr[i]), .resent_o(m_res[i]));
    ng_sink #(.MY_X(DST[i][7:4]), .MY_Y(DST[i][3:0]), .LEN(LEN)) u_s (
      .clk, .rst_n, .p_stall_i(p_stall), .p_nack_i(p_nack),
      .valid_i(out_valid[i]), .trash_i(out_trash[i]), .code_i(out_code[i]),
      .stall_o(out_stall[i]), .nack_o(out_nack[i]),
      .pkts_o(s_pkts[i]), .flits_o(s_flits[i]), .errors_o(s_err[i]),
      .nacks_o(s_nacks[i]), .trash_o(s_trash[i]));
    assign tdst[i] = '0;
  end

  int ev_nack = 0, ev_corr = 0, ev_mis = 0;
  always_ff @(posedge clk) begin
    if (ev[0]) ev_nack++;
    if (ev[1]) ev_corr++;
    if (ev[3]) ev_mis++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int i = 0; i < PORTS; i++)
      $display("  port %0d: sent %0d done %0d received %0d errors %0d", i, m_pkts[i], m_done[i],
               s_pkts[i], s_err[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sum(input int a [PORTS]);
    int s;
    s = 0;
    for (int i = 0; i < PORTS; i++) s += a[i];
    return s;
  endfunction

  initial begin
    int t0;
    cfg = '0;
    cfg.my_x = 4'd1; cfg.my_y = 4'd1;
    cfg.cn = 1; cfg.ce = 1; cfg.cs = 1; cfg.cw = 1;
    cfg.rnn = 1; cfg.rss = 1; cfg.ree = 1; cfg.rww = 1;
    cfg.ren = 1; cfg.res = 1; cfg.rwn = 1; cfg.rws = 1;
    go = '0;
    for (int i = 0; i < PORTS; i++) dsel[i] = DST[P_EAST];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: 20 packets west -> east, clean
    t0 = $time / 10;
    go[P_WEST] = 1'b1;
    wait (m_pkts[P_WEST] == 20);
    go[P_WEST] = 1'b0;
    wait (s_pkts[P_EAST] == 20);
    // one idle cycle after every tail, plus the pipeline fill
    chk(($time / 10) - t0 <= 20 * (LEN + 1) + 6,
        $sformatf("20 packets of %0d flits took %0d cycles", LEN, ($time / 10) - t0));
    // phase 2: everything at once
    p_trash = 5; p_link = 4; p_stall = 20; p_nack = 4;
    go = '1;
    repeat (3000) begin
      @(negedge clk);
      for (int i = 0; i < PORTS; i++) dsel[i] = DST[$urandom % PORTS];
    end
    go = '0;
    while (sum(s_pkts) != sum(m_pkts)) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(sum(s_pkts) == sum(m_pkts), $sformatf("received %0d of %0d packets", sum(s_pkts), sum(m_pkts)));
    chk(sum(m_pkts) > 400, "enough traffic");
    chk(sum(s_err) == 0, "sinks saw no routing or integrity errors");
    for (int i = 0; i < PORTS; i++) chk(s_pkts[i] > 0, $sformatf("output %0d used", i));
    chk(sum(m_lerr) > 0, "link errors injected");
    chk(sum(m_res) >= sum(m_lerr), "every corrupted flit was nacked and resent");
    chk(ev_nack > 0, "switch reported nacks from the sinks");
    chk(sum(s_nacks) > 0, "sinks refused flits and the switch resent them");
    chk(ev_mis == 0, "no arbiter mismatch in a fault-free switch");
    $display("packets=%0d link_err=%0d resent=%0d sink_nacks=%0d trash=%0d ev_nack=%0d",
             sum(m_pkts), sum(m_lerr), sum(m_res), sum(s_nacks), sum(s_trash), ev_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
