// tb_noc_top: end-to-end test of both networks at their default sizes.
//
// Mesh (4x4):
//  1. Self-test with a stuck test-pattern generator in tile 0: its
//     neighbours must flag the facing input ports, and the diagnosis must
//     reach the controller model over the triplicated ring.
//  2. The controller model configures every switch by a three-way handshake
//     with XY routing bits; it also declares the link between tiles 5 and 6
//     unusable, so packets that need it are derouted.
//  3. 15 packet sources (tile 0 is cut off by the self-test) send 4-flit
//     packets to random tiles other than 0, with random trash cycles, bit
//     flips on the injection links, random stalls and refusals at the sinks,
//     and single-bit upsets written into a stored flit of a switch buffer. Every
//     packet must arrive intact, routed right and in order per source.
// Trace network (2 x 5 monitors, three clocks): random observations, a
// configuration packet that switches one monitor off, a power cycle of a
// subsystem; the debugger model checks the packets.
// Each mechanism is counted and a failure is counted for any that never
// happened: stall, nack and resend, trash, correction, deroute, self-test fault flag, three-way handshake, weight change, DELTA,
// EOP, WUP and bridge crossing. The arbiter mismatch path is exercised by
// the arbiter block test; here no mismatch may occur.
module tb_noc_top;
  import ft_pkg::*;
  import trace_pkg::*;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int MX = 4, MY = 4, NT = 16, LEN = 4;
  localparam int NSUB = 2, NMON = 5, NM = 10;

  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0;
  always #5 clk = ~clk;
  logic clk_main = 1'b0, trst_n = 1'b0;
  logic [NSUB-1:0] clk_sub = '0, sub_on;
  always #3 clk_main = ~clk_main;
  always #7 clk_sub[0] = ~clk_sub[0];
  always #9 clk_sub[1] = ~clk_sub[1];

  // mesh wires
  logic  [NT-1:0] ni_valid_i, ni_trash_i, ni_stall_o, ni_nack_o;
  logic  [NT-1:0] ni_valid_o, ni_trash_o, ni_stall_i, ni_nack_i;
  code_t ni_code_i [NT], ni_code_o [NT];
  logic [2:0] dn_in_valid, dn_in_stall, dn_out_valid, dn_out_stall;
  logic [DN_FLIT_W-1:0] dn_in_flit [3], dn_out_flit [3];
  logic [NT-1:0] bist_done, configured;
  logic [DIAG_W-1:0] diag [NT];
  logic [3:0] ev [NT];
  // trace wires
  logic [NM-1:0] obs_valid, operative;
  logic [5:0]    obs_len  [NM];
  logic [15:0]   obs_data [NM];
  logic [15:0]   lost     [NM];
  logic   dbg_out_valid, dbg_out_ready, dbg_in_valid, dbg_in_ready;
  tflit_t dbg_out_flit, dbg_in_flit;

  noc_top dut (
    .clk, .rst_n, .bist_start_i(bist_start),
    .ni_valid_i, .ni_trash_i, .ni_code_i, .ni_stall_o, .ni_nack_o,
    .ni_valid_o, .ni_trash_o, .ni_code_o, .ni_stall_i, .ni_nack_i,
    .dn_in_valid_i(dn_in_valid), .dn_in_flit_i(dn_in_flit), .dn_in_stall_o(dn_in_stall),
    .dn_out_valid_o(dn_out_valid), .dn_out_flit_o(dn_out_flit), .dn_out_stall_i(dn_out_stall),
    .bist_done_o(bist_done), .configured_o(configured), .diag_o(diag), .ev_o(ev),
    .clk_main, .trace_rst_n(trst_n), .clk_sub, .sub_on_i(sub_on),
    .obs_valid_i(obs_valid), .obs_len_i(obs_len), .obs_data_i(obs_data),
    .operative_o(operative), .lost_o(lost),
    .dbg_out_valid_o(dbg_out_valid), .dbg_out_flit_o(dbg_out_flit), .dbg_out_ready_i(dbg_out_ready),
    .dbg_in_valid_i(dbg_in_valid), .dbg_in_flit_i(dbg_in_flit), .dbg_in_ready_o(dbg_in_ready));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- global controller model
  int c_diag, c_echo, c_err;
  logic [DIAG_W-1:0] c_diag_w [NT];
  logic [NT-1:0] broken;
  assign broken = NT'(1) << 5;          // east link of tile 5
  ft_ctrl_model #(.MESH_X(MX), .MESH_Y(MY)) u_ctrl (
    .clk, .rst_n, .broken_i(broken),
    .in_valid_o(dn_in_valid), .in_flit_o(dn_in_flit), .in_stall_i(dn_in_stall),
    .out_valid_i(dn_out_valid), .out_flit_i(dn_out_flit), .out_stall_o(dn_out_stall),
    .diag_rcv_o(c_diag), .echo_ok_o(c_echo), .errors_o(c_err), .diag_o(c_diag_w));

  // ---------------- packet sources and sinks at every tile
  logic [NT-1:0] go;
  logic [7:0] dsel [NT];
  int p_trash = 0, p_link = 0, p_stall = 0, p_nack = 0;
  int m_pkts [NT], m_done [NT], m_lerr [NT], m_res [NT];
  int s_pkts [NT], s_flits [NT], s_err [NT], s_nacks [NT], s_trash [NT];
  for (genvar t = 0; t < NT; t++) begin : g_ni
    ng_master #(.SRC(t), .LEN(LEN)) u_m (
      .clk, .rst_n, .go_i(go[t]), .dst_i(dsel[t]), .p_trash_i(p_trash), .p_link_i(p_link),
      .valid_o(ni_valid_i[t]), .trash_o(ni_trash_i[t]), .code_o(ni_code_i[t]),
      .stall_i(ni_stall_o[t]), .nack_i(ni_nack_o[t]),
      .pkts_o(m_pkts[t]), .done_o(m_done[t]), .link_err_o(m_lerr[t]), .resent_o(m_res[t]));
    ng_sink #(.MY_X(t % MX), .MY_Y(t / MX), .LEN(LEN)) u_s (
      .clk, .rst_n, .p_stall_i(p_stall), .p_nack_i(p_nack),
      .valid_i(ni_valid_o[t]), .trash_i(ni_trash_o[t]), .code_i(ni_code_o[t]),
      .stall_o(ni_stall_i[t]), .nack_o(ni_nack_i[t]),
      .pkts_o(s_pkts[t]), .flits_o(s_flits[t]), .errors_o(s_err[t]),
      .nacks_o(s_nacks[t]), .trash_o(s_trash[t]));
  end

  function automatic int sum(input int a [NT]);
    int s;
    s = 0;
    for (int i = 0; i < NT; i++) s += a[i];
    return s;
  endfunction

  // ---------------- mechanism counters (mesh)
  int n_stall = 0, n_corr = 0, n_mis = 0, n_unc = 0, n_nack_ev = 0, n_deroute = 0, n_xtrash = 0;
  logic [NT-1:0] xtr;
  for (genvar t = 0; t < NT; t++) begin : g_mon
    assign xtr[t] = |(dut.u_ft.g_tile[t].u_sw.xb_trash & dut.u_ft.g_tile[t].u_sw.xb_valid);
  end
  logic der;
  assign der = (dut.u_ft.g_tile[5].u_sw.g_in[0].u_lbdr_b.none && dut.u_ft.g_tile[5].u_sw.pb[0] != '0) ||
               (dut.u_ft.g_tile[5].u_sw.g_in[4].u_lbdr_b.none && dut.u_ft.g_tile[5].u_sw.pb[4] != '0) ||
               (dut.u_ft.g_tile[6].u_sw.g_in[0].u_lbdr_b.none && dut.u_ft.g_tile[6].u_sw.pb[0] != '0) ||
               (dut.u_ft.g_tile[6].u_sw.g_in[2].u_lbdr_b.none && dut.u_ft.g_tile[6].u_sw.pb[2] != '0) ||
               (dut.u_ft.g_tile[1].u_sw.g_in[0].u_lbdr_b.none && dut.u_ft.g_tile[1].u_sw.pb[0] != '0);
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (|(ni_valid_i & ni_stall_o)) n_stall++;
      if (der) n_deroute++;
      if (xtr != '0) n_xtrash++;
      for (int t = 0; t < NT; t++) begin
        if (ev[t][0]) n_nack_ev++;
        if (ev[t][1]) n_corr++;
        if (ev[t][2]) n_unc++;
        if (ev[t][3]) n_mis++;
      end
    end
  end

  // ---------------- trace side: sources and debugger model
  bit obs_en = 1'b0;
  int issued [NM];
  for (genvar s = 0; s < NSUB; s++) begin : g_src
    for (genvar k = 0; k < NMON; k++) begin : g_m
      localparam int I = s * NMON + k;
      initial issued[I] = 0;
      always @(negedge clk_sub[s]) begin
        obs_valid[I] <= obs_en && sub_on[s] && (($urandom % 12) == 0);
        obs_len[I]   <= 6'(1 + $urandom % 4);
        obs_data[I]  <= 16'($urandom);
      end
      always @(posedge clk_sub[s]) if (trst_n && obs_valid[I]) issued[I]++;
    end
  end

  int n_trace [NM];
  int n_eop [4];
  int n_wup = 0, n_delta = 0, n_bad = 0, pos = 0, plen = 0, psub = 0, pmon = 0;
  ttype_e ptype;
  initial begin
    for (int i = 0; i < NM; i++) n_trace[i] = 0;
    for (int i = 0; i < 4; i++) n_eop[i] = 0;
  end
  always @(negedge clk_main) dbg_out_ready <= ($urandom % 4) != 0;
  always @(posedge clk_main) begin
    if (trst_n && dbg_out_valid && dbg_out_ready) begin
      if (pos == 0) begin
        ptype = ttype_e'(dbg_out_flit.data[15:13]);
        psub  = int'(dbg_out_flit.data[12:11]);
        pmon  = int'(dbg_out_flit.data[10:8]);
        plen  = int'(dbg_out_flit.data[7:0]);
        if (ptype == T_EOP) n_eop[psub]++;
        else if (ptype == T_DELTA) n_delta++;
        else if (ptype != T_TRACE && ptype != T_WUP) n_bad++;
      end else if (dbg_out_flit.tail) begin
        if (ptype == T_WUP && psub == 1) n_wup++;
        if (ptype == T_TRACE) begin
          if (pos != plen + 1) n_bad++;
          n_trace[psub * NMON + pmon]++;
        end
      end
      pos = dbg_out_flit.tail ? 0 : pos + 1;
    end
  end

  // ---------------- stimulus
  initial begin
    sub_on = '1;
    obs_valid = '0;
    dbg_in_valid = 1'b0;
    dbg_in_flit = '0;
    go = '0;
    for (int t = 0; t < NT; t++) dsel[t] = 8'h11;
    repeat (4) @(negedge clk_sub[1]);
    rst_n = 1'b1;
    trst_n = 1'b1;
    obs_en = 1'b1;
    // 1. self-test with a stuck pattern generator in tile 0
    @(negedge clk);
    force dut.u_ft.tpg[0] = 8'h00;
    bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    wait (&bist_done);
    @(negedge clk);
    release dut.u_ft.tpg[0];
    chk(diag[1][P_WEST] && diag[4][P_NORTH], "neighbours of tile 0 flagged their facing inputs");
    chk(!diag[5][P_NORTH] && !diag[5][P_EAST] && !diag[5][P_SOUTH] && !diag[5][P_WEST] && !diag[5][P_LOCAL],
        "inner tile 5 reports healthy links");
    chk(diag[5][9:5] == '0, "routing-logic test of tile 5 passed");
    // 2. configuration over the dual network
    wait (&configured);
    chk(c_diag == NT, $sformatf("controller received %0d diagnosis packets", c_diag));
    for (int t = 0; t < NT; t++)
      chk(c_diag_w[t] == diag[t], $sformatf("diagnosis of switch %0d arrived intact", t));
    chk(c_echo == NT, $sformatf("%0d three-way handshakes", c_echo));
    chk(c_err == 0, "controller saw no protocol error");
    // 3. traffic
    p_trash = 3; p_link = 3; p_stall = 15; p_nack = 3;
    go = '1;
    go[0] = 1'b0;
    fork
      repeat (3000) begin
        @(negedge clk);
        for (int t = 0; t < NT; t++) begin
          int d;
          d = 1 + int'($urandom % (NT - 1));
          dsel[t] = {4'(d % MX), 4'(d / MX)};
        end
      end
      // stored-flit upsets in the local input buffer of tile 10
      repeat (25) begin
        repeat (97) @(negedge clk);
        dut.u_ft.g_tile[10].u_sw.g_in[0].u_ib.mem[1][7] = ~dut.u_ft.g_tile[10].u_sw.g_in[0].u_ib.mem[1][7];
      end
      // trace side: switch monitor 4 of subsystem 0 off, power-cycle subsystem 1
      begin
        repeat (500) @(negedge clk_main);
        dbg_in_valid = 1'b1;
        dbg_in_flit = '{tail: 1'b1, data: t_head(T_CFG, 2'd0, 3'd4, 8'd0)};
        do @(posedge clk_main); while (!dbg_in_ready);
        @(negedge clk_main) dbg_in_valid = 1'b0;
        repeat (500) @(negedge clk_sub[1]);
        sub_on[1] = 1'b0;
        repeat (300) @(negedge clk_sub[1]);
        sub_on[1] = 1'b1;
      end
    join
    go = '0;
    obs_en = 1'b0;
    while (sum(s_pkts) != sum(m_pkts)) @(negedge clk);
    repeat (3000) @(negedge clk_main);
    // mesh results
    chk(sum(s_pkts) == sum(m_pkts), $sformatf("received %0d of %0d packets", sum(s_pkts), sum(m_pkts)));
    chk(sum(s_err) == 0, "no misrouted, broken or reordered packet");
    chk(s_pkts[0] == 0, "nothing sent to the cut-off tile");
    chk(n_unc == 0, "no uncorrectable stored flit");
    // trace results
    for (int i = 0; i < NM; i++)
      chk(n_trace[i] == issued[i] - int'(lost[i]),
          $sformatf("monitor %0d: %0d packets of %0d observed, %0d lost", i, n_trace[i], issued[i], lost[i]));
    chk(n_bad == 0, "debugger saw no malformed packet");
    chk(!operative[4], "monitor switched off");
    // mechanisms
    chk(n_stall > 0, "stall");
    chk(sum(m_res) > 0 && n_nack_ev > 0, "nack and resend");
    chk(n_xtrash > 0 || sum(s_trash) > 0, "trash forwarded for a corrupt tentative flit");
    chk(n_corr > 0, "stored flit corrected");
    chk(n_mis == 0, "no arbiter mismatch without a control-logic fault");
    chk(n_deroute > 0, "deroute");
    chk(c_echo == NT, "three-way handshake");
    chk(int'(dut.u_trace.g_sub[0].g_mon[0].u_rm.w0) == 3, "weight change after DELTA");
    chk(n_delta > 0, "DELTA packet");
    chk(n_eop[0] > 0 && n_eop[1] > 0 && n_eop[SUB_MAIN] > 0, "EOP packets");
    chk(n_wup == 2, "WUP packets at start-up and after the power cycle");
    chk(n_trace[0] > 0 && n_trace[NMON] > 0, "bridge crossing from both subsystems");
    $display("mesh: pkts=%0d stall=%0d resend=%0d nack_ev=%0d trash=%0d corr=%0d mis=%0d deroute=%0d handshakes=%0d",
             sum(m_pkts), n_stall, sum(m_res), n_nack_ev, n_xtrash, n_corr, n_mis, n_deroute, c_echo);
    $display("trace: eop=%0d/%0d/%0d wup=%0d delta=%0d", n_eop[0], n_eop[1], n_eop[SUB_MAIN], n_wup, n_delta);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
