// tb_trace_noc: end-to-end test of the trace and debug network.
//
// Three clocks (main ring 6 ns, subsystems 14 ns and 18 ns, keeping the
// ratio of 3, 7 and 9 ns) drive the network. Every monitor gets random
// observations of 1 to 4 payload words; a debugger model on the debugger
// port accepts flits with random back-pressure and parses every packet:
//  * TRACE packets must carry the head's length of consecutive payload
//    words starting at the observed word, and per monitor the count of
//    reported packets must equal the observations minus those the monitor
//    counted as lost;
//  * EOP packets must arrive from both subrings and from the main counter;
//  * after subsystem 1 is switched off and on again, a WUP packet for it
//    must arrive;
//  * a configuration packet that switches off monitor 4 of subsystem 0 must
//    produce a DELTA packet, lower the ring weights of monitors 3..0 from
//    3,2,1,1 to 2,1,1,1 and stop that monitor's traffic.
module tb_trace_noc;
  import trace_pkg::*;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NSUB = 2, NMON = 5, NM = NSUB * NMON;
  logic clk_main = 1'b0, rst_n = 1'b0;
  logic [NSUB-1:0] clk_sub = '0, sub_on;
  always #3 clk_main = ~clk_main;
  always #7 clk_sub[0] = ~clk_sub[0];
  always #9 clk_sub[1] = ~clk_sub[1];

  logic [NM-1:0] obs_valid, operative;
  logic [5:0]    obs_len  [NM];
  logic [15:0]   obs_data [NM];
  logic [15:0]   lost     [NM];
  logic   dbg_out_valid, dbg_out_ready, dbg_in_valid, dbg_in_ready;
  tflit_t dbg_out_flit, dbg_in_flit;

  trace_noc dut (
    .clk_main, .rst_n, .clk_sub, .sub_on_i(sub_on),
    .obs_valid_i(obs_valid), .obs_len_i(obs_len), .obs_data_i(obs_data),
    .operative_o(operative), .lost_o(lost),
    .dbg_out_valid_o(dbg_out_valid), .dbg_out_flit_o(dbg_out_flit), .dbg_out_ready_i(dbg_out_ready),
    .dbg_in_valid_i(dbg_in_valid), .dbg_in_flit_i(dbg_in_flit), .dbg_in_ready_o(dbg_in_ready));

  initial begin
    repeat (60000) @(posedge clk_main);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- observation sources (one per subsystem clock)
  int issued [NM];
  bit obs_en = 1'b0;
  for (genvar s = 0; s < NSUB; s++) begin : g_src
    for (genvar k = 0; k < NMON; k++) begin : g_m
      localparam int I = s * NMON + k;
      initial issued[I] = 0;
      always @(negedge clk_sub[s]) begin
        obs_valid[I] <= obs_en && sub_on[s] && (($urandom % 12) == 0);
        obs_len[I]   <= 6'(1 + $urandom % 4);
        obs_data[I]  <= 16'($urandom);
      end
      always @(posedge clk_sub[s]) if (rst_n && obs_valid[I]) issued[I]++;
    end
  end

  // ---------------- debugger model
  int n_trace [NM];
  int n_eop [4];
  int n_wup [NSUB];
  int n_delta = 0, n_bad = 0;
  int pos = 0, plen = 0, psub = 0, pmon = 0;
  ttype_e ptype;
  logic [15:0] pword;
  initial begin
    for (int i = 0; i < NM; i++) n_trace[i] = 0;
    for (int i = 0; i < 4; i++) n_eop[i] = 0;
    for (int i = 0; i < NSUB; i++) n_wup[i] = 0;
  end

  always @(negedge clk_main) dbg_out_ready <= ($urandom % 4) != 0;

  task automatic bad(input string m);
    n_bad++;
    $display("debugger: %s", m);
  endtask

  always @(posedge clk_main) begin
    if (rst_n && dbg_out_valid && dbg_out_ready) begin
      tflit_t f;
      f = dbg_out_flit;
      if (pos == 0) begin
        ptype = ttype_e'(f.data[15:13]);
        psub  = int'(f.data[12:11]);
        pmon  = int'(f.data[10:8]);
        plen  = int'(f.data[7:0]);
        case (ptype)
          T_EOP:   begin n_eop[psub]++;  if (!f.tail) bad("long EOP"); end
          T_DELTA: begin n_delta++;      if (!f.tail) bad("long DELTA"); end
          T_TRACE: if (f.tail) bad("short TRACE");
          T_WUP:   if (f.tail) bad("short WUP");
          default: bad("unexpected packet type");
        endcase
        pos = f.tail ? 0 : 1;
      end else begin
        if (ptype == T_WUP) begin
          if (!f.tail) bad("WUP longer than 2 flits");
          if (psub < NSUB) n_wup[psub]++;
        end else if (ptype == T_TRACE) begin
          if (pos == 2) pword = f.data;
          else if (pos > 2) begin
            pword = pword + 1'b1;
            if (f.data != pword) bad("payload words not consecutive");
          end
          if (f.tail) begin
            if (pos != plen + 1) bad($sformatf("TRACE length %0d, head says %0d", pos - 1, plen));
            n_trace[psub * NMON + pmon]++;
          end
        end
        pos = f.tail ? 0 : pos + 1;
      end
    end
  end

  function automatic int w0(input int s, input int k);
    // ring weight currently used by monitor router k of subsystem s
    case ({s[0], 3'(k)})
      4'h0: return int'(dut.g_sub[0].g_mon[0].u_rm.w0);
      4'h1: return int'(dut.g_sub[0].g_mon[1].u_rm.w0);
      4'h2: return int'(dut.g_sub[0].g_mon[2].u_rm.w0);
      4'h3: return int'(dut.g_sub[0].g_mon[3].u_rm.w0);
      default: return int'(dut.g_sub[0].g_mon[4].u_rm.w0);
    endcase
  endfunction

  initial begin
    int lost_sum;
    sub_on = '1;
    obs_valid = '0;
    dbg_in_valid = 1'b0;
    dbg_in_flit = '0;
    repeat (4) @(negedge clk_sub[1]);
    rst_n = 1'b1;
    chk(w0(0, 4) == 1 && w0(0, 3) == 1 && w0(0, 2) == 2 && w0(0, 1) == 3 && w0(0, 0) == 4,
        $sformatf("initial weights %0d %0d %0d %0d %0d", w0(0,0), w0(0,1), w0(0,2), w0(0,3), w0(0,4)));
    obs_en = 1'b1;
    repeat (3000) @(posedge clk_main);
    // switch monitor 4 of subsystem 0 off
    @(negedge clk_main);
    dbg_in_valid = 1'b1;
    dbg_in_flit = '{tail: 1'b1, data: t_head(T_CFG, 2'd0, 3'd4, 8'd0)};
    do @(posedge clk_main); while (!dbg_in_ready);
    @(negedge clk_main) dbg_in_valid = 1'b0;
    // power cycle subsystem 1
    repeat (1000) @(posedge clk_main);
    @(negedge clk_sub[1]) sub_on[1] = 1'b0;
    repeat (300) @(posedge clk_sub[1]);
    @(negedge clk_sub[1]) sub_on[1] = 1'b1;
    repeat (3000) @(posedge clk_main);
    obs_en = 1'b0;
    repeat (3000) @(posedge clk_main);
    chk(operative[4] == 1'b0, "monitor 4 of subsystem 0 switched off");
    chk(w0(0, 0) == 3 && w0(0, 1) == 2 && w0(0, 2) == 1 && w0(0, 3) == 1,
        $sformatf("weights after DELTA %0d %0d %0d %0d", w0(0,0), w0(0,1), w0(0,2), w0(0,3)));
    chk(n_delta == 1, $sformatf("%0d DELTA packets", n_delta));
    lost_sum = 0;
    for (int i = 0; i < NM; i++) begin
      chk(n_trace[i] == issued[i] - int'(lost[i]),
          $sformatf("monitor %0d: %0d packets, %0d observed, %0d lost", i, n_trace[i], issued[i], lost[i]));
      chk(n_trace[i] > 0, $sformatf("monitor %0d reported", i));
      lost_sum += int'(lost[i]);
    end
    chk(lost[4] > 0, "observations of the switched-off monitor are dropped");
    chk(n_eop[0] > 0 && n_eop[1] > 0 && n_eop[SUB_MAIN] > 0,
        $sformatf("EOP packets %0d %0d %0d", n_eop[0], n_eop[1], n_eop[SUB_MAIN]));
    chk(n_wup[1] >= 1, $sformatf("%0d WUP packets for subsystem 1", n_wup[1]));
    chk(n_bad == 0, "debugger found no malformed packet");
    $display("eop=%0d/%0d/%0d wup=%0d delta=%0d lost=%0d", n_eop[0], n_eop[1], n_eop[SUB_MAIN],
             n_wup[1], n_delta, lost_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
