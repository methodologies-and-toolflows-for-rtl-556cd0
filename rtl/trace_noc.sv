// trace_noc: non-intrusive trace & debug network for a GALS system.
//
// Hierarchical rings: each subsystem (one clock/voltage domain) has a subring
// of NMON monitor routers plus one bridge router; a bridge crosses into the
// main ring, which has one router per subsystem bridge and one router for the
// debugger port. All rings are unidirectional.
//   subring s:  bridge router -> monitor NMON-1 -> ... -> monitor 0 -> bridge router
//   main ring:  bridge router 0 -> bridge router 1 -> ... -> debugger router -> ...
// Monitor k (k = 0 nearest the ring exit) starts with ring weight
// max(NMON-k-1, 1), so every monitor gets the same share of its subring.
// Each subring and the main ring have their own timestamp counter; the
// subring bridge router and the debugger router emit an end-of-period packet
// each time their counter's low K bits wrap. The bridges send a wake-up
// packet, stamped with the main-ring counter, when their subsystem powers up.
// Power-down of subsystem s is modelled by sub_on_i[s] = 0: its counter is
// held at zero (its clock may stop as well).
// The debugger is off-chip software: its port (downstream packets out,
// configuration packets in) is brought out.
// Two subsystems of five monitors each, 16-bit flits, 3-flit router and
// 10-flit bridge buffers and the 10-bit counters (K=8, M=2) are the thesis'
// evaluation setup.
module trace_noc
  import trace_pkg::*;
#(
  parameter int unsigned NSUB  = 2,
  parameter int unsigned NMON  = 5,
  parameter int unsigned TS_N  = 10,
  parameter int unsigned TS_K  = 8,
  parameter int unsigned R_DEPTH = 3,
  parameter int unsigned B_DEPTH = 10
) (
  input  logic clk_main,
  input  logic rst_n,
  input  logic [NSUB-1:0] clk_sub,
  input  logic [NSUB-1:0] sub_on_i,
  // observed channels, monitor m of subsystem s at index s*NMON+m
  input  logic [NSUB*NMON-1:0] obs_valid_i,
  input  logic [5:0]           obs_len_i  [NSUB*NMON],
  input  logic [TF_W-1:0]      obs_data_i [NSUB*NMON],
  output logic [NSUB*NMON-1:0] operative_o,
  output logic [15:0]          lost_o     [NSUB*NMON],
  // debugger port
  output logic   dbg_out_valid_o,
  output tflit_t dbg_out_flit_o,
  input  logic   dbg_out_ready_i,
  input  logic   dbg_in_valid_i,
  input  tflit_t dbg_in_flit_i,
  output logic   dbg_in_ready_o
);
  // main-ring links: mr[k] enters main router k (0..NSUB-1 bridges, NSUB debugger)
  logic   mr_valid [NSUB+1], mr_ready [NSUB+1];
  tflit_t mr_flit  [NSUB+1];
  logic [TS_N-1:0] ts_main;
  logic            eop_main;

  ts_counter #(.N(TS_N), .K(TS_K)) u_ts_main (
    .clk(clk_main), .rst_n, .gate_i(1'b0), .cnt_o(ts_main), .eop_o(eop_main));

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    // subring links: sr[k] enters subring router k
    //   k = 0 .. NMON-1 : monitor routers (K = k), k = NMON : bridge router
    logic   sr_valid [NMON+1], sr_ready [NMON+1];
    tflit_t sr_flit  [NMON+1];
    logic [TS_N-1:0] ts_sub;
    logic eop_sub;
    logic rst_s_n;
    assign rst_s_n = rst_n;

    ts_counter #(.N(TS_N), .K(TS_K)) u_ts (
      .clk(clk_sub[s]), .rst_n(rst_s_n), .gate_i(!sub_on_i[s]), .cnt_o(ts_sub), .eop_o(eop_sub));

    // bridge router <-> bridge
    logic   bs_d_valid, bs_d_ready, bs_u_valid, bs_u_ready;
    tflit_t bs_d_flit, bs_u_flit;
    // main router <-> bridge
    logic   bm_d_valid, bm_d_ready, bm_u_valid, bm_u_ready;
    tflit_t bm_d_flit, bm_u_flit;

    // ring order: bridge router (index NMON) -> monitor NMON-1 -> ... -> monitor 0 -> bridge
    ring_router #(.ROLE(R_SUB_BRIDGE), .SUB_ID(2'(s)), .W0_INIT(1), .DEPTH(R_DEPTH),
                  .GEN_EOP(1'b1)) u_rb (
      .clk(clk_sub[s]), .rst_n(rst_s_n),
      .r_in_valid_i(sr_valid[NMON]), .r_in_flit_i(sr_flit[NMON]), .r_in_ready_o(sr_ready[NMON]),
      .r_out_valid_o(sr_valid[NMON-1]), .r_out_flit_o(sr_flit[NMON-1]),
      .r_out_ready_i(sr_ready[NMON-1]),
      .s_in_valid_i(bs_u_valid), .s_in_flit_i(bs_u_flit), .s_in_ready_o(bs_u_ready),
      .s_out_valid_o(bs_d_valid), .s_out_flit_o(bs_d_flit), .s_out_ready_i(bs_d_ready),
      .eop_i(eop_sub), .w0_o());

    for (genvar k = 0; k < NMON; k++) begin : g_mon
      localparam int unsigned W0 = (int'(NMON) - k - 1 < 1) ? 1 : NMON - k - 1;
      localparam int unsigned IDX = s * NMON + k;
      logic   ms_valid, ms_ready, sm_valid, sm_ready;
      tflit_t ms_flit, sm_flit;
      // router k receives on sr[k] and sends to sr[k-1] (monitor 0 sends to the bridge router)
      localparam int unsigned NEXT = (k == 0) ? NMON : k - 1;
      logic   o_valid, o_ready;
      tflit_t o_flit;

      ring_router #(.ROLE(R_MON), .SUB_ID(2'(s)), .MON_ID(3'(k)), .W0_INIT(W0),
                    .DEPTH(R_DEPTH)) u_rm (
        .clk(clk_sub[s]), .rst_n(rst_s_n),
        .r_in_valid_i(sr_valid[k]), .r_in_flit_i(sr_flit[k]), .r_in_ready_o(sr_ready[k]),
        .r_out_valid_o(o_valid), .r_out_flit_o(o_flit), .r_out_ready_i(o_ready),
        .s_in_valid_i(ms_valid), .s_in_flit_i(ms_flit), .s_in_ready_o(ms_ready),
        .s_out_valid_o(sm_valid), .s_out_flit_o(sm_flit), .s_out_ready_i(sm_ready),
        .eop_i(1'b0), .w0_o());

      if (k == 0) begin : g_last
        assign sr_valid[NMON] = o_valid;
        assign sr_flit[NMON]  = o_flit;
        assign o_ready        = sr_ready[NMON];
      end else begin : g_mid
        assign sr_valid[k-1] = o_valid;
        assign sr_flit[k-1]  = o_flit;
        assign o_ready       = sr_ready[k-1];
      end

      trace_monitor #(.SUB_ID(2'(s)), .MON_ID(3'(k)), .TS_W(TS_N)) u_mon (
        .clk(clk_sub[s]), .rst_n(rst_s_n), .ts_i(ts_sub),
        .obs_valid_i(obs_valid_i[IDX]), .obs_len_i(obs_len_i[IDX]), .obs_data_i(obs_data_i[IDX]),
        .out_valid_o(ms_valid), .out_flit_o(ms_flit), .out_ready_i(ms_ready),
        .in_valid_i(sm_valid), .in_flit_i(sm_flit), .in_ready_o(sm_ready),
        .operative_o(operative_o[IDX]), .lost_o(lost_o[IDX]));
    end

    trace_bridge #(.SUB_ID(2'(s)), .DEPTH(B_DEPTH), .TS_W(TS_N)) u_br (
      .clk_s(clk_sub[s]), .rst_s_n,
      .s_in_valid_i(bs_d_valid), .s_in_flit_i(bs_d_flit), .s_in_ready_o(bs_d_ready),
      .s_out_valid_o(bs_u_valid), .s_out_flit_o(bs_u_flit), .s_out_ready_i(bs_u_ready),
      .clk_m(clk_main), .rst_m_n(rst_n),
      .m_out_valid_o(bm_d_valid), .m_out_flit_o(bm_d_flit), .m_out_ready_i(bm_d_ready),
      .m_in_valid_i(bm_u_valid), .m_in_flit_i(bm_u_flit), .m_in_ready_o(bm_u_ready),
      .sub_awake_i(sub_on_i[s]), .ts_main_i(ts_main));

    ring_router #(.ROLE(R_MAIN_BRIDGE), .SUB_ID(2'(s)), .W0_INIT(1), .DEPTH(R_DEPTH)) u_rmb (
      .clk(clk_main), .rst_n,
      .r_in_valid_i(mr_valid[s]), .r_in_flit_i(mr_flit[s]), .r_in_ready_o(mr_ready[s]),
      .r_out_valid_o(mr_valid[s+1]), .r_out_flit_o(mr_flit[s+1]), .r_out_ready_i(mr_ready[s+1]),
      .s_in_valid_i(bm_d_valid), .s_in_flit_i(bm_d_flit), .s_in_ready_o(bm_d_ready),
      .s_out_valid_o(bm_u_valid), .s_out_flit_o(bm_u_flit), .s_out_ready_i(bm_u_ready),
      .eop_i(1'b0), .w0_o());
  end

  // debugger router closes the main ring
  logic   dr_valid, dr_ready;
  tflit_t dr_flit;
  ring_router #(.ROLE(R_DEBUG), .SUB_ID(SUB_MAIN), .W0_INIT(1), .DEPTH(R_DEPTH),
                .GEN_EOP(1'b1)) u_rd (
    .clk(clk_main), .rst_n,
    .r_in_valid_i(mr_valid[NSUB]), .r_in_flit_i(mr_flit[NSUB]), .r_in_ready_o(mr_ready[NSUB]),
    .r_out_valid_o(dr_valid), .r_out_flit_o(dr_flit), .r_out_ready_i(dr_ready),
    .s_in_valid_i(dbg_in_valid_i), .s_in_flit_i(dbg_in_flit_i), .s_in_ready_o(dbg_in_ready_o),
    .s_out_valid_o(dbg_out_valid_o), .s_out_flit_o(dbg_out_flit_o),
    .s_out_ready_i(dbg_out_ready_i),
    .eop_i(eop_main), .w0_o());
  assign mr_valid[0] = dr_valid;
  assign mr_flit[0]  = dr_flit;
  assign dr_ready    = mr_ready[0];
endmodule
