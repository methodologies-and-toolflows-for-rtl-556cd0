// nackgo_switch: 5x5 wormhole switch of the fault-tolerant mesh, with NACK/GO
// flow control on its links and on its internal input-to-output path.
//
// Data path: five input buffers, a crossbar and five output buffers, all
// buffers being ng_buffer (detector, on-demand corrector, TMR control). A flit
// crosses the switch in one cycle (input buffer -> crossbar -> output buffer)
// and a link in one more, as in the baseline switch.
// Control path: for every input, two replicas of the LBDR routing logic read
// the head flit's destination; for every output, a fault-tolerant arbiter
// with doubled transition logic compares the two replicas' requests and grants
// the output to one input until its tail has passed. A disagreement withholds
// the grant for that cycle, and the flit is simply retried.
// Back path: an input sees the stall of the output it is granted (stall
// otherwise) and the nack of the output it sent to in the previous cycle.
//
// Head flit layout: data[7:4] destination x, data[3:0] destination y.
// Ports are numbered ft_pkg::port_e (0 local, 1 N, 2 E, 3 S, 4 W).
// block_i keeps every input stalled until the routing bits are configured.
// In test mode the LBDR replicas A are driven by test_dst_i and their outputs
// are returned on lbdr_resp_o for the built-in self-test comparators.
// Own choices: buffer depths (3, the NACK/GO minimum), lowest-port pick when
// LBDR offers several outputs, one idle cycle after each tail on an input so
// a nack on that tail can be resolved before the next head asks for an output.
module nackgo_switch
  import ft_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 3,
  parameter int unsigned OUT_DEPTH = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      block_i,
  input  lbdr_cfg_t cfg_i,
  // input links
  input  logic  [PORTS-1:0] in_valid_i,
  input  logic  [PORTS-1:0] in_trash_i,
  input  code_t             in_code_i  [PORTS],
  output logic  [PORTS-1:0] in_stall_o,
  output logic  [PORTS-1:0] in_nack_o,
  // output links
  output logic  [PORTS-1:0] out_valid_o,
  output logic  [PORTS-1:0] out_trash_o,
  output code_t             out_code_o [PORTS],
  input  logic  [PORTS-1:0] out_stall_i,
  input  logic  [PORTS-1:0] out_nack_i,
  // built-in self-test of the routing logic
  input  logic                    test_mode_i,
  input  logic [2*COORD_W-1:0]    test_dst_i  [PORTS],
  output logic [PORTS-1:0]        lbdr_resp_o [PORTS],
  // fault events (for intermittent-fault monitoring)
  output logic [3:0] ev_o     // {arbiter mismatch, uncorrectable, correction, nack}
);
  // input buffers
  logic  [PORTS-1:0] ib_valid, ib_trash, ib_stall, ib_nack, ib_sent;
  logic  [PORTS-1:0] ib_ev_nack, ib_ev_corr, ib_ev_unc;
  code_t             ib_code [PORTS];
  flit_t             ib_flit [PORTS];
  // output buffers
  logic  [PORTS-1:0] ob_valid, ob_trash, ob_stall, ob_nack, ob_acc;
  logic  [PORTS-1:0] ob_ev_nack, ob_ev_corr, ob_ev_unc;
  code_t             ob_code [PORTS];
  // routing and arbitration
  logic [PORTS-1:0] ra [PORTS], rb [PORTS];      // per input: LBDR replica outputs
  logic [PORTS-1:0] pa [PORTS], pb [PORTS];      // per input: picked port
  logic [PORTS-1:0] req_a [PORTS], req_b [PORTS];// per output: requesting inputs
  logic [PORTS-1:0] gnt [PORTS];                 // per output: granted input
  logic [PORTS-1:0] mism;
  logic [PORTS-1:0] last_out [PORTS];            // per input: output used last cycle
  logic [PORTS-1:0] tail_last;                   // per input: sent a tail last cycle
  code_t            xb_code [PORTS];
  logic [PORTS-1:0] xb_valid, xb_trash, xb_tail;

  for (genvar i = 0; i < PORTS; i++) begin : g_in
    ng_buffer #(.DEPTH(IN_DEPTH)) u_ib (
      .clk, .rst_n, .block_i,
      .in_valid_i(in_valid_i[i]), .in_trash_i(in_trash_i[i]), .in_code_i(in_code_i[i]),
      .stall_o(in_stall_o[i]), .nack_o(in_nack_o[i]),
      .out_valid_o(ib_valid[i]), .out_trash_o(ib_trash[i]), .out_code_o(ib_code[i]),
      .stall_i(ib_stall[i]), .nack_i(ib_nack[i]),
      .acc_o(), .sent_o(ib_sent[i]),
      .ev_nack_o(ib_ev_nack[i]), .ev_corr_o(ib_ev_corr[i]), .ev_uncorr_o(ib_ev_unc[i]));

    assign ib_flit[i] = ecc_extract(ib_code[i]);

    logic [COORD_W-1:0] dxa, dya;
    assign dxa = test_mode_i ? test_dst_i[i][2*COORD_W-1:COORD_W] : ib_flit[i].data[7:4];
    assign dya = test_mode_i ? test_dst_i[i][COORD_W-1:0]         : ib_flit[i].data[3:0];
    lbdr u_lbdr_a (.cfg_i, .dst_x_i(dxa), .dst_y_i(dya), .out_o(ra[i]));
    lbdr u_lbdr_b (.cfg_i, .dst_x_i(ib_flit[i].data[7:4]), .dst_y_i(ib_flit[i].data[3:0]),
                   .out_o(rb[i]));
    assign lbdr_resp_o[i] = ra[i];

    always_comb begin
      logic head_ok;
      pa[i] = '0;
      pb[i] = '0;
      for (int k = PORTS - 1; k >= 0; k--) begin
        if (ra[i][k]) pa[i] = PORTS'(1) << k;
        if (rb[i][k]) pb[i] = PORTS'(1) << k;
      end
      head_ok = ib_valid[i] && !ib_trash[i] && ib_flit[i].head && !tail_last[i] && !test_mode_i;
      if (!head_ok) begin
        pa[i] = '0;
        pb[i] = '0;
      end
    end
  end

  // crossbar and arbiters
  for (genvar j = 0; j < PORTS; j++) begin : g_out
    always_comb begin
      for (int i = 0; i < PORTS; i++) begin
        req_a[j][i] = pa[i][j];
        req_b[j][i] = pb[i][j];
      end
    end

    ft_arbiter #(.N(PORTS)) u_arb (
      .clk, .rst_n, .req_a_i(req_a[j]), .req_b_i(req_b[j]),
      .xfer_i(ob_acc[j]), .xfer_tail_i(xb_tail[j]), .nack_i(ob_nack[j]),
      .gnt_o(gnt[j]), .mismatch_o(mism[j]));

    always_comb begin
      xb_valid[j] = 1'b0;
      xb_trash[j] = mism[j];
      xb_tail[j]  = 1'b0;
      xb_code[j]  = '0;
      for (int i = 0; i < PORTS; i++) begin
        if (gnt[j][i]) begin
          xb_valid[j] = ib_valid[i];
          xb_trash[j] = ib_trash[i] || mism[j];
          xb_code[j]  = ib_code[i];
          xb_tail[j]  = ib_flit[i].tail;
        end
      end
    end

    ng_buffer #(.DEPTH(OUT_DEPTH)) u_ob (
      .clk, .rst_n, .block_i(1'b0),
      .in_valid_i(xb_valid[j]), .in_trash_i(xb_trash[j]), .in_code_i(xb_code[j]),
      .stall_o(ob_stall[j]), .nack_o(ob_nack[j]),
      .out_valid_o(ob_valid[j]), .out_trash_o(ob_trash[j]), .out_code_o(ob_code[j]),
      .stall_i(out_stall_i[j]), .nack_i(out_nack_i[j]),
      .acc_o(ob_acc[j]), .sent_o(),
      .ev_nack_o(ob_ev_nack[j]), .ev_corr_o(ob_ev_corr[j]), .ev_uncorr_o(ob_ev_unc[j]));

    assign out_valid_o[j] = ob_valid[j];
    assign out_trash_o[j] = ob_trash[j];
    assign out_code_o[j]  = ob_code[j];
  end

  // back path to the input buffers
  always_comb begin
    for (int i = 0; i < PORTS; i++) begin
      ib_stall[i] = 1'b1;
      ib_nack[i]  = 1'b1;
      for (int j = 0; j < PORTS; j++) begin
        if (gnt[j][i]) ib_stall[i] = ob_stall[j];
        if (last_out[i][j]) ib_nack[i] = ob_nack[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PORTS; i++) last_out[i] <= '0;
      tail_last <= '0;
    end else begin
      for (int i = 0; i < PORTS; i++) begin
        for (int j = 0; j < PORTS; j++) last_out[i][j] <= gnt[j][i] && ib_sent[i];
        tail_last[i] <= ib_sent[i] && ib_flit[i].tail;
      end
    end
  end

  assign ev_o = {|mism, |(ib_ev_unc | ob_ev_unc), |(ib_ev_corr | ob_ev_corr),
                 |(ib_ev_nack | ob_ev_nack)};
endmodule
