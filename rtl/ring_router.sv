// ring_router: two-input, two-output, input-buffered router of the trace NoC.
//
// One input/output pair (P0) forms the ring: it receives from the upstream
// router and sends to the downstream one. The other pair (P1, "slave side")
// connects the attached monitor, bridge or debugger. Each input has a small
// FIFO. A packet's route is chosen from its head flit and held until its tail:
//   role MON          trace traffic from the ring and from the monitor goes on
//                     along the ring; a CFG packet for this monitor leaves on
//                     the slave side.
//   role SUB_BRIDGE   serves the bridge of a subring: ring traffic goes to the
//                     bridge, packets from the bridge enter the ring; a CFG
//                     packet that went round without a taker is dropped.
//   role MAIN_BRIDGE  on the main ring: traffic from the bridge enters the ring;
//                     a CFG packet for this subsystem goes to the bridge.
//   role DEBUG        serves the debugger: ring traffic leaves to the debugger,
//                     the debugger's CFG packets enter the ring.
// When both inputs compete for the ring output, a weighted round robin grants
// the ring input up to w0 packets for every packet from the slave side
// (w1 = 1). With monitors numbered K = 0.. from the ring's exit, the weight
// w0 = N - K - 1 (at least 1) gives every monitor the same share of the ring.
// A DELTA packet (a monitor switched on or off) arriving on the ring input
// moves w0 by +-1 as it passes, so the weights follow the number of working
// monitors. With GEN_EOP set, a pulse on eop_i queues a one-flit end-of-period
// packet, sent on the output that leads to the debugger at the next packet
// boundary.
// Follows the thesis' ring structure, weights and weight-change packets; the
// deterministic weighted round robin, the FIFO depth and the valid/ready
// handshake are this design's choices.
module ring_router
  import trace_pkg::*;
#(
  parameter role_e       ROLE    = R_MON,
  parameter logic [1:0]  SUB_ID  = 2'd0,
  parameter logic [2:0]  MON_ID  = 3'd0,
  parameter int unsigned W0_INIT = 1,
  parameter int unsigned DEPTH   = 3,
  parameter bit          GEN_EOP = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  // P0: ring
  input  logic   r_in_valid_i,
  input  tflit_t r_in_flit_i,
  output logic   r_in_ready_o,
  output logic   r_out_valid_o,
  output tflit_t r_out_flit_o,
  input  logic   r_out_ready_i,
  // P1: slave side
  input  logic   s_in_valid_i,
  input  tflit_t s_in_flit_i,
  output logic   s_in_ready_o,
  output logic   s_out_valid_o,
  output tflit_t s_out_flit_o,
  input  logic   s_out_ready_i,
  // end-of-period pulse of this domain's counter
  input  logic   eop_i,
  output logic [3:0] w0_o
);
  // routes: 0 ring out, 1 slave out, 2 drop
  typedef enum logic [1:0] {D_RING = 2'd0, D_SLAVE = 2'd1, D_DROP = 2'd2} dest_e;
  typedef enum logic [1:0] {O_NONE = 2'd0, O_P0 = 2'd1, O_P1 = 2'd2, O_GEN = 2'd3} own_e;

  // ---------------- input FIFOs
  logic   f_valid [2], f_pop [2], f_ready [2];
  tflit_t f_flit  [2];
  for (genvar i = 0; i < 2; i++) begin : g_fifo
    tflit_t mem [DEPTH];
    logic [$clog2(DEPTH)-1:0] wp, rp;
    logic [$clog2(DEPTH+1)-1:0] cnt;
    logic push;
    assign f_ready[i] = int'(cnt) < int'(DEPTH);
    assign push = (i == 0) ? (r_in_valid_i && f_ready[0]) : (s_in_valid_i && f_ready[1]);
    assign f_valid[i] = cnt != '0;
    assign f_flit[i]  = mem[rp];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp <= '0; rp <= '0; cnt <= '0;
      end else begin
        if (push) begin
          mem[wp] <= (i == 0) ? r_in_flit_i : s_in_flit_i;
          wp <= (int'(wp) == int'(DEPTH) - 1) ? '0 : wp + 1'b1;
        end
        if (f_pop[i]) rp <= (int'(rp) == int'(DEPTH) - 1) ? '0 : rp + 1'b1;
        cnt <= $bits(cnt)'(int'(cnt) + int'(push) - int'(f_pop[i]));
      end
    end
  end
  assign r_in_ready_o = f_ready[0];
  assign s_in_ready_o = f_ready[1];

  // ---------------- route of the packet at the head of each FIFO
  logic  in_pkt [2];          // inside a packet (head already routed)
  dest_e dq [2], dh [2], d [2];

  function automatic dest_e route(input int port, input logic [TF_W-1:0] h);
    ttype_e t;
    logic for_me;
    t = ttype_e'(h[15:13]);
    if (port == 1) return D_RING;
    unique case (ROLE)
      R_MON: begin
        for_me = (t == T_CFG) && h[12:11] == SUB_ID && h[10:8] == MON_ID;
        return for_me ? D_SLAVE : D_RING;
      end
      R_SUB_BRIDGE:  return (t == T_CFG) ? D_DROP : D_SLAVE;
      R_MAIN_BRIDGE: return (t == T_CFG && h[12:11] == SUB_ID) ? D_SLAVE : D_RING;
      default:       return (t == T_CFG) ? D_DROP : D_SLAVE;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      dh[i] = route(i, f_flit[i].data);
      d[i]  = in_pkt[i] ? dq[i] : dh[i];
    end
  end

  // ---------------- end-of-period generator
  localparam dest_e GEN_DEST = (ROLE == R_SUB_BRIDGE || ROLE == R_DEBUG) ? D_SLAVE : D_RING;
  logic eop_pend;
  tflit_t gen_flit;
  assign gen_flit = '{tail: 1'b1,
                      data: t_head(T_EOP, (ROLE == R_DEBUG) ? SUB_MAIN : SUB_ID, 3'd0, 8'd0)};

  // ---------------- weights
  logic [3:0] wcnt;            // N_new - K - 1, as moved by DELTA packets
  logic [3:0] w0;
  assign w0   = (wcnt == '0) ? 4'd1 : wcnt;
  assign w0_o = w0;

  // ---------------- output allocation
  own_e own [2], sel [2];
  logic [3:0] served;          // ring-input packets since the last slave packet
  logic o_valid [2], o_ready [2], o_go [2];
  tflit_t o_flit [2];
  assign o_ready[0] = r_out_ready_i;
  assign o_ready[1] = s_out_ready_i;

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      logic rq0, rq1, rqg;
      rq0 = f_valid[0] && d[0] == dest_e'(o);
      rq1 = f_valid[1] && d[1] == dest_e'(o);
      rqg = GEN_EOP && eop_pend && GEN_DEST == dest_e'(o);
      if (own[o] != O_NONE)                sel[o] = own[o];
      else if (rqg)                        sel[o] = O_GEN;
      else if (rq0 && rq1)                 sel[o] = (served < w0) ? O_P0 : O_P1;
      else if (rq0)                        sel[o] = O_P0;
      else if (rq1)                        sel[o] = O_P1;
      else                                 sel[o] = O_NONE;
      // a locked packet only continues with flits of its own input
      unique case (sel[o])
        O_P0:    begin o_valid[o] = rq0; o_flit[o] = f_flit[0]; end
        O_P1:    begin o_valid[o] = rq1; o_flit[o] = f_flit[1]; end
        O_GEN:   begin o_valid[o] = 1'b1; o_flit[o] = gen_flit; end
        default: begin o_valid[o] = 1'b0; o_flit[o] = '0; end
      endcase
      o_go[o] = o_valid[o] && o_ready[o];
    end
    for (int i = 0; i < 2; i++) begin
      f_pop[i] = f_valid[i] && (d[i] == D_DROP ||
                 (o_go[0] && sel[0] == own_e'(i + 1)) ||
                 (o_go[1] && sel[1] == own_e'(i + 1)));
    end
  end

  assign r_out_valid_o = o_valid[0];
  assign r_out_flit_o  = o_flit[0];
  assign s_out_valid_o = o_valid[1];
  assign s_out_flit_o  = o_flit[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= '{default: 1'b0};
      dq       <= '{default: D_RING};
      own      <= '{default: O_NONE};
      served   <= '0;
      eop_pend <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (f_pop[i]) begin
          in_pkt[i] <= !f_flit[i].tail;
          if (!in_pkt[i]) dq[i] <= dh[i];
        end
      end
      for (int o = 0; o < 2; o++) begin
        if (o_go[o]) begin
          own[o] <= o_flit[o].tail ? O_NONE : sel[o];
          // count packets at their head for the weighted round robin
          if (own[o] == O_NONE && o == 0) begin
            if (sel[o] == O_P0)      served <= (served < w0) ? served + 1'b1 : served;
            else if (sel[o] == O_P1) served <= '0;
          end
        end
      end
      if (GEN_EOP && eop_i) eop_pend <= 1'b1;
      else if (((o_go[0] && sel[0] == O_GEN) || (o_go[1] && sel[1] == O_GEN))) eop_pend <= 1'b0;
    end
  end

  // weight change packets seen on the ring input by monitor routers; the
  // other routers keep their fixed weight
  if (ROLE == R_MON) begin : g_wcnt
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) wcnt <= 4'(W0_INIT);
      else if (f_pop[0] && !in_pkt[0] && ttype_e'(f_flit[0].data[15:13]) == T_DELTA) begin
        if (f_flit[0].data[0])   wcnt <= wcnt + 1'b1;
        else if (wcnt != '0)     wcnt <= wcnt - 1'b1;
      end
    end
  end else begin : g_wfix
    assign wcnt = 4'(W0_INIT);
  end
endmodule
