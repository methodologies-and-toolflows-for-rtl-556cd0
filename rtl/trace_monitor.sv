// trace_monitor: observation point of the trace NoC (abstract model of a
// monitor attached to one core or memory interface).
//
// When operative, each observed transfer (obs_valid_i with a payload length
// and a data word) becomes a TRACE packet: a head flit naming subsystem and
// monitor, a timestamp flit holding the subring counter value at the time of
// the observation, then obs_len_i payload flits (the data word, then
// consecutive words), the last one marked tail. An observation that arrives
// while a packet is still being sent, or while the monitor is not operative,
// is not reported and is counted in lost_o.
// CFG packets received from the router switch the monitor on or off; every
// change sends a one-flit DELTA packet (+1 on, -1 off) so that the ring
// routers re-balance their arbitration weights.
// The thesis leaves the monitor's inside open and describes only these
// common features; packet layout and the drop policy are this design's.
module trace_monitor
  import trace_pkg::*;
#(
  parameter logic [1:0]  SUB_ID = 2'd0,
  parameter logic [2:0]  MON_ID = 3'd0,
  parameter int unsigned TS_W   = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ts_i,
  // observed channel
  input  logic            obs_valid_i,
  input  logic [5:0]      obs_len_i,     // payload flits, at least 1
  input  logic [TF_W-1:0] obs_data_i,
  // to / from the router's slave side
  output logic            out_valid_o,
  output tflit_t          out_flit_o,
  input  logic            out_ready_i,
  input  logic            in_valid_i,
  input  tflit_t          in_flit_i,
  output logic            in_ready_o,
  output logic            operative_o,
  output logic [15:0]     lost_o
);
  typedef enum logic [1:0] {M_IDLE, M_HEAD, M_TS, M_PAY} st_e;
  st_e st;
  logic [5:0]      left;
  logic [TS_W-1:0] ts_q;
  logic [TF_W-1:0] word;
  logic            delta_pend, delta_sign;

  assign in_ready_o = 1'b1;

  always_comb begin
    out_valid_o = 1'b0;
    out_flit_o  = '0;
    unique case (st)
      M_IDLE: if (delta_pend) begin
        out_valid_o = 1'b1;
        out_flit_o  = '{tail: 1'b1,
                        data: t_head(T_DELTA, SUB_ID, MON_ID, {7'd0, delta_sign})};
      end
      M_HEAD: begin
        out_valid_o = 1'b1;
        out_flit_o  = '{tail: 1'b0, data: t_head(T_TRACE, SUB_ID, MON_ID, 8'(left))};
      end
      M_TS: begin
        out_valid_o = 1'b1;
        out_flit_o  = '{tail: 1'b0, data: TF_W'(ts_q)};
      end
      default: begin
        out_valid_o = 1'b1;
        out_flit_o  = '{tail: left == 6'd1, data: word};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      left <= '0;
      ts_q <= '0;
      word <= '0;
      delta_pend <= 1'b0;
      delta_sign <= 1'b0;
      operative_o <= 1'b1;
      lost_o <= '0;
    end else begin
      // configuration from the debugger
      if (in_valid_i && ttype_e'(in_flit_i.data[15:13]) == T_CFG &&
          in_flit_i.data[0] != operative_o) begin
        operative_o <= in_flit_i.data[0];
        delta_pend  <= 1'b1;
        delta_sign  <= in_flit_i.data[0];
      end
      if (obs_valid_i && !(st == M_IDLE && operative_o && !delta_pend && obs_len_i != '0))
        lost_o <= lost_o + 1'b1;
      unique case (st)
        M_IDLE: begin
          if (delta_pend) begin
            if (out_ready_i) delta_pend <= 1'b0;
          end
          if (obs_valid_i) begin
            if (operative_o && !delta_pend && obs_len_i != '0) begin
              st   <= M_HEAD;
              left <= obs_len_i;
              ts_q <= ts_i;
              word <= obs_data_i;
            end
          end
        end
        M_HEAD: if (out_ready_i) st <= M_TS;
        M_TS:   if (out_ready_i) st <= M_PAY;
        default: if (out_ready_i) begin
          word <= word + 1'b1;
          left <= left - 1'b1;
          if (left == 6'd1) st <= M_IDLE;
        end
      endcase
      if (obs_valid_i && st != M_IDLE) lost_o <= lost_o + 1'b1;
    end
  end
endmodule
