// trace_bridge: voltage/frequency crossing between one subring and the main
// ring of the trace NoC.
//
// Two dual-clock FIFOs, DEPTH flits each: downstream (subring -> main ring,
// trace traffic) and upstream (main ring -> subring, configuration). The
// subring side attaches to the slave port of the subring's bridge router, the
// main side to the slave port of a main-ring router. The downstream FIFO also
// lets the slow subring fill a packet while the main ring is busy and then
// send it in a burst.
// Wake-up packets: the subsystem's power/clock-enable level sub_awake_i is
// synchronized into the main clock; on each rising edge the bridge samples the
// main-ring counter and, at the next packet boundary of the downstream
// stream, sends a two-flit WUP packet (head, main-ring timestamp) so that the
// debugger can place the restarted subring counter on the main time axis.
// Ten-flit bridge buffers and the wake-up packet follow the thesis; the FIFO
// design and the insertion point are this design's choices.
module trace_bridge
  import trace_pkg::*;
#(
  parameter logic [1:0]  SUB_ID = 2'd0,
  parameter int unsigned DEPTH  = 10,
  parameter int unsigned TS_W   = 10
) (
  // subring side
  input  logic   clk_s,
  input  logic   rst_s_n,
  input  logic   s_in_valid_i,     // downstream traffic from the subring
  input  tflit_t s_in_flit_i,
  output logic   s_in_ready_o,
  output logic   s_out_valid_o,    // upstream traffic into the subring
  output tflit_t s_out_flit_o,
  input  logic   s_out_ready_i,
  // main ring side
  input  logic   clk_m,
  input  logic   rst_m_n,
  output logic   m_out_valid_o,
  output tflit_t m_out_flit_o,
  input  logic   m_out_ready_i,
  input  logic   m_in_valid_i,
  input  tflit_t m_in_flit_i,
  output logic   m_in_ready_o,
  input  logic   sub_awake_i,
  input  logic [TS_W-1:0] ts_main_i
);
  logic   d_valid, d_ready;
  tflit_t d_flit;

  async_fifo #(.W($bits(tflit_t)), .DEPTH(DEPTH)) u_down (
    .wclk(clk_s), .wrst_n(rst_s_n), .w_valid_i(s_in_valid_i), .w_data_i(s_in_flit_i),
    .w_ready_o(s_in_ready_o),
    .rclk(clk_m), .rrst_n(rst_m_n), .r_valid_o(d_valid), .r_data_o(d_flit),
    .r_ready_i(d_ready));

  async_fifo #(.W($bits(tflit_t)), .DEPTH(DEPTH)) u_up (
    .wclk(clk_m), .wrst_n(rst_m_n), .w_valid_i(m_in_valid_i), .w_data_i(m_in_flit_i),
    .w_ready_o(m_in_ready_o),
    .rclk(clk_s), .rrst_n(rst_s_n), .r_valid_o(s_out_valid_o), .r_data_o(s_out_flit_o),
    .r_ready_i(s_out_ready_i));

  // wake-up detection in the main clock domain
  logic aw1, aw2, aw3;
  logic wup_pend, wup_ts_phase, in_pkt;
  logic [TS_W-1:0] wup_ts;
  logic sending_wup;

  assign sending_wup = (wup_pend && !in_pkt) || wup_ts_phase;
  always_comb begin
    if (sending_wup) begin
      m_out_valid_o = 1'b1;
      m_out_flit_o  = wup_ts_phase ? '{tail: 1'b1, data: TF_W'(wup_ts)}
                                   : '{tail: 1'b0, data: t_head(T_WUP, SUB_ID, 3'd0, 8'd0)};
      d_ready       = 1'b0;
    end else begin
      m_out_valid_o = d_valid;
      m_out_flit_o  = d_flit;
      d_ready       = m_out_ready_i;
    end
  end

  always_ff @(posedge clk_m or negedge rst_m_n) begin
    if (!rst_m_n) begin
      aw1 <= 1'b0; aw2 <= 1'b0; aw3 <= 1'b0;
      wup_pend <= 1'b0; wup_ts_phase <= 1'b0; in_pkt <= 1'b0;
      wup_ts <= '0;
    end else begin
      aw1 <= sub_awake_i;
      aw2 <= aw1;
      aw3 <= aw2;
      if (aw2 && !aw3) begin
        wup_pend <= 1'b1;
        wup_ts   <= ts_main_i;
      end
      if (m_out_ready_i) begin
        if (sending_wup) begin
          if (wup_ts_phase) begin
            wup_ts_phase <= 1'b0;
            if (!(aw2 && !aw3)) wup_pend <= 1'b0;
          end else begin
            wup_ts_phase <= 1'b1;
          end
        end else if (d_valid) begin
          in_pkt <= !d_flit.tail;
        end
      end
    end
  end
endmodule
