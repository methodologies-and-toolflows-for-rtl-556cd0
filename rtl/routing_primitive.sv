// routing_primitive: one node of the dual (configuration) network ring.
//
// The dual network is a ring of these primitives, one per data-network
// switch, closed by the global controller. It carries fixed 3-flit packets of
// 15-bit flits with stall/go flow control:
//   diagnosis  (switch -> controller): head{DIAG,id}, diag, ~diag
//   echo       (switch -> controller): head{ECHO,id}, cfg[12:0], cfg[25:13]
//   configure  (controller -> switch): head{CFG,id},  cfg[12:0], cfg[25:13]
// A 2-slot input buffer feeds a decoder that sends configuration packets for
// this switch to the reader and everything else on around the ring. The
// writer builds this switch's packets; a fixed-priority allocator shares the
// output between ring traffic (first) and the writer, one whole packet at a
// time. The writer sends the diagnosis word once when the self-test is done
// (two-rail in time: the word, then its complement).
// The reader implements the switch side of the three-way handshake: a new
// configuration is stored and echoed back; when the same bits arrive a second
// time they are applied (cfg_valid_o goes high, the switch starts).
// Flit width, packet length, buffer size, fixed priority, packet contents and
// the handshake follow the thesis; bit placement, type codes and ring-first
// priority are this design's choices.
module routing_primitive
  import ft_pkg::*;
#(
  parameter logic [DN_ID_W-1:0] MY_ID = '0,
  parameter int unsigned        DEPTH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic [DN_FLIT_W-1:0] in_flit_i,
  output logic                 stall_o,
  output logic                 out_valid_o,
  output logic [DN_FLIT_W-1:0] out_flit_o,
  input  logic                 stall_i,
  input  logic [DIAG_W-1:0]    diag_i,
  input  logic                 diag_valid_i,
  output logic [CFG_W-1:0]     cfg_o,
  output logic                 cfg_valid_o
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned HALF = CFG_W / 2;

  // ---------------- input buffer
  logic [DN_FLIT_W-1:0] buf_q [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic push, pop, b_valid;
  logic [DN_FLIT_W-1:0] b_flit;
  assign stall_o = (int'(cnt) == int'(DEPTH));
  assign push    = in_valid_i && !stall_o;
  assign b_valid = cnt != '0;
  assign b_flit  = buf_q[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  // ---------------- decoder / demux
  logic [1:0] in_pos;          // flit position within the packet at the head
  logic       to_reader_q, to_reader;
  assign to_reader = (in_pos == 2'd0)
                   ? (dn_type_e'(b_flit[14:13]) == DN_CFG && b_flit[12:9] == MY_ID)
                   : to_reader_q;

  // ---------------- writer
  typedef enum logic [1:0] {W_IDLE, W_DIAG, W_ECHO} wkind_e;
  wkind_e w_kind;
  logic [1:0] w_pos;
  logic diag_sent, echo_req;
  logic [CFG_W-1:0] pend;
  logic have_pend;
  logic w_valid;
  logic [DN_FLIT_W-1:0] w_flit;

  always_comb begin
    w_valid = w_kind != W_IDLE;
    w_flit  = '0;
    unique case (w_kind)
      W_DIAG: unique case (w_pos)
        2'd0:    w_flit = dn_head(DN_DIAG, MY_ID);
        2'd1:    w_flit = DN_FLIT_W'(diag_i);
        default: w_flit = DN_FLIT_W'(~diag_i);
      endcase
      W_ECHO: unique case (w_pos)
        2'd0:    w_flit = dn_head(DN_ECHO, MY_ID);
        2'd1:    w_flit = DN_FLIT_W'(pend[HALF-1:0]);
        default: w_flit = DN_FLIT_W'(pend[CFG_W-1:HALF]);
      endcase
      default: w_flit = '0;
    endcase
  end

  // ---------------- allocator (fixed priority, packet lock) and mux
  typedef enum logic [1:0] {L_NONE, L_FWD, L_WR} lock_e;
  lock_e lock;
  logic fwd_req, g_fwd, g_wr, o_go;
  assign fwd_req = b_valid && !to_reader;
  always_comb begin
    g_fwd = (lock == L_FWD) || (lock == L_NONE && fwd_req);
    g_wr  = (lock == L_WR)  || (lock == L_NONE && !fwd_req && w_valid);
    out_valid_o = (g_fwd && fwd_req) || (g_wr && w_valid);
    out_flit_o  = g_fwd ? b_flit : w_flit;
    o_go = out_valid_o && !stall_i;
    pop  = b_valid && (to_reader || (g_fwd && !stall_i));
  end

  // ---------------- reader
  logic [HALF-1:0] r_lo;
  logic [CFG_W-1:0] rcv;
  assign rcv = {b_flit[HALF-1:0], r_lo};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      in_pos <= '0; to_reader_q <= 1'b0;
      lock <= L_NONE;
      w_kind <= W_IDLE; w_pos <= '0;
      diag_sent <= 1'b0; echo_req <= 1'b0;
      pend <= '0; have_pend <= 1'b0;
      r_lo <= '0;
      cfg_o <= '0; cfg_valid_o <= 1'b0;
    end else begin
      // buffer
      if (push) begin
        buf_q[wp] <= in_flit_i;
        wp <= inc(wp);
      end
      if (pop) rp <= inc(rp);
      cnt <= $bits(cnt)'(int'(cnt) + int'(push) - int'(pop));
      // decoder packet tracking
      if (pop) begin
        in_pos <= (in_pos == 2'd2) ? 2'd0 : in_pos + 1'b1;
        if (in_pos == 2'd0) to_reader_q <= to_reader;
      end
      // reader
      if (pop && to_reader) begin
        if (in_pos == 2'd1) r_lo <= b_flit[HALF-1:0];
        if (in_pos == 2'd2) begin
          if (have_pend && rcv == pend) begin
            cfg_o       <= rcv;
            cfg_valid_o <= 1'b1;
            have_pend   <= 1'b0;
          end else begin
            pend      <= rcv;
            have_pend <= 1'b1;
            echo_req  <= 1'b1;
          end
        end
      end
      // writer: start a packet when idle
      if (w_kind == W_IDLE) begin
        if (diag_valid_i && !diag_sent) begin
          w_kind <= W_DIAG;
          diag_sent <= 1'b1;
        end else if (echo_req) begin
          w_kind <= W_ECHO;
          echo_req <= 1'b0;
        end
      end
      // allocator lock and writer progress
      if (o_go) begin
        if (g_fwd) begin
          lock <= (in_pos == 2'd2) ? L_NONE : L_FWD;
        end else begin
          lock  <= (w_pos == 2'd2) ? L_NONE : L_WR;
          w_pos <= (w_pos == 2'd2) ? 2'd0 : w_pos + 1'b1;
          if (w_pos == 2'd2) w_kind <= W_IDLE;
        end
      end
    end
  end
endmodule
