// ng_master: behavioural NACK/GO packet source for the testbenches.
//
// Sends numbered packets of LEN flits from source SRC. A new packet is
// queued with destination dst_i whenever go_i is high and fewer than two
// packets are waiting. Flit contents are a pure function of (source,
// sequence number, flit index, destination), so any flit can be rebuilt
// when it has to be resent:
//   head : [31:24] source, [23:12] sequence, [11:8] 0,     [7:4] x, [3:0] y
//   other: [31:24] source, [23:12] sequence, [11:8] index, [7:0] check byte
// NACK/GO: a flit leaves when valid=1, trash=0 and stall=0; if nack is high
// in the following cycle the source goes back and resends that flit.
// Knobs (percent per cycle): p_trash_i sends a trash cycle instead of a
// flit, p_link_i flips one random bit of the coded flit on the wire.
module ng_master
  import ft_pkg::*;
#(
  parameter int unsigned SRC = 0,
  parameter int unsigned LEN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  go_i,
  input  logic [7:0] dst_i,
  input  int    p_trash_i,
  input  int    p_link_i,
  output logic  valid_o,
  output logic  trash_o,
  output code_t code_o,
  input  logic  stall_i,
  input  logic  nack_i,
  output int    pkts_o,        // packets queued so far
  output int    done_o,        // packets fully delivered (all flits acknowledged)
  output int    link_err_o,    // flits corrupted on the wire
  output int    resent_o       // go-backs after a nack
);
  int   fi = 0, last_fi = 0, acked = 0;
  logic sent = 1'b0;
  logic [7:0] pkt_dst [int];
  logic trash_now = 1'b0, flip_now = 1'b0;
  int   flip_bit = 0;

  initial begin
    pkts_o = 0; link_err_o = 0; resent_o = 0;
  end

  function automatic flit_t mk(input int f);
    flit_t r;
    int p, k;
    p = f / int'(LEN);
    k = f % int'(LEN);
    r.head = (k == 0);
    r.tail = (k == int'(LEN) - 1);
    if (k == 0) r.data = {8'(SRC), 12'(p), 4'd0, pkt_dst[p]};
    else        r.data = {8'(SRC), 12'(p), 4'(k), 8'(SRC) ^ 8'(p) ^ 8'(k * 37)};
    return r;
  endfunction

  always_comb begin
    valid_o = fi < pkts_o * int'(LEN);
    trash_o = valid_o && trash_now;
    code_o  = valid_o ? ecc_encode(mk(fi)) : '0;
    if (flip_now) code_o[flip_bit] = ~code_o[flip_bit];
  end

  logic xfer;
  assign xfer = valid_o && !trash_o && !stall_i && !(sent && nack_i);
  assign done_o = acked / int'(LEN);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (sent && nack_i) begin
        fi <= last_fi;
        resent_o <= resent_o + 1;
      end else if (xfer) fi <= fi + 1;
      if (sent && !nack_i) acked <= acked + 1;
      if (xfer) last_fi <= fi;
      if (xfer && flip_now) link_err_o <= link_err_o + 1;
      sent <= xfer;
      if (go_i && (pkts_o * int'(LEN) - fi) < 2 * int'(LEN)) begin
        pkt_dst[pkts_o] = dst_i;
        pkts_o <= pkts_o + 1;
      end
    end
  end

  always_ff @(negedge clk) begin
    trash_now <= (int'($urandom % 100) < p_trash_i);
    flip_now  <= (int'($urandom % 100) < p_link_i);
    flip_bit  <= int'($urandom % CODE_W);
  end
endmodule
