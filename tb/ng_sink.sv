// ng_sink: behavioural NACK/GO packet sink and checker for the testbenches.
//
// Receives the flits produced by ng_master sources. A flit is taken when
// valid=1, trash=0 and the sink does not stall; in the next cycle the sink
// checks its code and drives nack low only for a clean flit, so a corrupted
// flit is sent again. Random stalls (p_stall_i) and random refusals of clean
// flits (p_nack_i) exercise the sender's flow control.
// Each accepted flit is checked: a head must carry this sink's coordinates
// (MY_X, MY_Y), the flits of a packet must arrive together, in order and
// with the head's source and sequence number, and per source the sequence
// numbers must grow. Violations are counted in errors_o.
module ng_sink
  import ft_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0,
  parameter int unsigned LEN  = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  int    p_stall_i,
  input  int    p_nack_i,
  input  logic  valid_i,
  input  logic  trash_i,
  input  code_t code_i,
  output logic  stall_o,
  output logic  nack_o,
  output int    pkts_o,
  output int    flits_o,
  output int    errors_o,
  output int    nacks_o,
  output int    trash_o       // trash cycles seen on the link
);
  logic  tent = 1'b0, force_bad = 1'b0, bad;
  code_t hold;
  int    pos = 0, cur_src = 0, cur_seq = 0;
  int    last_seq [256];

  initial begin
    for (int i = 0; i < 256; i++) last_seq[i] = -1;
    pkts_o = 0; flits_o = 0; errors_o = 0; nacks_o = 0; trash_o = 0;
    stall_o = 1'b0;
  end

  always_comb begin
    bad    = tent && (force_bad || (ecc_syndrome(hold) != '0) || (^hold));
    nack_o = !(tent && !bad);
  end

  logic acc;
  assign acc = valid_i && !trash_i && !stall_o && !bad;

  task automatic err(input string m);
    errors_o++;
    $display("SINK(%0d,%0d) ERROR: %s", MY_X, MY_Y, m);
  endtask

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (valid_i && trash_i) trash_o <= trash_o + 1;
      if (tent && bad) nacks_o <= nacks_o + 1;
      if (tent && !bad) begin
        flit_t f;
        int s, q;
        f = ecc_extract(hold);
        s = int'(f.data[31:24]);
        q = int'(f.data[23:12]);
        flits_o <= flits_o + 1;
        if (pos == 0) begin
          if (!f.head) err("packet without head");
          if (f.data[7:4] != 4'(MY_X) || f.data[3:0] != 4'(MY_Y))
            err($sformatf("misrouted packet for (%0d,%0d)", f.data[7:4], f.data[3:0]));
          if (q <= last_seq[s]) err($sformatf("source %0d sequence %0d after %0d", s, q, last_seq[s]));
          last_seq[s] = q;
          cur_src = s;
          cur_seq = q;
        end else begin
          if (f.head) err("head inside a packet");
          if (s != cur_src || q != cur_seq || int'(f.data[11:8]) != pos ||
              f.data[7:0] != (8'(s) ^ 8'(q) ^ 8'(pos * 37)))
            err($sformatf("bad flit %0d of packet %0d/%0d", pos, cur_src, cur_seq));
        end
        if (f.tail != (pos == int'(LEN) - 1)) err("tail at the wrong place");
        if (pos == int'(LEN) - 1) begin
          pos <= 0;
          pkts_o <= pkts_o + 1;
        end else pos <= pos + 1;
      end
      tent <= acc;
      hold <= code_i;
      force_bad <= acc && (int'($urandom % 100) < p_nack_i);
    end
  end

  always_ff @(negedge clk) stall_o <= (int'($urandom % 100) < p_stall_i);
endmodule
