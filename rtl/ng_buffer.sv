// ng_buffer: NACK/GO flow-controlled FIFO buffer, used as both the input and
// the output buffer of the fault-tolerant switch.
//
// Receive side (from upstream): a flit is taken when valid=1, trash=0 and this
// buffer does not stall. It is written straight into a slot as "tentative";
// in the next cycle the detector checks that slot. A clean flit is committed
// and nack is driven low (acknowledge); a corrupted one is not committed, nack
// goes high and the flit arriving in that same cycle is discarded, because the
// sender will go back and resend from the corrupted flit. nack is also high
// in every cycle that follows a cycle with nothing received. stall is high
// when no slot is free (or while block_i holds the port closed before the
// network is configured).
//
// Send side (to downstream): a sent flit stays in its slot until the receiver
// acknowledges it one cycle later; on a nack the read position goes back to
// it (go-back-N with N = 1, since the acknowledge comes one cycle after the
// transfer). A tentative flit may be forwarded speculatively in the cycle it is
// being checked; if the check fails it leaves with trash=1. A committed flit
// whose stored copy has been hit by an upset also leaves with trash=1, and the
// corrector repairs the slot in place, so the next attempt carries the
// repaired value (a retransmission alone could not fix a stored upset).
//
// Control registers are triplicated and voted (TMR), as the thesis does for
// the buffer FSMs. Data slots are protected by the flit code only.
// Timing: a flit written at the end of cycle t can leave in cycle t+1; a
// stream passes at one flit per cycle with DEPTH >= 3, the minimum the thesis
// gives for NACK/GO. Events (nack received, trash sent, correction) are
// reported for network-level monitoring of intermittent faults.
module ng_buffer
  import ft_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  block_i,     // keep stall high (port not yet configured)
  // upstream link
  input  logic  in_valid_i,
  input  logic  in_trash_i,
  input  code_t in_code_i,
  output logic  stall_o,
  output logic  nack_o,
  // downstream link
  output logic  out_valid_o,
  output logic  out_trash_o,
  output code_t out_code_o,
  input  logic  stall_i,
  input  logic  nack_i,
  // status
  output logic  acc_o,         // an incoming flit was taken this cycle
  output logic  sent_o,        // a flit transfer happened this cycle
  output logic  ev_nack_o,     // our previous flit was nacked
  output logic  ev_corr_o,     // a stored flit was corrected
  output logic  ev_uncorr_o    // a stored flit has an uncorrectable error
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [PW-1:0] wr;       // slot of the tentative / next written flit
    logic [PW-1:0] rd;       // oldest unacknowledged flit
    logic [CW-1:0] count;    // committed, not yet acknowledged flits
    logic          tent;     // slot wr holds a flit being checked
    logic          sent;     // a flit left last cycle, waiting for (n)ack
  } ctl_t;

  ctl_t  q0, q1, q2, s, n;
  code_t mem [DEPTH];

  tmr_voter #(.W($bits(ctl_t))) u_vote (.a_i(q0), .b_i(q1), .c_i(q2), .y_o(s));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  // detector on the tentative slot, detector/corrector on the send slot
  logic  t_err, t_single, t_double;
  code_t t_corr;
  flit_t t_flit;
  logic [PW-1:0] snd;
  logic  o_err, o_single, o_double;
  code_t o_corr;
  flit_t o_flit;

  flit_ecc u_det (.code_i(mem[s.wr]), .err_o(t_err), .single_o(t_single),
                  .double_o(t_double), .corrected_o(t_corr), .flit_o(t_flit));
  flit_ecc u_corr (.code_i(mem[snd]), .err_o(o_err), .single_o(o_single),
                   .double_o(o_double), .corrected_o(o_corr), .flit_o(o_flit));

  logic ok_tent, drop, accept, ack, nackd, committed_unsent, spec, fix;
  logic [PW-1:0] wr_next;

  always_comb begin
    snd     = s.sent ? inc(s.rd) : s.rd;
    ok_tent = s.tent && !t_err;
    drop    = s.tent && t_err;
    stall_o = block_i || ((int'(s.count) + int'(s.tent)) >= int'(DEPTH));
    nack_o  = !ok_tent;
    accept  = in_valid_i && !in_trash_i && !stall_o && !drop;
    wr_next = ok_tent ? inc(s.wr) : s.wr;

    ack   = s.sent && !nack_i;
    nackd = s.sent && nack_i;
    committed_unsent = int'(s.count) > int'(s.sent);
    spec  = (int'(s.count) == int'(s.sent)) && s.tent;
    out_valid_o = committed_unsent || spec;
    out_code_o  = mem[snd];
    out_trash_o = out_valid_o && o_err;
    fix   = committed_unsent && o_single;
    sent_o = out_valid_o && !out_trash_o && !stall_i && !nackd;

    n       = s;
    n.wr    = wr_next;
    n.tent  = accept;
    n.rd    = ack ? inc(s.rd) : s.rd;
    n.count = CW'(int'(s.count) + int'(ok_tent) - int'(ack));
    n.sent  = sent_o;

    acc_o       = accept;
    ev_nack_o   = nackd;
    ev_corr_o   = fix;
    ev_uncorr_o = committed_unsent && o_double;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= '0;
      q1 <= '0;
      q2 <= '0;
    end else begin
      q0 <= n;
      q1 <= n;
      q2 <= n;
    end
  end

  always_ff @(posedge clk) begin
    if (fix) mem[snd] <= o_corr;
    if (accept) mem[wr_next] <= in_code_i;
  end

  // A flit may never be written into a slot that is still in use.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (int'(s.count) + int'(ok_tent)) < int'(DEPTH));
endmodule
