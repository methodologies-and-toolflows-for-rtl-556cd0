// ft_arbiter: low-power fault-tolerant output-port arbiter of the NACK/GO switch.
//
// The arbiter is a small FSM: a round-robin pointer, the current owner of the
// output and a "locked" flag held from the head to the tail of a packet
// (wormhole switching). Its transition logic (grant and next state) is
// built twice, each copy fed by its own replica of the routing logic
// (req_a_i, req_b_i). A two-rail checker compares the copies. When they agree,
// the grant is used and the triplicated state register loads the next state
// (read back through a majority voter). When they disagree, the state is
// frozen, no grant is given and mismatch_o tells the switch to trash the
// flit crossing this output, so that it is retried in the next cycle.
//
// NACK/GO handling: when the tail flit of a packet is nacked one cycle after
// it passed, no new request is considered and the previous owner gets the
// output again to resend the tail.
//
// The next state is computed for the three outcomes of the cycle (no
// transfer, head/body transfer, tail transfer) so that the comparison does not
// depend on the transfer itself; xfer_i / xfer_tail_i then pick one.
// Grants are combinational from the state and the requests (same cycle).
// Doubled logic, two-rail checking and triplicated registers follow the
// thesis; the round-robin policy and the state encoding are this design's.
module ft_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_a_i,
  input  logic [N-1:0] req_b_i,
  input  logic         xfer_i,       // a flit passed through this output
  input  logic         xfer_tail_i,  // ... and it was a tail flit
  input  logic         nack_i,       // nack from the output buffer
  output logic [N-1:0] gnt_o,
  output logic         mismatch_o
);
  typedef struct packed {
    logic         locked;
    logic         tail_pend;
    logic [N-1:0] owner;
    logic [N-1:0] rr;        // last winner, one-hot
  } st_t;

  typedef struct packed {
    logic [N-1:0] gnt;
    st_t          nx;        // next state, no transfer
    st_t          xb;        // next state, head or body transfer
    st_t          xt;        // next state, tail transfer
  } tl_t;

  function automatic tl_t transition(input st_t s, input logic [N-1:0] req,
                                     input logic nack);
    tl_t r;
    logic [N-1:0] hi, rq_hi, pick;
    // round robin: lowest requester above the last winner, else the lowest
    // requester overall (written branch-free: x & -x keeps the lowest one)
    hi    = ~((s.rr << 1) - N'(1));
    if (s.rr == '0) hi = '0;
    rq_hi = req & hi;
    pick  = (rq_hi != '0) ? (rq_hi & (~rq_hi + N'(1))) : (req & (~req + N'(1)));
    r.nx = s;
    r.nx.tail_pend = 1'b0;
    if (s.locked) begin
      r.gnt = s.owner;
    end else if (s.tail_pend && nack) begin
      r.gnt = s.owner;
      r.nx.locked = 1'b1;          // the tail is to be resent by the same owner
    end else begin
      r.gnt = pick;
    end
    r.xb = r.nx;
    r.xb.locked = 1'b1;
    r.xb.owner  = r.gnt;
    r.xb.rr     = r.gnt;
    r.xt = r.xb;
    r.xt.locked    = 1'b0;
    r.xt.tail_pend = 1'b1;
    return r;
  endfunction

  st_t q0, q1, q2, s, ns;
  tl_t ta, tb;
  logic eq;
  logic [1:0] rail;

  tmr_voter #(.W($bits(st_t))) u_vote (.a_i(q0), .b_i(q1), .c_i(q2), .y_o(s));

  always_comb begin
    ta = transition(s, req_a_i, nack_i);
    tb = transition(s, req_b_i, nack_i);
  end

  two_rail_checker #(.W($bits(tl_t))) u_trc (.a_i(ta), .b_i(tb), .eq_o(eq), .rail_o(rail));

  always_comb begin
    mismatch_o = !eq;
    gnt_o = eq ? ta.gnt : '0;
    ns = !xfer_i ? ta.nx : (xfer_tail_i ? ta.xt : ta.xb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0 <= '0;
      q1 <= '0;
      q2 <= '0;
    end else if (eq) begin
      q0 <= ns;
      q1 <= ns;
      q2 <= ns;
    end
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_o));
  a_xfer_needs_grant: assert property (@(posedge clk) disable iff (!rst_n)
    xfer_i |-> (gnt_o != '0));
endmodule
