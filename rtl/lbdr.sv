// lbdr: logic-based distributed routing for one input port of a 2D-mesh switch.
//
// Instead of a routing table, a few gates pick the output port from the
// quadrant of the destination relative to this switch (N', E', S', W'), from
// routing bits Rxy (a packet that leaves through x may later turn to y, as
// allowed by the deadlock-free routing algorithm) and from connectivity bits
// Cx (output x has a working link). For the north output:
//   N = Cn & ( N'~E'~W'N1 | N'~E'~W'Rnn | N'E'Rne | N'W'Rnw )
// and likewise for E, S and W. If no output qualifies for a non-local packet,
// the deroute logic takes over and sends it to the port named by the two
// deroute bits. A packet for this switch goes to the local port.
// Purely combinational; out has one bit per port (bit = ft_pkg::port_e);
// several bits may be set when the routing bits allow a choice, and the
// switch then takes the lowest-numbered one.
// Follows the gate structure printed in the thesis (route computation and
// deroute figures). Own choices: y grows southwards; N1 (and E1, S1, W1)
// means "the destination is the next switch in that direction"; the 26
// configuration bits are 12 routing bits, 4 connectivity bits, 2 deroute bits
// and the switch's own 4+4-bit coordinates.
module lbdr
  import ft_pkg::*;
(
  input  lbdr_cfg_t          cfg_i,
  input  logic [COORD_W-1:0] dst_x_i,
  input  logic [COORD_W-1:0] dst_y_i,
  output logic [PORTS-1:0]   out_o
);
  logic qn, qe, qs, qw, n1, e1, s1, w1;
  logic un, ue, us, uw, local_hit, none;

  always_comb begin
    qn = dst_y_i < cfg_i.my_y;
    qs = dst_y_i > cfg_i.my_y;
    qe = dst_x_i > cfg_i.my_x;
    qw = dst_x_i < cfg_i.my_x;
    n1 = qn && (dst_y_i == cfg_i.my_y - 1'b1);
    s1 = qs && (dst_y_i == cfg_i.my_y + 1'b1);
    e1 = qe && (dst_x_i == cfg_i.my_x + 1'b1);
    w1 = qw && (dst_x_i == cfg_i.my_x - 1'b1);
    local_hit = !qn && !qs && !qe && !qw;

    un = cfg_i.cn && ((qn && !qe && !qw && n1) || (qn && !qe && !qw && cfg_i.rnn) ||
                      (qn && qe && cfg_i.rne) || (qn && qw && cfg_i.rnw));
    us = cfg_i.cs && ((qs && !qe && !qw && s1) || (qs && !qe && !qw && cfg_i.rss) ||
                      (qs && qe && cfg_i.rse) || (qs && qw && cfg_i.rsw));
    ue = cfg_i.ce && ((qe && !qn && !qs && e1) || (qe && !qn && !qs && cfg_i.ree) ||
                      (qe && qn && cfg_i.ren) || (qe && qs && cfg_i.res));
    uw = cfg_i.cw && ((qw && !qn && !qs && w1) || (qw && !qn && !qs && cfg_i.rww) ||
                      (qw && qn && cfg_i.rwn) || (qw && qs && cfg_i.rws));

    // deroute: enabled when no port was selected (NOR of the four)
    none = !(un || ue || uw || us) && !local_hit;
    out_o = '0;
    out_o[P_LOCAL] = local_hit;
    out_o[P_NORTH] = un || (none && cfg_i.dr == 2'd0);
    out_o[P_EAST]  = ue || (none && cfg_i.dr == 2'd1);
    out_o[P_WEST]  = uw || (none && cfg_i.dr == 2'd2);
    out_o[P_SOUTH] = us || (none && cfg_i.dr == 2'd3);
  end
endmodule
