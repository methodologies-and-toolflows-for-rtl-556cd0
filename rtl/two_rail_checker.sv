// two_rail_checker: self-checking comparator of two copies of a W-bit word.
//
// Each bit pair (a, ~b) forms a two-rail code word, valid when the two rails
// differ. A tree of two-rail checker cells reduces them to one two-rail pair
// (z0, z1), itself valid only if every input pair was valid; a stuck fault in
// the tree also ends in an invalid pair. eq_o is 1 when the pair is valid,
// i.e. the two copies agree. Combinational. Used by the fault-tolerant arbiter
// to compare its duplicated transition logic, as the thesis prescribes;
// the tree form is this design's choice.
module two_rail_checker #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic         eq_o,
  output logic [1:0]   rail_o
);
  // Pad to a power of two with the pair (1, 0), which passes the other
  // input of a cell through unchanged. Level l pairs bit k with bit k + H
  // (H = half of the remaining width): z0 = x0 y0 | x1 y1, z1 = x0 y1 | x1 y0.
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned P = 1 << L;

  logic [P-1:0] r0 [L+1];
  logic [P-1:0] r1 [L+1];

  assign r0[0] = {{(P - W){1'b1}}, a_i};
  assign r1[0] = {{(P - W){1'b0}}, ~b_i};

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned H = P >> (l + 1);
    assign r0[l+1] = {{(P - H){1'b0}}, (r0[l][H-1:0] & r0[l][2*H-1:H]) | (r1[l][H-1:0] & r1[l][2*H-1:H])};
    assign r1[l+1] = {{(P - H){1'b0}}, (r0[l][H-1:0] & r1[l][2*H-1:H]) | (r1[l][H-1:0] & r0[l][2*H-1:H])};
  end

  assign rail_o = {r1[L][0], r0[L][0]};
  assign eq_o   = r1[L][0] ^ r0[L][0];
endmodule
