// tmr_voter: bitwise two-out-of-three majority voter.
//
// Used wherever the thesis triplicates a register or a whole block: the FSM
// state of the NACK/GO buffers, the arbiter state, and the inputs and
// configuration outputs of the triplicated dual-network routing primitive.
// Combinational; W is the width of each of the three copies.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] y_o
);
  assign y_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
endmodule
