// tmr_routing_primitive: fault-tolerant dual-network node, three routing
// primitives with voting at the output of every ring stage.
//
// The ring is carried on three rails. Each of the three primitives receives
// the majority of the three incoming rails (flit and valid), so an error on
// one rail or in one upstream copy is outvoted here and does not accumulate
// along the ring; this keeps the failure probability of stage i linear in i.
// The stall signals going back upstream are voted the same way, as are the
// configuration bits handed to the switch (one voter for the three readers).
// The diagnosis bits from the switch are fanned out to all three writers.
// A fault that defeats the voting is caught by the controller's two-rail
// check and three-way handshake, and the switch is then left out.
// Follows the thesis' per-primitive voting scheme.
module tmr_routing_primitive
  import ft_pkg::*;
#(
  parameter logic [DN_ID_W-1:0] MY_ID = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           in_valid_i,
  input  logic [DN_FLIT_W-1:0] in_flit_i [3],
  output logic [2:0]           stall_o,
  output logic [2:0]           out_valid_o,
  output logic [DN_FLIT_W-1:0] out_flit_o [3],
  input  logic [2:0]           stall_i,
  input  logic [DIAG_W-1:0]    diag_i,
  input  logic                 diag_valid_i,
  output logic [CFG_W-1:0]     cfg_o,
  output logic                 cfg_valid_o
);
  logic [DN_FLIT_W:0] vin;
  logic               vstall;
  logic [CFG_W:0]     c [3];

  tmr_voter #(.W(DN_FLIT_W + 1)) u_vin (
    .a_i({in_valid_i[0], in_flit_i[0]}), .b_i({in_valid_i[1], in_flit_i[1]}),
    .c_i({in_valid_i[2], in_flit_i[2]}), .y_o(vin));
  tmr_voter #(.W(1)) u_vstall (.a_i(stall_i[0]), .b_i(stall_i[1]), .c_i(stall_i[2]),
                               .y_o(vstall));

  for (genvar r = 0; r < 3; r++) begin : g_rail
    routing_primitive #(.MY_ID(MY_ID)) u_rp (
      .clk, .rst_n,
      .in_valid_i(vin[DN_FLIT_W]), .in_flit_i(vin[DN_FLIT_W-1:0]), .stall_o(stall_o[r]),
      .out_valid_o(out_valid_o[r]), .out_flit_o(out_flit_o[r]), .stall_i(vstall),
      .diag_i, .diag_valid_i,
      .cfg_o(c[r][CFG_W-1:0]), .cfg_valid_o(c[r][CFG_W]));
  end

  tmr_voter #(.W(CFG_W + 1)) u_vcfg (.a_i(c[0]), .b_i(c[1]), .c_i(c[2]),
                                     .y_o({cfg_valid_o, cfg_o}));
endmodule
