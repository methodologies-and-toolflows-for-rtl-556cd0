// ft_noc: self-testing, self-configuring fault-tolerant 2D-mesh NoC.
//
// MESH_X x MESH_Y tiles, each with a NACK/GO switch, a built-in self-test unit
// and a triplicated routing primitive of the dual network. Switch ports are
// linked to the four mesh neighbours; the local port is brought out for the
// tile's network interface. Ports at the mesh edge have no link.
//
// Bring-up sequence:
//  1. bist_start_i starts the self-test in every switch at once. Every switch
//     drives its test patterns onto all its output links; its own diagnosis
//     unit checks the patterns arriving from the neighbours (channel test),
//     then feeds them to its routing logic (routing-logic test).
//  2. Each switch hands its 10 diagnosis bits to its routing primitive, which
//     sends them on the dual ring to the global controller (outside this
//     block: the ring enters at dn_in_* and leaves at dn_out_*).
//  3. The controller sends routing bits back; each primitive runs the
//     three-way handshake and releases its switch (block lifted) once the same
//     bits arrived twice.
// Until released, each switch keeps its input stall high.
// Ring order: primitive 0 (tile x=0,y=0) first, then row by row; tile id is
// y*MESH_X + x, which is also the dual-network switch ID.
// Mesh size follows the thesis' 4x4 evaluation; the ring order and the edge
// treatment are this design's choices.
module ft_noc
  import ft_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned BIST_LEN = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bist_start_i,
  // local ports, one per tile
  input  logic  [MESH_X*MESH_Y-1:0] ni_valid_i,
  input  logic  [MESH_X*MESH_Y-1:0] ni_trash_i,
  input  code_t                     ni_code_i  [MESH_X*MESH_Y],
  output logic  [MESH_X*MESH_Y-1:0] ni_stall_o,
  output logic  [MESH_X*MESH_Y-1:0] ni_nack_o,
  output logic  [MESH_X*MESH_Y-1:0] ni_valid_o,
  output logic  [MESH_X*MESH_Y-1:0] ni_trash_o,
  output code_t                     ni_code_o  [MESH_X*MESH_Y],
  input  logic  [MESH_X*MESH_Y-1:0] ni_stall_i,
  input  logic  [MESH_X*MESH_Y-1:0] ni_nack_i,
  // dual network ring, three rails, to and from the global controller
  input  logic [2:0]           dn_in_valid_i,
  input  logic [DN_FLIT_W-1:0] dn_in_flit_i  [3],
  output logic [2:0]           dn_in_stall_o,
  output logic [2:0]           dn_out_valid_o,
  output logic [DN_FLIT_W-1:0] dn_out_flit_o [3],
  input  logic [2:0]           dn_out_stall_i,
  // status
  output logic [MESH_X*MESH_Y-1:0] bist_done_o,
  output logic [MESH_X*MESH_Y-1:0] configured_o,
  output logic [DIAG_W-1:0]        diag_o  [MESH_X*MESH_Y],
  output logic [3:0]               ev_o    [MESH_X*MESH_Y]
);
  localparam int unsigned NT = MESH_X * MESH_Y;

  // link wires seen at each switch output: [tile][port]
  logic  [PORTS-1:0] o_valid [NT], o_trash [NT], o_stall [NT], o_nack [NT];
  code_t             o_code  [NT][PORTS];
  // wires seen at each switch input
  logic  [PORTS-1:0] i_valid [NT], i_trash [NT], i_stall [NT], i_nack [NT];
  code_t             i_code  [NT][PORTS];
  logic  [PORTS-1:0] has_nb  [NT];
  logic  [2*COORD_W-1:0] tpg [NT];
  logic  [NT-1:0]    bist_busy;

  // dual ring rails between primitives: ring[k] enters primitive k
  logic [2:0]           r_valid [NT+1];
  logic [DN_FLIT_W-1:0] r_flit  [NT+1][3];
  logic [2:0]           r_stall [NT+1];

  assign r_valid[0]    = dn_in_valid_i;
  assign r_flit[0]     = dn_in_flit_i;
  assign dn_in_stall_o = r_stall[0];
  assign dn_out_valid_o = r_valid[NT];
  assign dn_out_flit_o  = r_flit[NT];
  assign r_stall[NT]    = dn_out_stall_i;

  // neighbour of tile t through port p, and the port it arrives on there
  function automatic int nb(input int t, input int p);
    int x, y;
    x = t % int'(MESH_X);
    y = t / int'(MESH_X);
    unique case (p)
      1: return (y > 0)                  ? t - int'(MESH_X) : -1;  // north
      2: return (x < int'(MESH_X) - 1)   ? t + 1            : -1;  // east
      3: return (y < int'(MESH_Y) - 1)   ? t + int'(MESH_X) : -1;  // south
      4: return (x > 0)                  ? t - 1            : -1;  // west
      default: return -1;
    endcase
  endfunction
  function automatic int opp(input int p);
    unique case (p)
      1: return 3;
      2: return 4;
      3: return 1;
      4: return 2;
      default: return 0;
    endcase
  endfunction

  for (genvar t = 0; t < NT; t++) begin : g_tile
    lbdr_cfg_t cfg_sw, cfg_dn, test_cfg;
    logic      test_mode, configured, bdone;
    logic [DIAG_W-1:0] diag;
    logic [2*COORD_W-1:0] resp [PORTS];
    logic [PORTS-1:0] lresp [PORTS];

    // wiring of the mesh links (combinational)
    for (genvar p = 0; p < PORTS; p++) begin : g_port
      if (p == 0) begin : g_local
        assign i_valid[t][0] = ni_valid_i[t] && !bist_busy[t];
        assign i_trash[t][0] = ni_trash_i[t];
        assign i_code[t][0]  = ni_code_i[t];
        assign ni_stall_o[t] = i_stall[t][0];
        assign ni_nack_o[t]  = i_nack[t][0];
        assign ni_valid_o[t] = o_valid[t][0];
        assign ni_trash_o[t] = o_trash[t][0];
        assign ni_code_o[t]  = o_code[t][0];
        assign o_stall[t][0] = ni_stall_i[t];
        assign o_nack[t][0]  = ni_nack_i[t];
        assign resp[0]       = tpg[t];          // local loop during self-test
        assign has_nb[t][0]  = 1'b1;
      end else if (nb(t, p) >= 0) begin : g_link
        localparam int N = nb(t, p);
        localparam int Q = opp(p);
        // during self-test the link carries the neighbour's test pattern
        assign i_valid[t][p] = o_valid[N][Q] && !bist_busy[t];
        assign i_trash[t][p] = o_trash[N][Q];
        assign i_code[t][p]  = bist_busy[N] ? code_t'(tpg[N]) : o_code[N][Q];
        assign o_stall[t][p] = i_stall[N][Q];
        assign o_nack[t][p]  = i_nack[N][Q];
        assign resp[p]       = i_code[t][p][2*COORD_W-1:0];
        assign has_nb[t][p]  = 1'b1;
      end else begin : g_edge
        assign i_valid[t][p] = 1'b0;
        assign i_trash[t][p] = 1'b0;
        assign i_code[t][p]  = '0;
        assign o_stall[t][p] = 1'b1;
        assign o_nack[t][p]  = 1'b1;
        assign resp[p]       = '0;
        assign has_nb[t][p]  = 1'b0;
      end
    end

    bist_unit #(.LEN(BIST_LEN)) u_bist (
      .clk, .rst_n, .start_i(bist_start_i), .tpg_o(tpg[t]),
      .test_mode_o(test_mode), .test_cfg_o(test_cfg),
      .resp_i(resp), .lbdr_resp_i(lresp), .diag_o(diag), .done_o(bdone));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            bist_busy[t] <= 1'b0;
      else if (bist_start_i) bist_busy[t] <= 1'b1;
      else if (bdone)        bist_busy[t] <= 1'b0;
    end

    assign cfg_sw = test_mode ? test_cfg : cfg_dn;

    nackgo_switch u_sw (
      .clk, .rst_n, .block_i(!configured), .cfg_i(cfg_sw),
      .in_valid_i(i_valid[t]), .in_trash_i(i_trash[t]), .in_code_i(i_code[t]),
      .in_stall_o(i_stall[t]), .in_nack_o(i_nack[t]),
      .out_valid_o(o_valid[t]), .out_trash_o(o_trash[t]), .out_code_o(o_code[t]),
      .out_stall_i(o_stall[t]), .out_nack_i(o_nack[t]),
      .test_mode_i(test_mode), .test_dst_i(resp), .lbdr_resp_o(lresp),
      .ev_o(ev_o[t]));

    tmr_routing_primitive #(.MY_ID(DN_ID_W'(t))) u_dn (
      .clk, .rst_n,
      .in_valid_i(r_valid[t]), .in_flit_i(r_flit[t]), .stall_o(r_stall[t]),
      .out_valid_o(r_valid[t+1]), .out_flit_o(r_flit[t+1]), .stall_i(r_stall[t+1]),
      .diag_i(diag), .diag_valid_i(bdone),
      .cfg_o(cfg_dn), .cfg_valid_o(configured));

    assign bist_done_o[t]  = bdone;
    assign configured_o[t] = configured;
    assign diag_o[t]       = diag;
  end
endmodule
