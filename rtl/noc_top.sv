// noc_top: the two on-chip networks side by side.
//
//  * ft_noc: the reliable 2D-mesh data NoC. NACK/GO switches with coded
//    flits, TMR control and a duplicated, self-checked arbiter; a built-in
//    self-test at boot; LBDR routing logic whose configuration arrives over
//    a triplicated ring of routing primitives (the dual network). The global
//    controller that closes that ring, reads the diagnosis and computes the
//    configuration is outside this design: its three ring rails are ports.
//  * trace_noc: the trace and debug NoC of a GALS multi-core system, built
//    from hierarchical rings with monitors, bridges between clock domains and
//    a port towards an off-chip debugger.
// The two share nothing; each has its own ports. Every parameter defaults
// to the main configuration: a 4x4 mesh and two subsystems of five
// monitors.
module noc_top
  import ft_pkg::*;
  import trace_pkg::*;
#(
  parameter int unsigned MESH_X   = 4,
  parameter int unsigned MESH_Y   = 4,
  parameter int unsigned BIST_LEN = 32,
  parameter int unsigned NSUB     = 2,
  parameter int unsigned NMON     = 5
) (
  // ------------------------------------------------ reliable data NoC
  input  logic clk,
  input  logic rst_n,
  input  logic bist_start_i,
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
  // dual-network ring ends, towards the global controller (three rails)
  input  logic [2:0]           dn_in_valid_i,
  input  logic [DN_FLIT_W-1:0] dn_in_flit_i  [3],
  output logic [2:0]           dn_in_stall_o,
  output logic [2:0]           dn_out_valid_o,
  output logic [DN_FLIT_W-1:0] dn_out_flit_o [3],
  input  logic [2:0]           dn_out_stall_i,
  output logic [MESH_X*MESH_Y-1:0] bist_done_o,
  output logic [MESH_X*MESH_Y-1:0] configured_o,
  output logic [DIAG_W-1:0]        diag_o  [MESH_X*MESH_Y],
  output logic [3:0]               ev_o    [MESH_X*MESH_Y],
  // ------------------------------------------------ trace NoC
  input  logic clk_main,
  input  logic trace_rst_n,
  input  logic [NSUB-1:0] clk_sub,
  input  logic [NSUB-1:0] sub_on_i,
  input  logic [NSUB*NMON-1:0] obs_valid_i,
  input  logic [5:0]           obs_len_i  [NSUB*NMON],
  input  logic [TF_W-1:0]      obs_data_i [NSUB*NMON],
  output logic [NSUB*NMON-1:0] operative_o,
  output logic [15:0]          lost_o     [NSUB*NMON],
  output logic   dbg_out_valid_o,
  output tflit_t dbg_out_flit_o,
  input  logic   dbg_out_ready_i,
  input  logic   dbg_in_valid_i,
  input  tflit_t dbg_in_flit_i,
  output logic   dbg_in_ready_o
);
  ft_noc #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BIST_LEN(BIST_LEN)) u_ft (
    .clk, .rst_n, .bist_start_i,
    .ni_valid_i, .ni_trash_i, .ni_code_i, .ni_stall_o, .ni_nack_o,
    .ni_valid_o, .ni_trash_o, .ni_code_o, .ni_stall_i, .ni_nack_i,
    .dn_in_valid_i, .dn_in_flit_i, .dn_in_stall_o,
    .dn_out_valid_o, .dn_out_flit_o, .dn_out_stall_i,
    .bist_done_o, .configured_o, .diag_o, .ev_o);

  trace_noc #(.NSUB(NSUB), .NMON(NMON)) u_trace (
    .clk_main, .rst_n(trace_rst_n), .clk_sub, .sub_on_i,
    .obs_valid_i, .obs_len_i, .obs_data_i, .operative_o, .lost_o,
    .dbg_out_valid_o, .dbg_out_flit_o, .dbg_out_ready_i,
    .dbg_in_valid_i, .dbg_in_flit_i, .dbg_in_ready_o);
endmodule
