// trace_pkg: flit and packet format of the hierarchical-ring trace & debug NoC.
//
// Links carry 16-bit flits plus a tail marker, with valid/ready handshake.
// Every packet starts with a head flit:
//   [15:13] packet type, [12:11] subsystem, [10:8] monitor, [7:0] argument
// Packet kinds:
//   TRACE  head, timestamp flit, payload flits ...      (monitor -> debugger)
//   EOP    head only: a subring counter's K-bit part wrapped  (-> debugger)
//   WUP    head, timestamp flit of the main-ring counter: a subsystem woke up
//   DELTA  head only, argument bit 0 = 1 for +1, 0 for -1: a monitor was
//          switched on or off; ring routers adjust their arbitration weight
//   CFG    head only, argument bit 0 = operative (debugger -> one monitor)
// The 16-bit flit and the packet kinds follow the thesis; bit positions and
// type codes are this design's choices.
package trace_pkg;
  localparam int unsigned TF_W = 16;

  typedef struct packed {
    logic            tail;
    logic [TF_W-1:0] data;
  } tflit_t;

  typedef enum logic [2:0] {T_TRACE = 3'd0, T_EOP = 3'd1, T_WUP = 3'd2,
                            T_DELTA = 3'd3, T_CFG = 3'd4} ttype_e;

  localparam logic [1:0] SUB_MAIN = 2'd3;   // subsystem code of the main ring

  function automatic logic [TF_W-1:0] t_head(input ttype_e t, input logic [1:0] sub,
                                             input logic [2:0] mon, input logic [7:0] arg);
    return {t, sub, mon, arg};
  endfunction

  typedef enum logic [1:0] {R_MON = 2'd0, R_SUB_BRIDGE = 2'd1,
                            R_MAIN_BRIDGE = 2'd2, R_DEBUG = 2'd3} role_e;
endpackage
