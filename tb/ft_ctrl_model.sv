// ft_ctrl_model: behavioural model of the global controller of the mesh's
// dual network (software on a host processor in a real system).
//
// It closes the triplicated configuration ring: it reads rail 0 of the ring
// output (always accepting) and drives the same flit on all three rails of
// the ring input. It collects one DIAG packet per switch and checks that its
// second and third flits are complements. When all NT are in, it computes
// the LBDR bits of XY routing for a MESH_X x MESH_Y mesh: a link is usable
// if it exists and neither end reported the facing input port faulty; the
// links listed in broken_i (one bit per tile: its east link) are treated as
// unusable too. The deroute port of every switch is south (north on the
// bottom row). Each switch then gets its bits by a three-way handshake:
// CFG packet, ECHO back (checked against what was sent), same CFG again.
module ft_ctrl_model
  import ft_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [MESH_X*MESH_Y-1:0] broken_i,
  output logic [2:0]           in_valid_o,
  output logic [DN_FLIT_W-1:0] in_flit_o [3],
  input  logic [2:0]           in_stall_i,
  input  logic [2:0]           out_valid_i,
  input  logic [DN_FLIT_W-1:0] out_flit_i [3],
  output logic [2:0]           out_stall_o,
  output int                   diag_rcv_o,
  output int                   echo_ok_o,
  output int                   errors_o,
  output logic [DIAG_W-1:0]    diag_o [MESH_X*MESH_Y]
);
  localparam int NT = MESH_X * MESH_Y;
  localparam int HALF = CFG_W / 2;

  logic [DN_FLIT_W-1:0] q [$];
  lbdr_cfg_t cfg [NT];
  int pos = 0, id = 0;
  dn_type_e ty;
  logic [DN_FLIT_W-1:0] f1;
  bit planned = 0;

  initial begin
    diag_rcv_o = 0; echo_ok_o = 0; errors_o = 0;
  end

  assign out_stall_o = '0;
  always_comb begin
    in_valid_o = {3{q.size() > 0}};
    for (int r = 0; r < 3; r++) in_flit_o[r] = (q.size() > 0) ? q[0] : '0;
  end

  function automatic lbdr_cfg_t plan(input int t);
    lbdr_cfg_t c;
    int x, y;
    x = t % MESH_X;
    y = t / MESH_X;
    c = '0;
    c.my_x = COORD_W'(x);
    c.my_y = COORD_W'(y);
    // own input faulty or neighbour's facing input faulty -> link unusable
    c.cn = y > 0 && !diag_o[t][P_NORTH] && !diag_o[t - MESH_X][P_SOUTH];
    c.cs = y < MESH_Y - 1 && !diag_o[t][P_SOUTH] && !diag_o[t + MESH_X][P_NORTH];
    c.cw = x > 0 && !diag_o[t][P_WEST] && !diag_o[t - 1][P_EAST] && !broken_i[t - 1];
    c.ce = x < MESH_X - 1 && !diag_o[t][P_EAST] && !diag_o[t + 1][P_WEST] && !broken_i[t];
    c.rnn = 1; c.rss = 1; c.ree = 1; c.rww = 1;
    c.ren = 1; c.res = 1; c.rwn = 1; c.rws = 1;
    c.dr = (y < MESH_Y - 1) ? 2'd3 : 2'd0;
    return c;
  endfunction

  task automatic send_cfg(input int t);
    logic [CFG_W-1:0] b;
    b = cfg[t];
    q.push_back(dn_head(DN_CFG, DN_ID_W'(t)));
    q.push_back(DN_FLIT_W'(b[HALF-1:0]));
    q.push_back(DN_FLIT_W'(b[CFG_W-1:HALF]));
  endtask

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (q.size() > 0 && !in_stall_i[0]) void'(q.pop_front());
      if (out_valid_i[0]) begin
        logic [DN_FLIT_W-1:0] f;
        f = out_flit_i[0];
        if (out_flit_i[1] != f || out_flit_i[2] != f) begin
          errors_o++;
          $display("controller: rails disagree");
        end
        if (pos == 0) begin
          ty = dn_type_e'(f[14:13]);
          id = int'(f[12:9]);
        end else if (pos == 1) f1 = f;
        else begin
          if (ty == DN_DIAG) begin
            if (f != ~f1) begin
              errors_o++;
              $display("controller: diagnosis of switch %0d not complemented", id);
            end
            diag_o[id] = f1[DIAG_W-1:0];
            diag_rcv_o++;
          end else if (ty == DN_ECHO) begin
            if ({f[HALF-1:0], f1[HALF-1:0]} != CFG_W'(cfg[id])) begin
              errors_o++;
              $display("controller: echo of switch %0d wrong", id);
            end else begin
              echo_ok_o++;
              send_cfg(id);
            end
          end else begin
            errors_o++;
            $display("controller: unexpected packet type %0d", ty);
          end
        end
        pos = (pos == 2) ? 0 : pos + 1;
      end
      if (!planned && diag_rcv_o == NT) begin
        planned = 1;
        for (int t = 0; t < NT; t++) begin
          cfg[t] = plan(t);
          send_cfg(t);
        end
      end
    end
  end
endmodule
