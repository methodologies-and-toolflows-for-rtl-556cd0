// bist_unit: built-in self-test and self-diagnosis of one switch.
//
// A test pattern generator (an 8-bit LFSR, identical in every switch and
// started in the same cycle) drives all output links of the switch during
// the test. Each switch then checks what its neighbours' generators deliver on
// its input links, cycle by cycle, against its own generator: channels (and
// the neighbour's generator) are tested cooperatively, so a faulty generator
// is caught by the neighbours. Phase 1 tests the channels. Phase 2 carries the
// received patterns into this switch's per-input LBDR instances (test_mode_o)
// and compares their answers with a reference LBDR fed by the local
// generator. Any mismatch sets a sticky fault bit for that input port:
//   diag_o[4:0] channel fault per input port, diag_o[9:5] routing fault.
// A port with no neighbour (mesh edge) receives nothing and is reported
// faulty, which is what the configuration needs (the link is unusable).
// done_o rises when both phases are over, after 2*LEN cycles.
// The thesis gives the cooperative scheme and the 10-bit diagnosis outcome;
// generator type, pattern width, test length and the meaning of the second
// five bits are this design's choices.
module bist_unit
  import ft_pkg::*;
#(
  parameter int unsigned LEN = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  output logic [2*COORD_W-1:0] tpg_o,
  output logic                 test_mode_o,    // phase 2: LBDR under test
  output lbdr_cfg_t            test_cfg_o,     // configuration used while testing
  input  logic [2*COORD_W-1:0] resp_i      [PORTS],  // received patterns
  input  logic [PORTS-1:0]     lbdr_resp_i [PORTS],  // LBDR answers in phase 2
  output logic [DIAG_W-1:0]    diag_o,
  output logic                 done_o
);
  typedef enum logic [1:0] {S_IDLE, S_CHAN, S_LBDR, S_DONE} st_e;
  st_e st;
  logic [$clog2(LEN+1)-1:0] cnt;
  logic [2*COORD_W-1:0] lfsr;
  logic [PORTS-1:0] ref_resp;

  // test configuration: every turn and every link allowed, centre coordinates
  always_comb begin
    test_cfg_o = '1;
    test_cfg_o.my_x = COORD_W'(7);
    test_cfg_o.my_y = COORD_W'(7);
    test_cfg_o.dr   = 2'd0;
  end

  lbdr u_ref (.cfg_i(test_cfg_o), .dst_x_i(lfsr[2*COORD_W-1:COORD_W]),
              .dst_y_i(lfsr[COORD_W-1:0]), .out_o(ref_resp));

  assign tpg_o       = (st == S_CHAN || st == S_LBDR) ? lfsr : '0;
  assign test_mode_o = (st == S_LBDR);
  assign done_o      = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      cnt    <= '0;
      lfsr   <= 8'h5B;
      diag_o <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start_i) begin
          st     <= S_CHAN;
          cnt    <= '0;
          diag_o <= '0;
        end
        S_CHAN, S_LBDR: begin
          // x^8 + x^6 + x^5 + x^4 + 1
          lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
          for (int i = 0; i < PORTS; i++) begin
            if (st == S_CHAN && resp_i[i] != lfsr)         diag_o[i] <= 1'b1;
            if (st == S_LBDR && lbdr_resp_i[i] != ref_resp) diag_o[PORTS+i] <= 1'b1;
          end
          if (int'(cnt) == int'(LEN) - 1) begin
            cnt <= '0;
            st  <= (st == S_CHAN) ? S_LBDR : S_DONE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
