// tb_ft_arbiter: self-checking test of the fault-tolerant output arbiter.
//
// Random requests (the same on both routing-logic copies) and random
// transfers with random tail flits drive the arbiter. A reference model,
// written with an integer round-robin pointer, predicts every grant:
// unlocked outputs grant the first requester after the last winner, a
// packet keeps its grant from head to tail, and a tail that is nacked is
// granted again to the same input. Then the two request copies are made to
// differ: the checker must flag a mismatch, drop the grant and hold the
// arbiter state, so the expected grant after the fault clears is unchanged.
module tb_ft_arbiter;
  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req_a, req_b, gnt;
  logic xfer, tail, nack, mismatch;

  ft_arbiter #(.N(N)) dut (.clk, .rst_n, .req_a_i(req_a), .req_b_i(req_b), .xfer_i(xfer),
                           .xfer_tail_i(tail), .nack_i(nack), .gnt_o(gnt), .mismatch_o(mismatch));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int  last = -1, owner = -1;
  bit  locked = 0, tail_pend = 0;
  int  n_grant = 0, n_regrant = 0, n_mis = 0, n_pkts = 0;

  function automatic int expect_gnt(input logic [N-1:0] r, input bit nk);
    if (locked) return owner;
    if (tail_pend && nk) return owner;
    for (int k = 1; k <= N; k++) begin
      int i;
      i = (last < 0) ? (k - 1) : ((last + k) % N);
      if (r[i]) return i;
    end
    return -1;
  endfunction

  initial begin
    int e;
    bit fault;
    logic [N-1:0] g_exp;
    req_a = '0; req_b = '0; xfer = 0; tail = 0; nack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req_a = N'($urandom);
      fault = (t > 2000) && (($urandom % 10) == 0);
      req_b = fault ? (req_a ^ N'(1 << ($urandom % N))) : req_a;
      if (!fault) req_b = req_a;
      nack  = tail_pend && (($urandom % 3) == 0);
      e = expect_gnt(req_a, nack);
      // the two copies only disagree if the fault changes the decision
      fault = fault && (expect_gnt(req_b, nack) != e);
      g_exp = (e < 0) ? '0 : N'(1 << e);
      // a grant may only be used (transferred) when it was given
      #1;
      if (fault) begin
        chk(mismatch && gnt == '0, "copy mismatch flagged, grant withheld");
        n_mis++;
        xfer = 0;
        tail = 0;
      end else begin
        chk(!mismatch, "no mismatch with equal requests");
        chk(gnt == g_exp, $sformatf("t=%0d grant %b expected %b", t, gnt, g_exp));
        xfer = (gnt != '0) && (($urandom % 4) != 0);
        tail = xfer && (($urandom % 3) == 0);
      end
      @(posedge clk);
      if (!fault) begin
        if (!locked && tail_pend && nack) begin
          locked = 1;
          n_regrant++;
        end
        tail_pend = 0;
        if (xfer) begin
          n_grant++;
          last  = e;
          owner = e;
          locked = !tail;
          if (tail) begin
            tail_pend = 1;
            n_pkts++;
          end
        end
      end
    end
    chk(n_regrant > 0, "a nacked tail was granted again");
    chk(n_mis > 0, "mismatches injected");
    chk(n_pkts > 50, "packets completed");
    $display("grants=%0d packets=%0d regrants=%0d mismatches=%0d", n_grant, n_pkts, n_regrant, n_mis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
