// tb_ts_counter: self-checking test of the timestamp counter.
//
// Runs the counter (default N = 10, K = 8) for several periods and checks
// that it counts by one per cycle, wraps at 2^N, raises the end-of-period
// pulse exactly once every 2^K cycles, on the last value of each period,
// and that the gate input (subsystem switched off) holds it at zero with no
// pulses.
module tb_ts_counter;
  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0, rst_n = 1'b0, gate = 1'b0;
  always #5 clk = ~clk;
  localparam int N = 10, K = 8;
  logic [N-1:0] cnt;
  logic eop;

  ts_counter #(.N(N), .K(K)) dut (.clk, .rst_n, .gate_i(gate), .cnt_o(cnt), .eop_o(eop));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, eops, last_eop;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_v = 1; eops = 0; last_eop = -1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk(int'(cnt) == exp_v, $sformatf("count %0d expected %0d", cnt, exp_v));
      chk(eop == ((exp_v % (1 << K)) == (1 << K) - 1), "eop on the last value of a period");
      if (eop) begin
        if (last_eop >= 0) chk(t - last_eop == (1 << K), "eop period is 2^K cycles");
        last_eop = t;
        eops++;
      end
      exp_v = (exp_v + 1) % (1 << N);
    end
    chk(eops == 3000 / (1 << K), $sformatf("eop count %0d", eops));
    // gating
    @(negedge clk) gate = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      chk(cnt == '0 && !eop, "gated counter held at zero, no eop");
    end
    gate = 1'b0;
    @(negedge clk);
    chk(cnt == 1, "counting resumes from zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
