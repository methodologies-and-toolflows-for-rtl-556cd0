// tb_tmr_voter: self-checking test of the bitwise majority voter.
//
// Random words go to all three inputs; then one input at a time is
// corrupted by a random mask, which must be masked out; then every input
// gets an independent random word and each output bit is checked against a
// count of ones among the three inputs.
module tb_tmr_voter;
  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 16;
  logic [W-1:0] a, b, c, y;
  tmr_voter #(.W(W)) dut (.a_i(a), .b_i(b), .c_i(c), .y_o(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, m;
    for (int n = 0; n < 300; n++) begin
      v = W'($urandom);
      m = W'($urandom) | 1;
      a = v; b = v; c = v; #1;
      chk(y == v, "all equal");
      a = v ^ m; #1;
      chk(y == v, "rail a corrupted");
      a = v; b = v ^ m; #1;
      chk(y == v, "rail b corrupted");
      b = v; c = v ^ m; #1;
      chk(y == v, "rail c corrupted");
      a = W'($urandom); b = W'($urandom); c = W'($urandom); #1;
      for (int i = 0; i < W; i++)
        chk(y[i] == ((int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2), "random bit majority");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
