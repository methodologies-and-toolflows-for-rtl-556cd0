// tb_flit_ecc: self-checking test of the flit code checker/corrector.
//
// Random flits are encoded, then passed to the checker intact, with one
// flipped bit and with two flipped bits. Expected results follow from what
// was done to the word, not from the checker: an intact word shows no error
// and the original flit; a single flip is flagged as single and corrected
// back to the original word; a double flip is flagged as uncorrectable.
module tb_flit_ecc;
  import ft_pkg::*;

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

  code_t code, corrected;
  logic  err, single, dbl;
  flit_t flit;

  flit_ecc dut (.code_i(code), .err_o(err), .single_o(single), .double_o(dbl),
                .corrected_o(corrected), .flit_o(flit));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    code_t c;
    int b1, b2;
    for (int n = 0; n < 400; n++) begin
      f.head = 1'($urandom);
      f.tail = 1'($urandom);
      f.data = $urandom;
      c = ecc_encode(f);
      chk(^c == 1'b0, "code word has even parity");
      code = c;
      #1;
      chk(!err && !single && !dbl, "intact word shows no error");
      chk(flit == f, "intact word gives the flit back");
      // one flip
      b1 = int'($urandom % CODE_W);
      code = c;
      code[b1] = ~code[b1];
      #1;
      chk(err && single && !dbl, $sformatf("single flip at %0d flagged", b1));
      chk(corrected == c, $sformatf("single flip at %0d corrected", b1));
      chk(flit == f, "single flip: flit recovered");
      // two flips
      b2 = int'($urandom % (CODE_W - 1));
      if (b2 >= b1) b2++;
      code = c;
      code[b1] = ~code[b1];
      code[b2] = ~code[b2];
      #1;
      chk(err && !single && dbl, $sformatf("double flip %0d,%0d flagged", b1, b2));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
