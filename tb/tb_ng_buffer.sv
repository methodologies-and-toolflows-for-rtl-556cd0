// tb_ng_buffer: self-checking test of the NACK/GO buffer.
//
// A NACK/GO master model feeds a numbered flit stream into the buffer and a
// NACK/GO sink model drains it. Phase 1 runs a clean stream and checks one
// flit per cycle. Phase 2 adds random downstream stalls, random trash from the
// master, bit flips on the incoming link (must be nacked and resent),
// deliberate nacks from the sink (buffer must resend) and single-bit upsets in
// stored slots (must be repaired by the corrector). Every phase checks that
// the sink receives the stream complete, in order and without duplicates.
module tb_ng_buffer;
  import ft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  localparam int NUM = 400;

  logic  in_valid, in_trash, stall_o, nack_o;
  code_t in_code;
  logic  out_valid, out_trash, stall_i, nack_i;
  code_t out_code;
  logic  sent, ev_nack, ev_corr, ev_uncorr;

  ng_buffer #(.DEPTH(3)) dut (
    .clk, .rst_n, .block_i(1'b0),
    .in_valid_i(in_valid), .in_trash_i(in_trash), .in_code_i(in_code),
    .stall_o, .nack_o,
    .out_valid_o(out_valid), .out_trash_o(out_trash), .out_code_o(out_code),
    .stall_i, .nack_i,
    .acc_o(), .sent_o(sent), .ev_nack_o(ev_nack), .ev_corr_o(ev_corr), .ev_uncorr_o(ev_uncorr));

  // knobs
  int p_stall = 0, p_trash = 0, p_link = 0, p_snack = 0;
  int limit = 0;

  // ---------------- master model
  int idx = 0, last_idx = 0;
  logic m_sent = 1'b0;
  logic trash_now, flip_now;
  int   flip_bit;

  function automatic flit_t mk(input int i);
    flit_t f;
    f.head = (i % 4) == 0;
    f.tail = (i % 4) == 3;
    f.data = 32'hA5000000 ^ 32'(i * 2654435761);
    return f;
  endfunction

  always_comb begin
    in_valid = idx < limit;
    in_trash = in_valid && trash_now;
    in_code  = ecc_encode(mk(idx));
    if (flip_now) in_code[flip_bit] = ~in_code[flip_bit];
  end

  logic m_xfer;
  assign m_xfer = in_valid && !in_trash && !stall_o && !(m_sent && nack_o);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (m_sent && nack_o) idx <= last_idx;
      else if (m_xfer) idx <= idx + 1;
      if (m_xfer) last_idx <= idx;
      m_sent <= m_xfer;
    end
  end

  // ---------------- sink model
  logic  s_tent = 1'b0, s_force_bad = 1'b0;
  code_t s_hold;
  logic  s_bad, s_acc;
  int    rcv = 0;
  int    n_link_err = 0, n_snack = 0, n_seu = 0, n_stall_cycles = 0;

  always_comb begin
    s_bad  = s_tent && (s_force_bad || (ecc_syndrome(s_hold) != '0) || (^s_hold));
    nack_i = !(s_tent && !s_bad);
    s_acc  = out_valid && !out_trash && !stall_i && !s_bad;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (s_tent && !s_bad) begin
        flit_t f;
        f = ecc_extract(s_hold);
        chk(f == mk(rcv), $sformatf("flit %0d received out of order or wrong", rcv));
        rcv <= rcv + 1;
      end
      s_tent <= s_acc;
      s_hold <= out_code;
      s_force_bad <= s_acc && (($urandom % 100) < p_snack);
      if (s_acc && (($urandom % 100) < p_snack)) n_snack++;
    end
  end

  always_ff @(negedge clk) begin
    stall_i   <= (($urandom % 100) < p_stall);
    trash_now <= (($urandom % 100) < p_trash);
    flip_now  <= (($urandom % 100) < p_link);
    flip_bit  <= int'($urandom % CODE_W);
    if (stall_i) n_stall_cycles++;
  end

  always_ff @(posedge clk) if (m_xfer && flip_now) n_link_err++;

  // ---------------- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, corr_seen = 0, nack_seen = 0;
  always_ff @(posedge clk) begin
    if (ev_corr) corr_seen++;
    if (ev_nack) nack_seen++;
  end

  initial begin
    stall_i = 1'b0; trash_now = 1'b0; flip_now = 1'b0; flip_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: clean stream, 1 flit per cycle
    @(negedge clk);
    limit = 40;
    t0 = $time / 10;
    wait (rcv == 40);
    t1 = $time / 10;
    chk((t1 - t0) <= 40 + 4, $sformatf("clean stream of 40 flits took %0d cycles", t1 - t0));
    // phase 2: faults and back-pressure
    p_stall = 25; p_trash = 5; p_link = 5; p_snack = 5;
    limit = NUM;
    fork
      begin
        // single-bit upsets in clean stored slots
        while (rcv < NUM - 10) begin
          repeat (37) @(negedge clk);
          for (int k = 0; k < 3; k++) begin
            if (dut.s.count > 0 && ecc_syndrome(dut.mem[k]) == '0 && !(^dut.mem[k]) &&
                int'(k) == int'(dut.snd) && !(dut.s.tent && k == int'(dut.s.wr))) begin
              int b;
              b = int'($urandom % CODE_W);
              dut.mem[k][b] = ~dut.mem[k][b];
              n_seu++;
              break;
            end
          end
        end
      end
      wait (rcv == NUM);
    join
    chk(rcv == NUM, "all flits delivered");
    chk(n_link_err > 0, "link errors were injected");
    chk(nack_seen > 0, "buffer saw nacks and resent");
    chk(n_seu == 0 || corr_seen > 0, "stored upsets were corrected");
    chk(ev_uncorr == 1'b0, "no uncorrectable error left");
    $display("link_err=%0d sink_nacks=%0d seu=%0d corrections=%0d nacks=%0d",
             n_link_err, n_snack, n_seu, corr_seen, nack_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
