// async_fifo: dual-clock FIFO for the trace-NoC bridges.
//
// Write and read pointers count through 2*DEPTH values and cross clock
// domains in Gray code through two-flop synchronizers. To allow a depth that
// is not a power of two, the pointers run over the range
// [2^n - DEPTH, 2^n + DEPTH), n = clog2(DEPTH): the Gray codes of the two ends
// of that range differ in one bit only, so the wrap-around is still a
// single-bit change. Full and empty are found by converting the synchronized
// Gray pointer back to binary. Latency from write to read visibility is about
// three read-clock cycles. Each side has a valid/ready handshake.
// This is a common dual-clock FIFO design, chosen here for the bridges' clock
// crossing, which the thesis requires but does not detail.
module async_fifo #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 10
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         w_valid_i,
  input  logic [W-1:0] w_data_i,
  output logic         w_ready_o,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         r_valid_o,
  output logic [W-1:0] r_data_o,
  input  logic         r_ready_i
);
  localparam int unsigned NB = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PW = NB + 1;
  localparam int unsigned LO = (1 << NB) - DEPTH;
  localparam int unsigned HI = LO + 2 * DEPTH - 1;

  typedef logic [PW-1:0] ptr_t;

  function automatic ptr_t nxt(input ptr_t p);
    return (int'(p) == int'(HI)) ? ptr_t'(LO) : p + 1'b1;
  endfunction
  function automatic ptr_t b2g(input ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t g2b(input ptr_t g);
    ptr_t b;
    b[PW-1] = g[PW-1];
    for (int i = int'(PW) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  function automatic int addr(input ptr_t p);
    int a;
    a = int'(p) - int'(LO);
    return (a >= int'(DEPTH)) ? a - int'(DEPTH) : a;
  endfunction
  function automatic int used(input ptr_t w, input ptr_t r);
    return (int'(w) >= int'(r)) ? int'(w) - int'(r) : int'(w) + 2 * int'(DEPTH) - int'(r);
  endfunction

  logic [W-1:0] mem [DEPTH];
  ptr_t wbin, rbin, wgray, rgray;
  ptr_t rg_w1, rg_w2, wg_r1, wg_r2;   // synchronizers

  // write side
  assign w_ready_o = used(wbin, g2b(rg_w2)) < int'(DEPTH);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= ptr_t'(LO);
      wgray <= b2g(ptr_t'(LO));
      rg_w1 <= b2g(ptr_t'(LO));
      rg_w2 <= b2g(ptr_t'(LO));
    end else begin
      rg_w1 <= rgray;
      rg_w2 <= rg_w1;
      if (w_valid_i && w_ready_o) begin
        wbin  <= nxt(wbin);
        wgray <= b2g(nxt(wbin));
      end
    end
  end
  always_ff @(posedge wclk) if (w_valid_i && w_ready_o) mem[addr(wbin)] <= w_data_i;

  // read side
  assign r_valid_o = g2b(wg_r2) != rbin;
  assign r_data_o  = mem[addr(rbin)];
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= ptr_t'(LO);
      rgray <= b2g(ptr_t'(LO));
      wg_r1 <= b2g(ptr_t'(LO));
      wg_r2 <= b2g(ptr_t'(LO));
    end else begin
      wg_r1 <= wgray;
      wg_r2 <= wg_r1;
      if (r_valid_o && r_ready_i) begin
        rbin  <= nxt(rbin);
        rgray <= b2g(nxt(rbin));
      end
    end
  end
endmodule
