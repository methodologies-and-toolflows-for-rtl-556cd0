// ts_counter: differential timestamp counter of one clock domain (a subring
// or the main ring).
//
// An N-bit free-running cycle counter, seen as an M-bit period count on top
// of a K-bit in-period count (N = K + M). Every time the K-bit part wraps
// (once per 2^K cycles), eop_o pulses for one cycle; the ring router that
// serves this domain turns the pulse into an end-of-period packet for the
// debugger, which counts periods and rebuilds absolute time from them. The M
// upper bits let the debugger place a trace packet that was overtaken by a
// later end-of-period packet. gate_i is the domain's clock-gating / power-down
// signal and holds the counter at zero, so counting restarts on wake-up.
// N=10, K=8 (so M=2) are the values of the thesis' evaluation.
module ts_counter #(
  parameter int unsigned N = 10,
  parameter int unsigned K = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gate_i,
  output logic [N-1:0] cnt_o,
  output logic         eop_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt_o <= '0;
    else if (gate_i) cnt_o <= '0;
    else             cnt_o <= cnt_o + 1'b1;
  end
  // pulses in the cycle in which the K-bit part shows its last value
  assign eop_o = !gate_i && (&cnt_o[K-1:0]);
endmodule
