// flit_ecc: error detector ("Det") and on-demand corrector ("Corr") for one
// coded flit of the NACK/GO buffers.
//
// Purely combinational. The word is an extended Hamming code (see ft_pkg):
// the syndrome points at a single flipped bit and the overall parity tells a
// single error (correctable) from a double one (detect only).
//   err     any error seen: the flit must not be trusted (trash / nack)
//   single  exactly one bit flipped; corrected holds the repaired word
//   double  two bits flipped; corrected is not valid
// The thesis asks for detection on every transfer and for a corrector used
// only when a stored flit turns out corrupted; the choice of the code is this
// design's own.
module flit_ecc
  import ft_pkg::*;
(
  input  code_t code_i,
  output logic  err_o,
  output logic  single_o,
  output logic  double_o,
  output code_t corrected_o,
  output flit_t flit_o
);
  logic [HAM_R-1:0] syn;
  logic             par;

  always_comb begin
    syn = ecc_syndrome(code_i);
    par = ^code_i;                        // even overall parity when intact
    err_o    = (syn != '0) || par;
    single_o = par;                       // odd number of flips: assume one
    double_o = (syn != '0) && !par;
    corrected_o = code_i;
    if (par) begin
      if (int'(syn) <= int'(HAM_N)) corrected_o[syn] = ~code_i[syn];
      else                          corrected_o = code_i;
    end
    flit_o = ecc_extract(corrected_o);
  end
endmodule
