// parity_enc: parity encoding (P_Enc) of one IRD word.
//
// Produces one even parity bit for each 32-bit half, for narrow and regular
// values alike: par.lo = XOR of bits 31..0, par.hi = XOR of bits 63..32.
// The flag bits are not covered. Combinational; in the pipeline it takes the
// stage after execution, in parallel with the writeback of the data, and its
// output is written into the parity register and bypassed to the parity
// checkers of the execution stage.
module parity_enc
  import ird_pkg::*;
(
  input  ird_word_t word,
  output ird_par_t  par
);

  always_comb par = encode_parity(word);

endmodule
