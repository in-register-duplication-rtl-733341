// parity_check: parity checking (P_Chk) of one input operand in the first
// cycle of execution, with the recovery decision.
//
// Both half parities are regenerated and compared with the parity bits that
// came with the operand (from the parity register, or bypassed from the
// P_Enc stage). No half comparison is made. Decision:
//   narrow (n0 = 1): lower half good            -> ok (upper half ignored)
//                    lower bad, upper good      -> recover: the upper half is
//                                                  copied into the lower half
//                    both bad                   -> exception
//   regular (n0 = 0): either half bad           -> exception (no recovery)
// fixed_word / fixed_par carry the recovered operand (and the upper parity
// bit as the new lower parity bit) for the replay; they equal the inputs
// when no recovery is needed. Combinational.
module parity_check
  import ird_pkg::*;
(
  input  ird_word_t word,
  input  ird_par_t  par,
  output logic      lo_bad,
  output logic      hi_bad,
  output logic      recover,
  output logic      exception,
  output ird_word_t fixed_word,
  output ird_par_t  fixed_par
);

  ird_par_t regen;

  always_comb begin
    regen     = encode_parity(word);
    lo_bad    = regen.lo != par.lo;
    hi_bad    = regen.hi != par.hi;
    recover   = word.n0 && lo_bad && !hi_bad;
    exception = word.n0 ? (lo_bad && hi_bad) : (lo_bad || hi_bad);

    fixed_word = word;
    fixed_par  = par;
    if (recover) begin
      fixed_word.lo = word.hi;
      fixed_par.lo  = par.hi;
    end
  end

endmodule
