// store_check: protection of store data at the data cache interface.
//
// Unlike the operand checker, this path compares the two halves of a narrow
// value first, so that corrupted data is never written into the cache:
//   narrow, halves equal                 -> ok, value from the lower half
//   narrow, differ, lower parity good    -> ok, value from the lower half
//   narrow, differ, lower bad, upper good-> recovered, value from the upper
//   narrow, both parities bad            -> exception
//   regular, either parity bad           -> exception
// `data` is the restored 64-bit store value (sign-extended or address form
// for narrow values). Combinational; the halves comparison first is the
// document's choice for this interface, the exact order of the parity tests
// after a mismatch follows its description of the comparison strategy.
module store_check
  import ird_pkg::*;
(
  input  ird_word_t       word,
  input  ird_par_t        par,
  output logic [XLEN-1:0] data,
  output logic            mismatch,
  output logic            recovered,
  output logic            exception
);

  ird_par_t  regen;
  ird_word_t use_word;
  logic      lo_bad, hi_bad;

  always_comb begin
    regen    = encode_parity(word);
    lo_bad   = regen.lo != par.lo;
    hi_bad   = regen.hi != par.hi;
    mismatch = word.n0 && (word.hi != word.lo);

    use_word  = word;
    recovered = 1'b0;
    exception = 1'b0;
    if (word.n0) begin
      if (mismatch && lo_bad) begin
        if (!hi_bad) begin
          recovered   = 1'b1;
          use_word.lo = word.hi;
        end else begin
          exception = 1'b1;
        end
      end
    end else begin
      exception = lo_bad || hi_bad;
    end

    unique case ({use_word.n1, use_word.n0})
      2'b01:   data = {{HALF{use_word.lo[HALF-1]}}, use_word.lo};
      2'b11:   data = {ADDR34_UPPER, use_word.lo};
      default: data = {use_word.hi, use_word.lo};
    endcase
  end

endmodule
