// operand_restore: turns a 66-bit IRD operand back into the 64-bit value a
// functional unit consumes, and compares the two copies of a narrow value.
//
//   n1n0 = 01 : sign-extend the lower half
//   n1n0 = 11 : lower half with the fixed upper half 0x00000001 of a
//               34-bit memory address
//   n1n0 = 00 or 10 : the 64 bits as stored
// The value is always restored from the lower half only. In parallel the
// upper half is compared with the lower half; for a narrow operand a
// difference raises `mismatch` (the ERR signal of the comparison scheme).
// Combinational. Treating the reserved code 10 as a regular value is this
// design's choice.
module operand_restore
  import ird_pkg::*;
(
  input  ird_word_t       word,
  output logic [XLEN-1:0] value,
  output logic            mismatch
);

  always_comb begin
    unique case ({word.n1, word.n0})
      2'b01:   value = {{HALF{word.lo[HALF-1]}}, word.lo};
      2'b11:   value = {ADDR34_UPPER, word.lo};
      default: value = {word.hi, word.lo};
    endcase
    mismatch = word.n0 && (word.hi != word.lo);
  end

endmodule
