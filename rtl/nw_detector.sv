// nw_detector: narrow-width detector placed between a functional unit's
// output and the pipeline latch.
//
// Three sub-detectors look at bits 63..31 of the 64-bit result:
//   - 32-bit positive value : bits 63..31 all zero
//   - 32-bit negative value : bits 63..31 all one
//   - 34-bit memory address : bits 63..33 zero and bit 32 one
// n1 is the memory-address detector's output; n0 is set whenever any of the
// three fires, so every narrow value has n0 = 1. The three patterns exclude
// one another, so no priority is needed. Purely combinational.
//
// The patterns, the 33 examined bits and the flag meanings follow the
// design description; the address pattern is read as "upper half equals 1",
// which is what a 33-bit magnitude with a zero sign bit above it leaves.
module nw_detector
  import ird_pkg::*;
(
  input  logic [XLEN-1:0] value,
  output nw_flags_e       flags,
  output logic            is_pos32,
  output logic            is_neg32,
  output logic            is_addr34
);

  always_comb begin
    is_pos32  = (value[63:31] == '0);
    is_neg32  = (value[63:31] == '1);
    is_addr34 = (value[63:32] == ADDR34_UPPER);
    flags     = nw_flags_e'({is_addr34, is_pos32 | is_neg32 | is_addr34});
  end

endmodule
