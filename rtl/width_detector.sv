// width_detector: forms the 66-bit IRD word from a 64-bit functional unit
// result ("Width Detector" of the augmented datapath).
//
// The narrow-width detector sets n1n0; flag n0 steers a 2:1 multiplexer on
// the upper half: for a narrow value the lower 32 bits are copied into the
// upper 32 bits (in-register duplication), for a regular value the result
// passes unchanged with n1n0 = 00. Combinational; the output goes straight
// to the pipeline latch in front of the parity-encoding / writeback stage.
module width_detector
  import ird_pkg::*;
(
  input  logic [XLEN-1:0] result,
  output ird_word_t       word
);

  nw_flags_e flags;
  logic      pos32, neg32, addr34;

  nw_detector u_det (
    .value     (result),
    .flags     (flags),
    .is_pos32  (pos32),
    .is_neg32  (neg32),
    .is_addr34 (addr34)
  );

  always_comb begin
    word.n1 = flags[1];
    word.n0 = flags[0];
    word.lo = result[31:0];
    word.hi = flags[0] ? result[31:0] : result[63:32];
  end

endmodule
