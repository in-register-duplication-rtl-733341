// bypass_mux: first-stage bypass network for one source operand.
//
// If an instruction in the parity-encoding / writeback stage writes the
// operand's source register, its 66-bit result is forwarded together with
// the parity bits that the P_Enc stage is generating in the same cycle;
// otherwise the value and parity bits read from the register file and the
// parity register are used. The forwarded data may carry its own injected
// wire upset (byp_mask), separate from the result bus. With renaming at
// most one producer matches; the lowest-numbered lane wins otherwise.
// Combinational. `from_bypass` reports which source was taken.
module bypass_mux
  import ird_pkg::*;
#(
  parameter int unsigned NSRC     = 12,
  parameter int unsigned NUM_REGS = 128,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic [AW-1:0]              src,
  input  ird_word_t                  rf_word,
  input  ird_par_t                   rf_par,
  input  logic      [NSRC-1:0]       byp_valid,
  input  logic      [NSRC-1:0][AW-1:0] byp_dst,
  input  ird_word_t [NSRC-1:0]       byp_word,
  input  ird_par_t  [NSRC-1:0]       byp_par,
  output ird_word_t                  word,
  output ird_par_t                   par,
  output logic                       from_bypass
);

  always_comb begin
    word        = rf_word;
    par         = rf_par;
    from_bypass = 1'b0;
    for (int i = NSRC - 1; i >= 0; i--) begin
      if (byp_valid[i] && byp_dst[i] == src) begin
        word        = byp_word[i];
        par         = byp_par[i];
        from_bypass = 1'b1;
      end
    end
  end

endmodule
