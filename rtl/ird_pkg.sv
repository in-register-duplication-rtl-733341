// ird_pkg: types and constants shared by the in-register-duplication (IRD)
// datapath.
//
// Every integer value travels and is stored as a 66-bit IRD word: two
// narrowness flags n1n0 followed by the upper and the lower 32-bit halves.
// For a narrow value the upper half holds a copy of the lower half, so one
// word carries two copies of the value. Flag encoding (n1n0):
//   00 regular 64-bit value        01 32-bit positive or negative value
//   11 34-bit memory address       10 reserved (handled as regular here)
// A separate pair of even parity bits, one per half, follows each word
// through the parity register and the parity bypass; bit 0 covers the lower
// half and bit 1 the upper half. Flags are not covered by parity.
package ird_pkg;

  localparam int unsigned XLEN  = 64;   // architectural data width
  localparam int unsigned HALF  = 32;   // width of one duplicated copy
  localparam int unsigned WWORD = 66;   // XLEN plus the two flag bits

  // Narrowness flags n1n0.
  typedef enum logic [1:0] {
    NW_REGULAR  = 2'b00,
    NW_32BIT    = 2'b01,
    NW_RESERVED = 2'b10,
    NW_ADDR34   = 2'b11
  } nw_flags_e;

  // Upper half of a 34-bit memory address: bits 63..34 zero, bit 33 (sign)
  // zero, bit 32 one.
  localparam logic [HALF-1:0] ADDR34_UPPER = 32'h0000_0001;

  typedef struct packed {
    logic             n1;
    logic             n0;
    logic [HALF-1:0]  hi;
    logic [HALF-1:0]  lo;
  } ird_word_t;

  // Parity bits of one word: {upper half, lower half}, even parity.
  typedef struct packed {
    logic hi;
    logic lo;
  } ird_par_t;

  // Even parity of one 32-bit half: the bit that makes the count of ones,
  // parity bit included, even.
  function automatic logic even_parity(input logic [HALF-1:0] d);
    return ^d;
  endfunction

  function automatic ird_par_t encode_parity(input ird_word_t w);
    ird_par_t p;
    p.hi = even_parity(w.hi);
    p.lo = even_parity(w.lo);
    return p;
  endfunction

endpackage
