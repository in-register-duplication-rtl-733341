// tb_parity_check: builds correctly encoded words with correct parity, then
// flips 0, 1 or 2 bits in chosen halves (data or parity bits) and checks
// the decision (ok / recover / exception) and the repaired operand against
// the rules: narrow values are judged on the lower half and repaired from
// the upper one; regular values fail on any bad half.
module tb_parity_check;
  import ird_pkg::*;

  ird_word_t word, fixed_word;
  ird_par_t  par, fixed_par;
  logic      lo_bad, hi_bad, recover, exception;
  int        checks = 0, failures = 0;

  parity_check dut (.word(word), .par(par), .lo_bad(lo_bad), .hi_bad(hi_bad),
                    .recover(recover), .exception(exception),
                    .fixed_word(fixed_word), .fixed_par(fixed_par));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic logic [31:0] lo = $urandom, hi = $urandom;
      automatic logic        narrow = (i % 2 == 0);
      ird_word_t   clean;
      ird_par_t    cpar;
      automatic int          nlo = $urandom_range(0, 2), nhi = $urandom_range(0, 2);
      logic        exp_rec, exp_exc, lb, hb;
      clean = narrow ? {(i % 4 == 0) ? 2'b11 : 2'b01, lo, lo} : {2'b00, hi, lo};
      cpar  = '{hi: ^clean.hi, lo: ^clean.lo};
      word  = clean;
      par   = cpar;
      // nlo / nhi distinct flips in each half (bit 32 of a half = its parity bit)
      for (int k = 0; k < nlo; k++) begin
        automatic int b = k * 17 + (i % 16);
        if (b == 32) par.lo = ~par.lo; else word.lo[b] = ~word.lo[b];
      end
      for (int k = 0; k < nhi; k++) begin
        automatic int b = k * 13 + (i % 20);
        if (b >= 32) par.hi = ~par.hi; else word.hi[b] = ~word.hi[b];
      end
      lb = (nlo == 1);
      hb = (nhi == 1);
      exp_rec = narrow && lb && !hb;
      exp_exc = narrow ? (lb && hb) : (lb || hb);
      #1;
      checks++;
      if (lo_bad !== lb || hi_bad !== hb || recover !== exp_rec || exception !== exp_exc) begin
        failures++;
        $display("FAIL i=%0d narrow=%b nlo=%0d nhi=%0d lb=%b hb=%b rec=%b exc=%b",
                 i, narrow, nlo, nhi, lo_bad, hi_bad, recover, exception);
      end
      if (exp_rec) begin
        checks++;
        if (fixed_word.lo !== word.hi || fixed_word.hi !== word.hi || fixed_par.lo !== par.hi ||
            (nhi == 0 && fixed_word.lo !== clean.lo)) begin
          failures++;
          $display("FAIL repair i=%0d fixed=%h", i, fixed_word);
        end
      end else begin
        checks++;
        if (fixed_word !== word || fixed_par !== par) begin
          failures++;
          $display("FAIL unrepaired operand changed i=%0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
