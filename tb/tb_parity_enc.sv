// tb_parity_enc: checks both parity bits of random 66-bit words against a
// count of ones per half (even parity: the bit is 1 when the count is odd).
module tb_parity_enc;
  import ird_pkg::*;

  ird_word_t word;
  ird_par_t  par;
  int        checks = 0, failures = 0;

  parity_enc dut (.word(word), .par(par));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int ones_lo, ones_hi;
      word = {2'(i), $urandom, (i < 40) ? (32'h1 << i) : $urandom};
      #1;
      ones_lo = $countones(word.lo);
      ones_hi = $countones(word.hi);
      checks++;
      if (par.lo != (ones_lo % 2 == 1) || par.hi != (ones_hi % 2 == 1)) begin
        failures++;
        $display("FAIL word=%h par=%b", word, par);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
