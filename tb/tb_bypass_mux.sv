// tb_bypass_mux: random producer sets (unique destinations) with the source
// register matching one producer or none; checks that the forwarded value
// and its parity are taken from the matching producer, and the register
// file value and stored parity otherwise.
module tb_bypass_mux;
  import ird_pkg::*;
  localparam int NSRC = 6, NREG = 128, AW = 7;

  logic      [AW-1:0]            src;
  ird_word_t                     rf_word, word;
  ird_par_t                      rf_par, par;
  logic      [NSRC-1:0]          byp_valid;
  logic      [NSRC-1:0][AW-1:0]  byp_dst;
  ird_word_t [NSRC-1:0]          byp_word;
  ird_par_t  [NSRC-1:0]          byp_par;
  logic                          from_bypass;
  int checks = 0, failures = 0;

  bypass_mux #(.NSRC(NSRC), .NUM_REGS(NREG)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic int hit = $urandom_range(0, NSRC);   // NSRC = no producer matches
      src     = AW'($urandom);
      rf_word = {2'($urandom), $urandom, $urandom};
      rf_par  = 2'($urandom);
      for (int s = 0; s < NSRC; s++) begin
        byp_valid[s] = 1'($urandom);
        byp_dst[s]   = AW'(src + 1 + s);            // never equal to src
        byp_word[s]  = {2'($urandom), $urandom, $urandom};
        byp_par[s]   = 2'($urandom);
      end
      if (hit < NSRC) begin
        byp_dst[hit] = src;
        // an invalid producer with the same register must be ignored
        if (hit + 1 < NSRC) begin byp_dst[hit + 1] = src; byp_valid[hit + 1] = 1'b0; end
        byp_valid[hit] = 1'($urandom_range(0, 3) != 0);
      end
      #1;
      checks++;
      if (hit < NSRC && byp_valid[hit]) begin
        if (word !== byp_word[hit] || par !== byp_par[hit] || !from_bypass) begin
          failures++;
          $display("FAIL i=%0d expected producer %0d", i, hit);
        end
      end else if (word !== rf_word || par !== rf_par || from_bypass) begin
        failures++;
        $display("FAIL i=%0d expected register file value", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
