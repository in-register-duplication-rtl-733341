// tb_width_detector: checks that narrow results leave the width detector
// with the lower half copied into the upper half and the right flags, and
// that regular results pass unchanged with flags 00. The expected word is
// built from the signed range of the value.
module tb_width_detector;
  import ird_pkg::*;

  logic [63:0] result;
  ird_word_t   word;
  int          checks = 0, failures = 0;

  width_detector dut (.result(result), .word(word));

  task automatic check(input logic [63:0] v);
    longint    sv = longint'(v);
    logic [65:0] exp;
    if (sv >= -64'sh8000_0000 && sv < 64'sh8000_0000) exp = {2'b01, v[31:0], v[31:0]};
    else if (v[63:32] == 32'h1)                        exp = {2'b11, v[31:0], v[31:0]};
    else                                               exp = {2'b00, v};
    result = v;
    #1;
    checks++;
    if (word !== exp) begin
      failures++;
      $display("FAIL result=%h word=%h expected=%h", v, word, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h0); check(64'h7fff_ffff); check(64'h8000_0000);
    check(64'hffff_ffff_8000_0000); check(64'h1_2345_6789); check(64'h2_0000_0000);
    for (int i = 0; i < 2000; i++) begin
      automatic logic [63:0] r = {$urandom, $urandom};
      unique case (i % 4)
        0: check({{33{r[31]}}, r[30:0]});
        1: check({32'h1, r[31:0]});
        2: check(r);
        3: check(r >> r[5:0]);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
