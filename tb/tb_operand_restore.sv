// tb_operand_restore: encodes random values of every class by hand, checks
// that the restored 64-bit value equals the original, and that a flipped
// bit in either half of a narrow value raises the mismatch (but a flip in a
// regular value does not).
module tb_operand_restore;
  import ird_pkg::*;

  ird_word_t   word;
  logic [63:0] value;
  logic        mismatch;
  int          checks = 0, failures = 0;

  operand_restore dut (.word(word), .value(value), .mismatch(mismatch));

  function automatic ird_word_t enc(input logic [63:0] v, input logic [1:0] cls);
    return (cls == 2'b00) ? {2'b00, v} : {cls, v[31:0], v[31:0]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] v;
      automatic logic [31:0] r = $urandom;
      logic [1:0]  cls;
      automatic int          b = $urandom_range(0, 63);
      unique case (i % 3)
        0: begin v = {{32{r[31]}}, r};             cls = 2'b01; end
        1: begin v = {32'h1, r};                   cls = 2'b11; end
        default: begin v = {$urandom | 32'h4, r};  cls = 2'b00; end
      endcase
      word = enc(v, cls);
      #1;
      checks++;
      if (value !== v || mismatch) begin
        failures++;
        $display("FAIL clean v=%h cls=%b got=%h mis=%b", v, cls, value, mismatch);
      end
      word = enc(v, cls);
      word[b] = ~word[b];
      #1;
      checks++;
      if (mismatch !== (cls != 2'b00)) begin
        failures++;
        $display("FAIL flip v=%h cls=%b bit=%0d mis=%b", v, cls, b, mismatch);
      end
      if (b >= 32 && cls != 2'b00) begin
        checks++;
        if (value !== v) begin
          failures++;
          $display("FAIL upper flip changed value v=%h got=%h", v, value);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
