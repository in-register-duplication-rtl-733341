// tb_store_check: encodes random store values, injects single-bit errors
// into either half or a parity bit, and checks the store data and the
// ok / recovered / exception outcome of the comparison-first check.
module tb_store_check;
  import ird_pkg::*;

  ird_word_t   word;
  ird_par_t    par;
  logic [63:0] data;
  logic        mismatch, recovered, exception;
  int          checks = 0, failures = 0;

  store_check dut (.word(word), .par(par), .data(data), .mismatch(mismatch),
                   .recovered(recovered), .exception(exception));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic logic [31:0] r = $urandom, h = $urandom | 32'h2;
      logic [63:0] v;
      logic [1:0]  cls;
      automatic int          where = i % 5;      // 0 none, 1 lower data, 2 upper data, 3 lower parity, 4 both halves
      automatic int          b = $urandom_range(0, 31);
      logic        exp_rec, exp_exc, exp_ok_data;
      unique case (i % 3)
        0: begin v = {{32{r[31]}}, r}; cls = 2'b01; end
        1: begin v = {32'h1, r};       cls = 2'b11; end
        default: begin v = {h, r};     cls = 2'b00; end
      endcase
      word = (cls == 2'b00) ? {2'b00, v} : {cls, v[31:0], v[31:0]};
      par  = '{hi: ^word.hi, lo: ^word.lo};
      unique case (where)
        1: word.lo[b] = ~word.lo[b];
        2: word.hi[b] = ~word.hi[b];
        3: par.lo = ~par.lo;
        4: begin word.lo[b] = ~word.lo[b]; word.hi[(b + 5) % 32] = ~word.hi[(b + 5) % 32]; end
        default: ;
      endcase
      if (cls != 2'b00) begin
        exp_rec     = (where == 1);
        exp_exc     = (where == 4);
        exp_ok_data = !exp_exc;           // halves equal (3), upper-only error (2) or recovered (1)
      end else begin
        exp_rec     = 1'b0;
        exp_exc     = (where != 0);
        exp_ok_data = (where == 0) || (where == 3);
      end
      #1;
      checks++;
      if (recovered !== exp_rec || exception !== exp_exc) begin
        failures++;
        $display("FAIL i=%0d cls=%b where=%0d rec=%b exc=%b", i, cls, where, recovered, exception);
      end
      if (exp_ok_data) begin
        checks++;
        if (data !== v) begin
          failures++;
          $display("FAIL data i=%0d cls=%b where=%0d data=%h v=%h", i, cls, where, data, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
