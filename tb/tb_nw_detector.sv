// tb_nw_detector: self-checking test of the narrow-width detector.
// Random values are drawn from each class (32-bit positive, 32-bit negative,
// 34-bit address, regular and values just outside the 32-bit range); the expected flags are
// derived from the signed value range of each class rather than from bit
// patterns: positive 0 .. 2^31-1, negative -2^31 .. -1, address
// 2^32 .. 2^33-1.
module tb_nw_detector;
  import ird_pkg::*;

  logic [63:0] value;
  nw_flags_e   flags;
  logic        p, n, a;
  int          checks = 0, failures = 0;

  nw_detector dut (.value(value), .flags(flags), .is_pos32(p), .is_neg32(n), .is_addr34(a));

  function automatic logic [1:0] ref_flags(input logic [63:0] v);
    longint sv = longint'(v);
    if (sv >= 0 && sv < 64'sh8000_0000)             return 2'b01;
    if (sv < 0 && sv >= -64'sh8000_0000)            return 2'b01;
    if (sv >= 64'sh1_0000_0000 && sv < 64'sh2_0000_0000) return 2'b11;
    return 2'b00;
  endfunction

  task automatic check(input logic [63:0] v);
    value = v;
    #1;
    checks++;
    if (flags != ref_flags(v)) begin
      failures++;
      $display("FAIL value=%h flags=%b expected=%b", v, flags, ref_flags(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] edges [12] = '{64'h0, 64'h7fff_ffff, 64'h8000_0000, 64'hffff_ffff_ffff_ffff,
                               64'hffff_ffff_8000_0000, 64'hffff_ffff_7fff_ffff,
                               64'h1_0000_0000, 64'h1_ffff_ffff, 64'h2_0000_0000,
                               64'h0_ffff_ffff, 64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff};
    foreach (edges[i]) check(edges[i]);
    for (int i = 0; i < 2000; i++) begin
      automatic logic [63:0] r = {$urandom, $urandom};
      unique case (i % 7)
        5: check({32'hffff_ffff, 1'b0, r[30:0]});    // just below -2^31
        6: check({32'h0, 1'b1, r[30:0]});            // just above 2^31-1
        0: check({33'h0, r[30:0]});
        1: check({33'h1_ffff_ffff, r[30:0]});
        2: check({32'h1, r[31:0]});
        3: check(r);
        4: check(r >> (r[5:0]));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
