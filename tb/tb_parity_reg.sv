// tb_parity_reg: random writes and reads of a 32-entry parity register with
// 4 write and 6 read ports, compared with a reference array including
// same-cycle forwarding, after a reset that must clear every entry.
module tb_parity_reg;
  localparam int N = 32, NRD = 6, NWR = 4, AW = 5;

  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0][1:0]    rpar;
  logic [NWR-1:0]         we;
  logic [NWR-1:0][AW-1:0] waddr;
  logic [NWR-1:0][1:0]    wpar;
  logic [1:0]             model [N];
  int checks = 0, failures = 0;

  parity_reg #(.NUM_REGS(N), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; raddr = '0; waddr = '0; wpar = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w]    = (cyc > 8) ? 1'($urandom_range(0, 1)) : 1'b0;
        waddr[w] = AW'((cyc * 7 + w * 8 + $urandom_range(0, 7)) % N);
        wpar[w]  = 2'($urandom);
      end
      for (int r = 0; r < NRD; r++) raddr[r] = AW'($urandom);
      #1;
      for (int r = 0; r < NRD; r++) begin
        automatic logic [1:0] exp = model[raddr[r]];
        for (int w = 0; w < NWR; w++) if (we[w] && waddr[w] == raddr[r]) exp = wpar[w];
        checks++;
        if (rpar[r] !== exp) begin
          failures++;
          $display("FAIL cyc=%0d port=%0d addr=%0d got=%b exp=%b", cyc, r, raddr[r], rpar[r], exp);
        end
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++) if (we[w]) model[waddr[w]] = wpar[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
