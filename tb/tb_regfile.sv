// tb_regfile: random writes on all ports and reads on all ports of a
// 16-entry, 3-write, 4-read register file, compared every cycle with a
// reference array (including same-cycle write-to-read forwarding), plus
// bit-cell upsets and an upset overridden by a write to the same entry.
module tb_regfile;
  localparam int N = 16, W = 66, NRD = 4, NWR = 3, AW = 4;

  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0][W-1:0]  rdata;
  logic [NWR-1:0]         we;
  logic [NWR-1:0][AW-1:0] waddr;
  logic [NWR-1:0][W-1:0]  wdata;
  logic                   flip_en;
  logic [AW-1:0]          flip_addr;
  logic [6:0]             flip_bit;
  logic [W-1:0]           model [N];
  int checks = 0, failures = 0;

  regfile #(.NUM_REGS(N), .WIDTH(W), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; flip_en = 0; raddr = '0; waddr = '0; wdata = '0; flip_addr = '0; flip_bit = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // distinct write addresses
      for (int w = 0; w < NWR; w++) begin
        we[w]    = $urandom_range(0, 1);
        waddr[w] = AW'((cyc * 5 + w * 4 + $urandom_range(0, 3)) % N);
        wdata[w] = {$urandom, $urandom, $urandom};
      end
      flip_en   = ($urandom_range(0, 3) == 0);
      flip_addr = AW'($urandom);
      flip_bit  = 7'($urandom_range(0, W - 1));
      for (int r = 0; r < NRD; r++) raddr[r] = AW'($urandom);
      #1;
      for (int r = 0; r < NRD; r++) begin
        automatic logic [W-1:0] exp = model[raddr[r]];
        for (int w = 0; w < NWR; w++) if (we[w] && waddr[w] == raddr[r]) exp = wdata[w];
        checks++;
        if (rdata[r] !== exp) begin
          failures++;
          $display("FAIL cyc=%0d port=%0d addr=%0d got=%h exp=%h", cyc, r, raddr[r], rdata[r], exp);
        end
      end
      @(posedge clk);
      if (flip_en) model[flip_addr][flip_bit] = ~model[flip_addr][flip_bit];
      for (int w = 0; w < NWR; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
