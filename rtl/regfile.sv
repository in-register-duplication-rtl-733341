// regfile: integer physical register file holding 66-bit IRD words.
//
// NUM_REGS entries of WIDTH bits (64 data bits plus the narrowness flags
// n1n0), NRD combinational read ports and NWR write ports. Writes happen at
// the rising clock edge; a read of an entry that a port writes in the same
// cycle returns the new data (write-before-read), so a value written from
// the writeback stage is seen by the register-read stage of the same cycle
// and only one bypass stage is needed. Renaming guarantees that two write
// ports never target one entry in the same cycle; if they do, the highest
// port wins.
//
// flip_en / flip_addr / flip_bit invert one stored bit at the clock edge to
// model a single-event upset in a bit cell; a write to the same entry in the
// same cycle overrides the upset, as a fresh write clears earlier errors.
// Tie flip_en low outside fault-injection experiments. Reset clears the
// array. Entry count and width follow the design; port counts, the
// write-before-read timing and the injection port are this design's choices.
module regfile #(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned WIDTH    = 66,
  parameter int unsigned NRD      = 2,
  parameter int unsigned NWR      = 1,
  localparam int unsigned AW      = $clog2(NUM_REGS),
  localparam int unsigned BW      = $clog2(WIDTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NRD-1:0][AW-1:0]     raddr,
  output logic [NRD-1:0][WIDTH-1:0]  rdata,
  input  logic [NWR-1:0]             we,
  input  logic [NWR-1:0][AW-1:0]     waddr,
  input  logic [NWR-1:0][WIDTH-1:0]  wdata,
  input  logic                       flip_en,
  input  logic [AW-1:0]              flip_addr,
  input  logic [BW-1:0]              flip_bit
);

  logic [NUM_REGS-1:0][WIDTH-1:0] mem;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) mem[i] <= '0;
    end else begin
      if (flip_en && (32'(flip_bit) < WIDTH) && (32'(flip_addr) < NUM_REGS))
        mem[flip_addr][flip_bit] <= ~mem[flip_addr][flip_bit];
      for (int w = 0; w < NWR; w++)
        if (we[w]) mem[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rdata[r] = mem[raddr[r]];
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
    end
  end

endmodule
