// parity_reg: bit-addressable parity register beside the register file.
//
// Holds the two even parity bits ({upper, lower}) of every register-file
// entry. It has its own NWR write ports, driven by the parity-encoding
// stage, so the register file keeps its original write ports and data
// writeback is not delayed for the parity bits. NRD read ports are read in
// the register-read stage together with the data. Writes at the rising edge
// with write-before-read forwarding like the register file; reset clears it
// (all-zero data has even parity 00, so a cleared entry is consistent).
// The separate structure is the document's; ports and timing are this
// design's choices.
module parity_reg #(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned NRD      = 2,
  parameter int unsigned NWR      = 1,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0][1:0]    rpar,
  input  logic [NWR-1:0]         we,
  input  logic [NWR-1:0][AW-1:0] waddr,
  input  logic [NWR-1:0][1:0]    wpar
);

  logic [NUM_REGS-1:0][1:0] bits;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w]) bits[waddr[w]] <= wpar[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rpar[r] = bits[raddr[r]];
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] == raddr[r]) rpar[r] = wpar[w];
    end
  end

endmodule
