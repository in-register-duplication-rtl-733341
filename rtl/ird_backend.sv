// ird_backend: back end of a superscalar integer datapath protected by
// in-register duplication (IRD) and per-half parity.
//
// Main idea: most integer results fit in 32 bits (or are 34-bit memory
// addresses). Such a narrow result is stored with its lower 32 bits copied
// into its upper 32 bits, so the register file, the result bus and the
// bypass network carry two copies of it at no extra width beyond two flag
// bits. Each half also gets an even parity bit, kept in a separate parity
// register. When an operand's lower half fails parity, the upper copy
// repairs it.
//
// Pipeline (one instruction slot per lane, NUM_LANES = NUM_ALU + NUM_MEM):
//   RR  register read: the 66-bit register file and the 2-bit parity
//       register are read for both sources (write-before-read).
//   EX  execute / bypass / P_Chk: each operand comes from the first-stage
//       bypass (result in PE plus the parity being generated there) or from
//       RR; parity_check tests it while operand_restore hands the 64-bit
//       value to the external functional unit (fu_op_a/fu_op_b, fu_op). The
//       unit returns fu_result in the same cycle; width_detector encodes it.
//   PE  parity encoding / writeback / data cache access: the 66-bit result
//       is written to the register file and, through its own ports, its
//       parity bits to the parity register; it is forwarded to EX. Store
//       data of memory lanes passes store_check on the way to the cache.
//
// Errors found in EX:
//   - narrow operand, lower half bad, upper good: one stall cycle. Every
//     lane's result in EX is dropped, the resolved operands (with the
//     repaired one) are captured in the EX latch, iss_ready is low, and the
//     next cycle replays the EX instructions from the captured operands
//     (rec_event pulses in the stall cycle).
//   - narrow with both halves bad, or regular with any half bad: ERROR
//     exception (exc_event); that lane's result is not written, and it is
//     dropped from a replay. Handling it is left to software.
//
// Interface timing: an instruction on iss_* is accepted at a rising edge
// with iss_ready high; it is in EX one cycle later (fu_valid, fu_op_*),
// its result appears on wb_* and is written at the end of the cycle after
// that. Reset is synchronous, active low.
//
// The encoding, the detection and recovery rules, the parity register and
// the stage placement of P_Enc and P_Chk follow the design description.
// Lane counts come from its 8 integer ALUs and 4 memory ports and the
// register count from its 128-entry integer register file. Single-cycle
// units, all-lane replay, write-before-read register files, the operand
// enables, fu_op tag and the fault-injection inputs (inj_*, tie to zero
// in use) are this design's own choices.
module ird_backend
  import ird_pkg::*;
#(
  parameter int unsigned NUM_ALU   = 8,
  parameter int unsigned NUM_MEM   = 4,
  parameter int unsigned NUM_PREGS = 128,
  parameter int unsigned OP_W      = 8,
  localparam int unsigned NL       = NUM_ALU + NUM_MEM,
  localparam int unsigned AW       = $clog2(NUM_PREGS)
) (
  input  logic                        clk,
  input  logic                        rst_n,

  // issue (renamed instructions)
  input  logic [NL-1:0]               iss_valid,
  input  logic [NL-1:0][1:0]          iss_use,     // bit k: source k+1 is read
  input  logic [NL-1:0][AW-1:0]       iss_src1,
  input  logic [NL-1:0][AW-1:0]       iss_src2,
  input  logic [NL-1:0][AW-1:0]       iss_dst,
  input  logic [NL-1:0]               iss_we,
  input  logic [NL-1:0]               iss_store,   // memory lanes only
  input  logic [NL-1:0][OP_W-1:0]     iss_op,
  output logic                        iss_ready,

  // functional units (one-cycle)
  output logic [NL-1:0]               fu_valid,
  output logic [NL-1:0][OP_W-1:0]     fu_op,
  output logic [NL-1:0][XLEN-1:0]     fu_op_a,
  output logic [NL-1:0][XLEN-1:0]     fu_op_b,
  input  logic [NL-1:0][XLEN-1:0]     fu_result,

  // writeback bus
  output logic [NL-1:0]               wb_valid,
  output logic [NL-1:0][AW-1:0]       wb_dst,
  output ird_word_t [NL-1:0]          wb_data,
  output ird_par_t  [NL-1:0]          wb_par,

  // store data to the data cache
  output logic [NL-1:0]               st_valid,
  output logic [NL-1:0][XLEN-1:0]     st_data,
  output logic [NL-1:0]               st_recovered,
  output logic [NL-1:0]               st_exc,

  // error reporting
  output logic [NL-1:0][1:0]          cmp_err,     // halves differ (narrow operand)
  output logic [NL-1:0][1:0]          byp_hit,     // operand taken from the bypass
  output logic [NL-1:0]               rec_event,
  output logic [NL-1:0]               exc_event,

  // single-event-upset injection
  input  logic                        inj_rf_en,
  input  logic [AW-1:0]               inj_rf_addr,
  input  logic [6:0]                  inj_rf_bit,
  input  ird_word_t [NL-1:0]          inj_bus_mask,
  input  ird_word_t [NL-1:0]          inj_byp_mask
);

  // ---------------------------------------------------------------- RR
  logic      [2*NL-1:0][AW-1:0]  rd_addr;
  ird_word_t [2*NL-1:0]          rd_word;
  ird_par_t  [2*NL-1:0]          rd_par;

  // ---------------------------------------------------------------- EX latch
  logic                          ex_cap;       // operands were captured for a replay
  logic      [NL-1:0]            ex_valid;
  logic      [NL-1:0][1:0]       ex_use;
  logic      [NL-1:0][1:0][AW-1:0] ex_src;
  logic      [NL-1:0][AW-1:0]    ex_dst;
  logic      [NL-1:0]            ex_we;
  logic      [NL-1:0]            ex_store;
  logic      [NL-1:0][OP_W-1:0]  ex_op;
  ird_word_t [NL-1:0][1:0]       ex_word;
  ird_par_t  [NL-1:0][1:0]       ex_par;

  // ---------------------------------------------------------------- PE latch
  logic      [NL-1:0]            pe_valid;
  logic      [NL-1:0][AW-1:0]    pe_dst;
  ird_word_t [NL-1:0]            pe_word;
  logic      [NL-1:0]            pe_st;
  ird_word_t [NL-1:0]            pe_st_word;
  ird_par_t  [NL-1:0]            pe_st_par;

  // PE-stage combinational
  ird_word_t [NL-1:0]            bus_word;     // result bus (to the register file)
  ird_word_t [NL-1:0]            byp_word;     // forwarded copy
  ird_par_t  [NL-1:0]            pe_par;       // P_Enc output

  // EX-stage combinational
  ird_word_t [NL-1:0][1:0]       op_word, fix_word;
  ird_par_t  [NL-1:0][1:0]       op_par,  fix_par;
  logic      [NL-1:0][1:0]       op_rec, op_exc, op_from_byp, op_mis;
  logic      [NL-1:0]            lane_rec, lane_exc;
  ird_word_t [NL-1:0]            res_word;
  logic                          stall;

  // ---------------------------------------------------------------- storage
  for (genvar l = 0; l < NL; l++) begin : g_rd
    assign rd_addr[2*l]   = iss_src1[l];
    assign rd_addr[2*l+1] = iss_src2[l];
  end

  regfile #(
    .NUM_REGS (NUM_PREGS),
    .WIDTH    (WWORD),
    .NRD      (2*NL),
    .NWR      (NL)
  ) u_rf (
    .clk       (clk),
    .rst_n     (rst_n),
    .raddr     (rd_addr),
    .rdata     (rd_word),
    .we        (pe_valid),
    .waddr     (pe_dst),
    .wdata     (bus_word),
    .flip_en   (inj_rf_en),
    .flip_addr (inj_rf_addr),
    .flip_bit  (inj_rf_bit)
  );

  parity_reg #(
    .NUM_REGS (NUM_PREGS),
    .NRD      (2*NL),
    .NWR      (NL)
  ) u_pr (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (rd_addr),
    .rpar  (rd_par),
    .we    (pe_valid),
    .waddr (pe_dst),
    .wpar  (pe_par)
  );

  // ---------------------------------------------------------------- PE stage
  for (genvar l = 0; l < NL; l++) begin : g_pe
    parity_enc u_penc (.word(pe_word[l]), .par(pe_par[l]));

    assign bus_word[l] = pe_word[l] ^ inj_bus_mask[l];
    assign byp_word[l] = bus_word[l] ^ inj_byp_mask[l];

    assign wb_valid[l] = pe_valid[l];
    assign wb_dst[l]   = pe_dst[l];
    assign wb_data[l]  = bus_word[l];
    assign wb_par[l]   = pe_par[l];

    if (l >= NUM_ALU) begin : g_mem
      logic st_mis;
      store_check u_stchk (
        .word      (pe_st_word[l] ^ inj_bus_mask[l]),
        .par       (pe_st_par[l]),
        .data      (st_data[l]),
        .mismatch  (st_mis),
        .recovered (st_recovered[l]),
        .exception (st_exc[l])
      );
      assign st_valid[l] = pe_st[l];
    end else begin : g_alu
      assign st_valid[l]     = 1'b0;
      assign st_data[l]      = '0;
      assign st_recovered[l] = 1'b0;
      assign st_exc[l]       = 1'b0;
    end
  end

  // ---------------------------------------------------------------- EX stage
  for (genvar l = 0; l < NL; l++) begin : g_ex
    for (genvar k = 0; k < 2; k++) begin : g_op
      ird_word_t sel_word;
      ird_par_t  sel_par;
      logic      sel_byp;
      logic      lo_bad, hi_bad;

      bypass_mux #(
        .NSRC     (NL),
        .NUM_REGS (NUM_PREGS)
      ) u_byp (
        .src         (ex_src[l][k]),
        .rf_word     (ex_word[l][k]),
        .rf_par      (ex_par[l][k]),
        .byp_valid   (pe_valid),
        .byp_dst     (pe_dst),
        .byp_word    (byp_word),
        .byp_par     (pe_par),
        .word        (sel_word),
        .par         (sel_par),
        .from_bypass (sel_byp)
      );

      // A replay uses the captured operands, never the bypass.
      assign op_word[l][k]     = ex_cap ? ex_word[l][k] : sel_word;
      assign op_par[l][k]      = ex_cap ? ex_par[l][k]  : sel_par;
      assign op_from_byp[l][k] = !ex_cap && sel_byp && ex_valid[l] && ex_use[l][k];

      parity_check u_pchk (
        .word       (op_word[l][k]),
        .par        (op_par[l][k]),
        .lo_bad     (lo_bad),
        .hi_bad     (hi_bad),
        .recover    (op_rec[l][k]),
        .exception  (op_exc[l][k]),
        .fixed_word (fix_word[l][k]),
        .fixed_par  (fix_par[l][k])
      );
    end

    operand_restore u_rsa (.word(op_word[l][0]), .value(fu_op_a[l]), .mismatch(op_mis[l][0]));
    operand_restore u_rsb (.word(op_word[l][1]), .value(fu_op_b[l]), .mismatch(op_mis[l][1]));

    assign lane_exc[l]  = ex_valid[l] && |(op_exc[l] & ex_use[l]);
    assign lane_rec[l]  = ex_valid[l] && |(op_rec[l] & ex_use[l]) && !lane_exc[l];
    assign cmp_err[l]   = ex_valid[l] ? (op_mis[l] & ex_use[l]) : 2'b00;
    assign byp_hit[l]   = op_from_byp[l];
    assign rec_event[l] = lane_rec[l];
    assign exc_event[l] = lane_exc[l];
    assign fu_valid[l]  = ex_valid[l] && !lane_exc[l] && !stall;
    assign fu_op[l]     = ex_op[l];

    width_detector u_wdet (.result(fu_result[l]), .word(res_word[l]));
  end

  assign stall     = |lane_rec;
  assign iss_ready = !stall;

  // ---------------------------------------------------------------- latches
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_cap   <= 1'b0;
      ex_valid <= '0;
      ex_use   <= '0;
      ex_src   <= '0;
      ex_dst   <= '0;
      ex_we    <= '0;
      ex_store <= '0;
      ex_op    <= '0;
      ex_word  <= '0;
      ex_par   <= '0;
      pe_valid <= '0;
      pe_dst   <= '0;
      pe_word  <= '0;
      pe_st    <= '0;
      pe_st_word <= '0;
      pe_st_par  <= '0;
    end else if (stall) begin
      // Stall cycle: drop all results, keep the EX instructions with their
      // resolved (and repaired) operands for the replay.
      pe_valid <= '0;
      pe_st    <= '0;
      ex_cap   <= 1'b1;
      for (int l = 0; l < NL; l++) begin
        ex_valid[l] <= ex_valid[l] && !lane_exc[l];
        ex_word[l]  <= fix_word[l];
        ex_par[l]   <= fix_par[l];
      end
    end else begin
      for (int l = 0; l < NL; l++) begin
        pe_valid[l]   <= ex_valid[l] && ex_we[l] && !lane_exc[l];
        pe_dst[l]     <= ex_dst[l];
        pe_word[l]    <= res_word[l];
        pe_st[l]      <= ex_valid[l] && ex_store[l] && !lane_exc[l] && (l >= NUM_ALU);
        pe_st_word[l] <= op_word[l][1];
        pe_st_par[l]  <= op_par[l][1];

        ex_valid[l]   <= iss_valid[l];
        ex_use[l]     <= iss_use[l];
        ex_src[l][0]  <= iss_src1[l];
        ex_src[l][1]  <= iss_src2[l];
        ex_dst[l]     <= iss_dst[l];
        ex_we[l]      <= iss_we[l];
        ex_store[l]   <= iss_store[l];
        ex_op[l]      <= iss_op[l];
        ex_word[l][0] <= rd_word[2*l];
        ex_word[l][1] <= rd_word[2*l+1];
        ex_par[l][0]  <= rd_par[2*l];
        ex_par[l][1]  <= rd_par[2*l+1];
      end
      ex_cap <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- rules
  // Renaming gives every in-flight result its own register: two lanes never
  // write the same entry in one cycle.
  for (genvar i = 0; i < NL; i++) begin : g_chk_i
    for (genvar j = i + 1; j < NL; j++) begin : g_chk_j
      a_unique_dst : assert property (@(posedge clk) disable iff (!rst_n)
        !(pe_valid[i] && pe_valid[j] && pe_dst[i] == pe_dst[j]));
    end
  end

  // A stall is followed by the replay of the captured operands.
  a_replay : assert property (@(posedge clk) disable iff (!rst_n) stall |=> ex_cap);

endmodule
