// tb_ird_backend: end-to-end test of the IRD back end at its default size
// (8 ALU lanes, 4 memory lanes, 128 registers).
//
// The testbench plays the renamer and issue logic, the functional units
// and the data cache. Every cycle it offers a group of up to 12 renamed
// instructions (add, sub, xor, load-immediate, address add, store) whose
// sources often depend on the previous group, so the bypass is busy. A
// golden register model, updated when a group is accepted, gives the
// expected result of every instruction; results must appear on the
// writeback bus exactly two cycles after acceptance (one more when the
// instruction sat in a stall cycle), correctly IRD-encoded and with the
// right parity bits.
//
// After a fault-free warm-up, single-event upsets are injected: bit cells
// of the register file, result-bus wires and bypass wires. The testbench
// tracks where each corrupted bit sits and predicts, from the rules of the
// scheme, every recovery (stall + replay), every ERROR exception and every
// store-interface outcome; the DUT must match each prediction in the same
// cycle. Each mechanism is counted and must occur at least once.
module tb_ird_backend;
  import ird_pkg::*;

  localparam int NA = 8, NM = 4, NL = NA + NM, NR = 128, AW = 7;
  localparam int CYCLES = 12000, WARMUP = 300;

  localparam logic [2:0] OP_ADD = 3'd0, OP_SUB = 3'd1, OP_XOR = 3'd2, OP_LDI = 3'd3,
                         OP_LEA = 3'd4, OP_ST = 3'd5;

  logic clk = 1'b0, rst_n = 1'b0;

  logic [NL-1:0]            iss_valid;
  logic [NL-1:0][1:0]       iss_use;
  logic [NL-1:0][AW-1:0]    iss_src1, iss_src2, iss_dst;
  logic [NL-1:0]            iss_we, iss_store;
  logic [NL-1:0][7:0]       iss_op;
  logic                     iss_ready;
  logic [NL-1:0]            fu_valid;
  logic [NL-1:0][7:0]       fu_op;
  logic [NL-1:0][63:0]      fu_op_a, fu_op_b, fu_result;
  logic [NL-1:0]            wb_valid;
  logic [NL-1:0][AW-1:0]    wb_dst;
  ird_word_t [NL-1:0]       wb_data;
  ird_par_t  [NL-1:0]       wb_par;
  logic [NL-1:0]            st_valid, st_recovered, st_exc;
  logic [NL-1:0][63:0]      st_data;
  logic [NL-1:0][1:0]       cmp_err, byp_hit;
  logic [NL-1:0]            rec_event, exc_event;
  logic                     inj_rf_en;
  logic [AW-1:0]            inj_rf_addr;
  logic [6:0]               inj_rf_bit;
  ird_word_t [NL-1:0]       inj_bus_mask, inj_byp_mask;

  ird_backend dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ functional units
  logic [63:0] imm_tab [32];

  function automatic logic [63:0] alu(input logic [7:0] op, input logic [63:0] a, input logic [63:0] b);
    unique case (op[7:5])
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_XOR:  return a ^ b;
      OP_LDI:  return imm_tab[op[4:0]];
      OP_LEA:  return a + {52'h0, b[11:0]};
      default: return a;                    // stores write nothing
    endcase
  endfunction

  always_comb
    for (int l = 0; l < NL; l++) fu_result[l] = alu(fu_op[l], fu_op_a[l], fu_op_b[l]);

  // ------------------------------------------------------------ reference helpers
  // Flags the width detector must give a value, from its signed range.
  function automatic logic [1:0] cls_of(input logic [63:0] v);
    longint sv = longint'(v);
    if (sv >= -64'sh8000_0000 && sv < 64'sh8000_0000) return 2'b01;
    if (sv >= 64'sh1_0000_0000 && sv < 64'sh2_0000_0000) return 2'b11;
    return 2'b00;
  endfunction

  function automatic logic [65:0] enc(input logic [63:0] v);
    logic [1:0] c = cls_of(v);
    return (c == 2'b00) ? {2'b00, v} : {c, v[31:0], v[31:0]};
  endfunction

  // ------------------------------------------------------------ scoreboard state
  typedef struct {
    bit          v;
    bit [1:0]    use_;
    int          src [2];
    int          dst;
    bit          we, st;
    logic [7:0]  op;
    logic [63:0] opv [2];      // golden operand values
    bit   [1:0]  ocls [2];     // flags stored with each operand
    bit          byp [2];      // operand will come from the bypass
    logic [63:0] m [2];        // corruption of a register-file operand
    logic [63:0] res;
    bit          exc;          // exception predicted at acceptance
  } ins_t;

  typedef struct {
    bit          v;
    int          dst;
    logic [63:0] val;
    bit          st;
    logic [63:0] stv;
    bit [1:0]    stcls;
    bit          stdirty;
  } pe_t;

  logic [63:0] golden   [NR];
  bit   [1:0]  scls     [NR];   // flags currently stored in the register file
  logic [63:0] cmask    [NR];   // bits flipped in the stored copy
  bit          pending  [NR];
  int          lock_until [NR];

  ins_t grp [NL], exg [NL];
  pe_t  pe  [NL];
  bit   ex_replay;
  int   cyc, imm_next;
  bit   new_group;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_w_narrow32, n_w_addr34, n_w_regular, n_byp, n_rec_rf, n_rec_byp, n_rec_bus,
      n_upper_ignored, n_exc_regular, n_exc_both, n_exc_with_rec, n_stall, n_store,
      n_st_recovered, n_st_mismatch_ok, n_st_exc, n_cmp_err;

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // ------------------------------------------------------------ group generation
  function automatic logic [63:0] pick_value(input int kind);
    logic [31:0] r = $urandom;
    unique case (kind)
      0: return {33'h0, r[30:0]};
      1: return {33'h1_ffff_ffff, r[30:0]};
      2: return {32'h1, r};
      3: return {$urandom, r};
      default: return 64'(r[7:0]);
    endcase
  endfunction

  task automatic make_group(input bit warm);
    bit taken [NR];
    foreach (taken[i]) taken[i] = 0;
    for (int l = 0; l < NL; l++) begin
      automatic ins_t in = '{default: '0};
      automatic int   d, tries;
      automatic int   kind;
      grp[l] = in;
      if (!warm && $urandom_range(0, 9) < 2) continue;
      // destination: free, not locked, not twice in the group
      d = -1;
      for (tries = 0; tries < 20; tries++) begin
        automatic int c = warm ? ((cyc * NL + l) % NR) : $urandom_range(0, NR - 1);
        if (!pending[c] && lock_until[c] < cyc && !taken[c]) begin d = c; break; end
      end
      kind = $urandom_range(0, 9);
      in.v      = 1'b1;
      in.src[0] = (l > 0 && $urandom_range(0, 1) == 1) ? exg[$urandom_range(0, NL - 1)].dst
                                                       : $urandom_range(0, NR - 1);
      in.src[1] = ($urandom_range(0, 2) == 0) ? exg[$urandom_range(0, NL - 1)].dst
                                              : $urandom_range(0, NR - 1);
      if (l >= NA && kind < 5) begin
        in.st  = 1'b1;
        in.use_ = 2'b11;
        in.op  = {OP_ST, 5'd0};
      end else begin
        if (d < 0) begin grp[l].v = 1'b0; continue; end
        in.we  = 1'b1;
        in.dst = d;
        taken[d] = 1;
        if (warm || kind < 3) begin
          in.op   = {OP_LDI, 5'(imm_next)};
          in.use_ = 2'b01;
          imm_tab[imm_next] = pick_value($urandom_range(0, 4));
          imm_next = (imm_next + 1) % 32;
        end else begin
          in.op   = {($urandom_range(0, 3) == 3) ? OP_LEA : 3'($urandom_range(0, 2)), 5'd0};
          in.use_ = 2'b11;
        end
      end
      grp[l] = in;
    end
  endtask

  task automatic drive_group();
    for (int l = 0; l < NL; l++) begin
      iss_valid[l] = grp[l].v;
      iss_use[l]   = grp[l].use_;
      iss_src1[l]  = AW'(grp[l].src[0]);
      iss_src2[l]  = AW'(grp[l].src[1]);
      iss_dst[l]   = AW'(grp[l].dst);
      iss_we[l]    = grp[l].we;
      iss_store[l] = grp[l].st;
      iss_op[l]    = grp[l].op;
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main loop
  initial begin
    foreach (golden[i]) begin golden[i] = '0; scls[i] = 2'b00; cmask[i] = '0; pending[i] = 0; lock_until[i] = -1; end
    foreach (exg[l]) exg[l] = '{default: '0};
    foreach (pe[l])  pe[l]  = '{default: '0};
    foreach (imm_tab[i]) imm_tab[i] = '0;
    {n_w_narrow32, n_w_addr34, n_w_regular, n_byp, n_rec_rf, n_rec_byp, n_rec_bus,
     n_upper_ignored, n_exc_regular, n_exc_both, n_exc_with_rec, n_stall, n_store,
     n_st_recovered, n_st_mismatch_ok, n_st_exc, n_cmp_err} = '0;
    ex_replay = 0; imm_next = 0; new_group = 1;
    iss_valid = '0; iss_use = '0; iss_src1 = '0; iss_src2 = '0; iss_dst = '0;
    iss_we = '0; iss_store = '0; iss_op = '0;
    inj_rf_en = 0; inj_rf_addr = '0; inj_rf_bit = '0; inj_bus_mask = '0; inj_byp_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (cyc = 0; cyc < CYCLES; cyc++) begin
      automatic bit   inject = (cyc >= WARMUP) && (cyc < CYCLES - 20);
      automatic bit   warm   = (cyc < WARMUP);
      automatic bit   exp_stall = 0;
      automatic bit   lane_exc [NL];
      automatic bit   lane_rec [NL];
      automatic bit   lane_rec_src [NL][3];   // 0 rf cell, 1 bypass wire, 2 result bus
      automatic logic [63:0] bm [NL], ym [NL];
      automatic bit   was_byp [NL][2];
      automatic logic [63:0] eff_m [NL][2];   // corruption of each operand as it reaches EX
      automatic bit   prev_w [NR];

      @(negedge clk);

      // ---- 1. choose this cycle's wire upsets on the PE stage
      for (int p = 0; p < NL; p++) begin
        bm[p] = '0; ym[p] = '0;
        if (inject && $urandom_range(0, 11) == 0) begin
          automatic int b = $urandom_range(0, 63);
          if (pe[p].v) begin
            // only narrow results: a wire upset must stay recoverable
            if (cls_of(pe[p].val) != 2'b00) begin
              if ($urandom_range(0, 1) == 1) bm[p][b] = 1'b1; else ym[p][b] = 1'b1;
            end
          end else if (pe[p].st && !pe[p].stdirty) begin
            bm[p][b] = 1'b1;
          end
        end
        inj_bus_mask[p] = {2'b00, bm[p]};
        inj_byp_mask[p] = {2'b00, ym[p]};
      end

      // ---- 2. offer a group (a new one only after the last was accepted)
      if (new_group) make_group(warm);
      drive_group();
      inj_rf_en = 1'b0;
      #1;

      // ---- 3a. writeback and store checks (state entered at the last edge)
      for (int p = 0; p < NL; p++) begin
        checks++;
        if (wb_valid[p] !== pe[p].v || (pe[p].v && wb_dst[p] !== AW'(pe[p].dst))) begin
          fail($sformatf("lane %0d writeback valid=%b dst=%0d, expected valid=%b dst=%0d",
                         p, wb_valid[p], wb_dst[p], pe[p].v, pe[p].dst));
        end else if (pe[p].v) begin
          automatic logic [65:0] e = enc(pe[p].val);
          checks++;
          if (wb_data[p] !== (e ^ {2'b00, bm[p]}) || wb_par[p] !== {^e[63:32], ^e[31:0]})
            fail($sformatf("lane %0d r%0d data %h par %b, expected %h", p, pe[p].dst,
                           wb_data[p], wb_par[p], e));
          unique case (e[65:64])
            2'b01: n_w_narrow32++;
            2'b11: n_w_addr34++;
            default: n_w_regular++;
          endcase
          // the write (with any bus upset) lands in the register file
          pending[pe[p].dst]    = 0;
          lock_until[pe[p].dst] = cyc + 1;
          cmask[pe[p].dst]      = bm[p];
        end
        checks++;
        if (st_valid[p] !== pe[p].st) begin
          fail($sformatf("lane %0d store valid %b expected %b", p, st_valid[p], pe[p].st));
        end else if (pe[p].st) begin
          automatic bit lo = |bm[p][31:0], hi = |bm[p][63:32];
          automatic bit narrow = (pe[p].stcls != 2'b00);
          automatic bit mis = narrow && (lo || hi);
          automatic bit e_rec = narrow && lo;
          automatic bit e_exc = !narrow && (lo || hi);
          n_store++;
          checks++;
          if (st_recovered[p] !== e_rec || st_exc[p] !== e_exc)
            fail($sformatf("lane %0d store rec=%b exc=%b expected %b %b", p,
                           st_recovered[p], st_exc[p], e_rec, e_exc));
          if (!e_exc) begin
            checks++;
            if (st_data[p] !== pe[p].stv)
              fail($sformatf("lane %0d store data %h expected %h", p, st_data[p], pe[p].stv));
          end
          if (e_rec) n_st_recovered++;
          if (e_exc) n_st_exc++;
          if (mis && !lo) n_st_mismatch_ok++;
        end
      end

      // ---- 3b. execute-stage predictions
      for (int l = 0; l < NL; l++) begin
        lane_exc[l] = 0; lane_rec[l] = 0;
        lane_rec_src[l] = '{0, 0, 0};
        was_byp[l] = '{0, 0};
        eff_m[l] = exg[l].m;
        if (!exg[l].v) continue;
        if (ex_replay) continue;
        for (int k = 0; k < 2; k++) begin
          automatic logic [63:0] m = exg[l].m[k];
          automatic bit narrow = exg[l].ocls[k] != 2'b00;
          automatic bit lo, hi;
          automatic int src_kind = 0;
          if (!exg[l].use_[k]) continue;
          for (int p = 0; p < NL; p++)
            if (pe[p].v && pe[p].dst == exg[l].src[k]) begin
              m = bm[p] ^ ym[p];
              was_byp[l][k] = 1;
              src_kind = (ym[p] != 0) ? 1 : 2;
            end
          lo = |m[31:0];
          hi = |m[63:32];
          // a repaired operand is replayed from its clean upper copy
          eff_m[l][k] = (narrow && lo && !hi) ? 64'h0 : m;
          if (was_byp[l][k] != exg[l].byp[k]) fail("testbench bypass prediction");
          if (narrow ? (lo && hi) : (lo || hi)) lane_exc[l] = 1;
          if (narrow && lo && !hi) begin
            lane_rec[l] = 1;
            lane_rec_src[l][src_kind] = 1;
          end
          if (narrow && hi && !lo) n_upper_ignored++;
          if (narrow && (lo || hi)) n_cmp_err++;
          checks++;
          if (cmp_err[l][k] !== (narrow && (lo || hi)))
            fail($sformatf("lane %0d op %0d cmp_err %b", l, k, cmp_err[l][k]));
          checks++;
          if (byp_hit[l][k] !== was_byp[l][k])
            fail($sformatf("lane %0d op %0d byp_hit %b expected %b", l, k, byp_hit[l][k], was_byp[l][k]));
          if (was_byp[l][k]) n_byp++;
        end
        if (lane_exc[l]) lane_rec[l] = 0;
        if (lane_exc[l] != exg[l].exc) fail($sformatf("testbench exception prediction lane %0d", l));
        if (lane_rec[l]) exp_stall = 1;
      end
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (rec_event[l] !== lane_rec[l] || exc_event[l] !== lane_exc[l])
          fail($sformatf("lane %0d rec=%b exc=%b expected %b %b", l, rec_event[l], exc_event[l],
                         lane_rec[l], lane_exc[l]));
        checks++;
        if (fu_valid[l] !== (exg[l].v && !lane_exc[l] && !exp_stall))
          fail($sformatf("lane %0d fu_valid %b", l, fu_valid[l]));
        if (lane_exc[l]) begin
          if (exg[l].ocls[0] == 2'b00 && exg[l].use_[0] || exg[l].ocls[1] == 2'b00 && exg[l].use_[1])
            n_exc_regular++;
          else
            n_exc_both++;
          if (exp_stall) n_exc_with_rec++;
        end
        if (lane_rec[l]) begin
          if (lane_rec_src[l][0]) n_rec_rf++;
          if (lane_rec_src[l][1]) n_rec_byp++;
          if (lane_rec_src[l][2]) n_rec_bus++;
        end
      end
      checks++;
      if (iss_ready !== !exp_stall) fail($sformatf("iss_ready %b, expected %b", iss_ready, !exp_stall));
      if (exp_stall) n_stall++;

      // ---- 4. results leaving EX enter PE at the edge
      for (int l = 0; l < NL; l++) begin
        pe[l] = '{default: '0};
        if (!exp_stall && exg[l].v && !lane_exc[l]) begin
          if (exg[l].we) begin
            pe[l].v = 1; pe[l].dst = exg[l].dst; pe[l].val = exg[l].res;
          end
          if (exg[l].st) begin
            pe[l].st = 1; pe[l].stv = exg[l].opv[1]; pe[l].stcls = exg[l].ocls[1];
            pe[l].stdirty = (eff_m[l][1] != 0);
          end
        end
      end

      // ---- 5. acceptance of the offered group
      foreach (prev_w[i]) prev_w[i] = 0;
      for (int l = 0; l < NL; l++)
        if (exg[l].v && exg[l].we && !exg[l].exc && !exp_stall) prev_w[exg[l].dst] = 1;
      if (exp_stall) begin
        ex_replay = 1;
        for (int l = 0; l < NL; l++) begin
          if (lane_exc[l]) exg[l].v = 0;
          exg[l].m   = eff_m[l];
          exg[l].byp = '{0, 0};
        end
        new_group = 0;
      end else begin
        // operands are read before any result of the group is recorded
        for (int l = 0; l < NL; l++) begin
          if (!grp[l].v) continue;
          for (int k = 0; k < 2; k++) begin
            automatic int s = grp[l].src[k];
            grp[l].opv[k]  = golden[s];
            grp[l].ocls[k] = scls[s];
            grp[l].byp[k]  = grp[l].use_[k] && prev_w[s];
            grp[l].m[k]    = prev_w[s] ? 64'h0 : cmask[s];
            if (grp[l].use_[k] && !prev_w[s]) begin
              automatic bit nar = scls[s] != 2'b00;
              automatic bit lo = |cmask[s][31:0], hi = |cmask[s][63:32];
              if (nar ? (lo && hi) : (lo || hi)) grp[l].exc = 1;
            end
          end
          grp[l].res = alu(grp[l].op, grp[l].opv[0], grp[l].opv[1]);
        end
        for (int l = 0; l < NL; l++) begin
          if (grp[l].v && grp[l].we && !grp[l].exc) begin
            golden[grp[l].dst]  = grp[l].res;
            scls[grp[l].dst]    = cls_of(grp[l].res);
            cmask[grp[l].dst]   = '0;
            pending[grp[l].dst] = 1;
          end
          if (grp[l].v && grp[l].exc) lock_until[grp[l].dst] = cyc + 4;
          exg[l] = grp[l];
        end
        ex_replay = 0;
        new_group = 1;
      end

      // ---- 6. a register-file bit-cell upset at the coming edge
      if (inject && $urandom_range(0, 3) == 0) begin
        automatic int r = $urandom_range(0, NR - 1);
        automatic int b = $urandom_range(0, 63);
        automatic bit half_clean = (b < 32) ? (cmask[r][31:0] == 0) : (cmask[r][63:32] == 0);
        if (!pending[r] && lock_until[r] < cyc && half_clean &&
            (scls[r] != 2'b00 || $urandom_range(0, 7) == 0)) begin
          inj_rf_en   = 1'b1;
          inj_rf_addr = AW'(r);
          inj_rf_bit  = 7'(b);
          cmask[r][b] = 1'b1;
        end
      end
    end

    // ---- every mechanism must have been exercised
    begin
      automatic string names [17] = '{"narrow32 write", "addr34 write", "regular write", "bypass operand",
        "recovery rf cell", "recovery bypass wire", "recovery result bus", "upper-half error ignored",
        "exception regular", "exception both halves", "exception during stall", "stall cycle",
        "store", "store recovered", "store mismatch ignored", "store exception", "halves mismatch"};
      automatic int counts [17] = '{n_w_narrow32, n_w_addr34, n_w_regular, n_byp, n_rec_rf, n_rec_byp,
        n_rec_bus, n_upper_ignored, n_exc_regular, n_exc_both, n_exc_with_rec, n_stall, n_store,
        n_st_recovered, n_st_mismatch_ok, n_st_exc, n_cmp_err};
      for (int i = 0; i < 17; i++) begin
        $display("  %-26s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
