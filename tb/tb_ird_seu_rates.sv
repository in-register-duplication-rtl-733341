// tb_ird_seu_rates: soft-error injection campaign on the IRD back end at
// its default size, with the error model of the scheme's evaluation.
//
// Each cycle one register (0..127) and one data bit (0..63) are chosen
// uniformly and an upset is injected with probability RATE (1e-4, then
// 1e-5, per selected bit per cycle). The upset hits the bypass wire if the
// chosen register's new value is on the result bus and an instruction in
// execute forwards it, the result bus if the value is on the bus but not
// forwarded, and the register-file bit cell otherwise.
//
// The instruction stream is synthetic: the testbench issues random groups
// of add / sub / xor / load-immediate / address-add / store instructions
// whose loaded values follow a narrow-heavy mix (small values, 32-bit
// values, 34-bit addresses, a few full 64-bit values). It reports the
// write-with-duplicate rate (narrow results / all results), the
// read-with-duplicate rate (narrow operands / all operand reads), and for
// the operand reads that carried an error: how many were detected, truly
// recovered, falsely recovered (upper copy also wrong but passing parity)
// or handed to the exception. These are measured on the synthetic stream
// and are not the published benchmark results.
//
// Checks, as in the directed end-to-end test: every recovery and exception
// is predicted from the tracked error bitmap and must occur in the same
// cycle; every result whose inputs were not silently corrupted must equal
// the golden model, on time and correctly encoded.
module tb_ird_seu_rates;
  import ird_pkg::*;

  localparam int NA = 8, NM = 4, NL = NA + NM, NR = 128, AW = 7;
  localparam int NRATES = 2;
  localparam int RATE_DIV [NRATES] = '{10_000, 100_000};   // 1e-4, 1e-5
  localparam int RATE_CYC [NRATES] = '{600_000, 1_200_000};
  localparam int WARMUP = 200;

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
      default: return a;
    endcase
  endfunction

  always_comb
    for (int l = 0; l < NL; l++) fu_result[l] = alu(fu_op[l], fu_op_a[l], fu_op_b[l]);

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

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    bit          v;
    bit [1:0]    use_;
    int          src [2];
    int          dst;
    bit          we, st;
    logic [7:0]  op;
    logic [63:0] opv [2];
    bit   [1:0]  ocls [2];
    bit          otaint [2];
    bit          byp [2];
    logic [63:0] m [2];
    logic [63:0] res;
    bit          exc;
    logic [63:0] prev_val;      // register contents before this write, for an exception
    bit   [1:0]  prev_cls;
    bit          prev_taint;
    logic [63:0] prev_mask;
  } ins_t;

  typedef struct {
    bit          v;
    int          dst;
    logic [63:0] val;
    bit          taint;
    bit          st;
    logic [63:0] stv;
    bit          sttaint;
  } pe_t;

  logic [63:0] golden [NR];
  bit   [1:0]  scls   [NR];
  logic [63:0] cmask  [NR];
  bit          taint  [NR];     // value silently corrupted: not checked
  bit          pending [NR];
  logic [63:0] pflip  [NR];    // cell upsets on a register whose new value is in flight
  int          lock_until [NR];

  ins_t grp [NL], exg [NL];
  pe_t  pe  [NL];
  bit   ex_replay, new_group;
  int   cyc, imm_next, rate_div;

  int checks = 0, failures = 0;

  // statistics of one rate
  longint s_writes, s_wwd, s_reads, s_rwd, s_inj_rf, s_inj_bus, s_inj_byp,
          s_err_reads, s_err_single, s_err_multi, s_err_narrow_lo, s_det_narrow,
          s_true_rec, s_false_rec, s_exc_narrow, s_err_regular, s_det_regular,
          s_undetected, s_upper_only;

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  function automatic logic [63:0] pick_value();
    logic [31:0] r = $urandom;
    int k = $urandom_range(0, 99);
    if (k < 46) return 64'(r[15:0]);                 // small
    if (k < 54) return {{33{r[31]}}, r[30:0]};       // other 32-bit
    if (k < 94) return {32'h1, r};                   // 34-bit address
    return {$urandom | 32'h4, r};                    // full width
  endfunction

  task automatic make_group(input bit warm);
    bit taken [NR];
    foreach (taken[i]) taken[i] = 0;
    for (int l = 0; l < NL; l++) begin
      automatic ins_t in = '{default: '0};
      automatic int   d = -1, kind;
      grp[l] = in;
      if (!warm && $urandom_range(0, 9) < 3) continue;
      for (int tries = 0; tries < 20; tries++) begin
        automatic int c = warm ? ((cyc * NL + l) % NR) : $urandom_range(0, NR - 1);
        if (!pending[c] && lock_until[c] < cyc && !taken[c]) begin d = c; break; end
      end
      kind = $urandom_range(0, 9);
      in.v      = 1'b1;
      in.src[0] = ($urandom_range(0, 1) == 1) ? exg[$urandom_range(0, NL - 1)].dst : $urandom_range(0, NR - 1);
      in.src[1] = ($urandom_range(0, 2) == 0) ? exg[$urandom_range(0, NL - 1)].dst : $urandom_range(0, NR - 1);
      if (l >= NA && kind < 5) begin
        in.st = 1'b1; in.use_ = 2'b11; in.op = {OP_ST, 5'd0};
      end else begin
        if (d < 0) begin grp[l].v = 1'b0; continue; end
        in.we = 1'b1; in.dst = d; taken[d] = 1;
        if (warm || kind < 4) begin
          in.op   = {OP_LDI, 5'(imm_next)};
          in.use_ = 2'b01;
          imm_tab[imm_next] = pick_value();
          imm_next = (imm_next + 1) % 32;
        end else begin
          in.op   = {(kind < 7) ? OP_LEA : 3'($urandom_range(0, 2)), 5'd0};
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

  task automatic clear_stats();
    {s_writes, s_wwd, s_reads, s_rwd, s_inj_rf, s_inj_bus, s_inj_byp, s_err_reads, s_err_single,
     s_err_multi, s_err_narrow_lo, s_det_narrow, s_true_rec, s_false_rec, s_exc_narrow,
     s_err_regular, s_det_regular, s_undetected, s_upper_only} = '0;
  endtask

  function automatic string pct(input longint a, input longint b);
    if (b == 0) return "n/a";
    return $sformatf("%0.1f%%", 100.0 * real'(a) / real'(b));
  endfunction

  task automatic report(input int ri);
    $display("---- upset rate 1/%0d per selected bit per cycle, %0d cycles", RATE_DIV[ri], RATE_CYC[ri]);
    $display("  write-with-duplicate  %s of %0d writes", pct(s_wwd, s_writes), s_writes);
    $display("  read-with-duplicate   %s of %0d operand reads", pct(s_rwd, s_reads), s_reads);
    $display("  upsets injected       %0d (cell %0d, result bus %0d, bypass %0d)",
             s_inj_rf + s_inj_bus + s_inj_byp, s_inj_rf, s_inj_bus, s_inj_byp);
    $display("  erroneous reads       %0d (single-bit %0d, multi-bit %0d)", s_err_reads, s_err_single, s_err_multi);
    $display("  narrow, upper only    %0d (ignored)", s_upper_only);
    $display("  narrow, lower hit     %0d: detected %0d, true recovery %0d, false recovery %0d, exception %0d",
             s_err_narrow_lo, s_det_narrow, s_true_rec, s_false_rec, s_exc_narrow);
    $display("  regular               %0d: detected %0d", s_err_regular, s_det_regular);
    $display("  undetected wrong      %0d", s_undetected);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (RATE_CYC[0] + RATE_CYC[1] + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main loop
  initial begin
    foreach (golden[i]) begin
      golden[i] = '0; scls[i] = 2'b00; cmask[i] = '0; pflip[i] = '0; taint[i] = 0; pending[i] = 0; lock_until[i] = -1;
    end
    foreach (exg[l]) exg[l] = '{default: '0};
    foreach (pe[l])  pe[l]  = '{default: '0};
    foreach (imm_tab[i]) imm_tab[i] = '0;
    clear_stats();
    ex_replay = 0; imm_next = 0; new_group = 1;
    iss_valid = '0; iss_use = '0; iss_src1 = '0; iss_src2 = '0; iss_dst = '0;
    iss_we = '0; iss_store = '0; iss_op = '0;
    inj_rf_en = 0; inj_rf_addr = '0; inj_rf_bit = '0; inj_bus_mask = '0; inj_byp_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;

    for (int ri = 0; ri < NRATES; ri++) begin
      rate_div = RATE_DIV[ri];
      for (int c = 0; c < RATE_CYC[ri]; c++, cyc++) begin
        automatic bit   warm = (cyc < WARMUP);
        automatic bit   exp_stall = 0;
        automatic bit   lane_exc [NL];
        automatic bit   lane_rec [NL];
        automatic bit   lane_taint [NL];
        automatic logic [63:0] bm [NL], ym [NL];
        automatic bit   was_byp [NL][2];
        automatic logic [63:0] eff_m [NL][2];
        automatic bit   prev_w [NR];
        automatic int   rf_r = -1, rf_b = 0;

        @(negedge clk);
        if (c == WARMUP && ri == 0) clear_stats();

        // ---- 1. one uniformly located upset, with the chosen probability
        for (int p = 0; p < NL; p++) begin bm[p] = '0; ym[p] = '0; end
        inj_rf_en = 1'b0;
        if (!warm && $urandom_range(0, rate_div - 1) == 0) begin
          automatic int r = $urandom_range(0, NR - 1);
          automatic int b = $urandom_range(0, 63);
          automatic int on_bus = -1;
          automatic bit fwd = 0;
          for (int p = 0; p < NL; p++) if (pe[p].v && pe[p].dst == r) on_bus = p;
          if (on_bus >= 0 && !ex_replay)
            for (int l = 0; l < NL; l++)
              for (int k = 0; k < 2; k++)
                if (exg[l].v && exg[l].use_[k] && exg[l].src[k] == r) fwd = 1;
          if (on_bus >= 0 && fwd) begin
            ym[on_bus][b] = 1'b1; s_inj_byp++;
          end else if (on_bus >= 0) begin
            bm[on_bus][b] = 1'b1; s_inj_bus++;
          end else begin
            inj_rf_en = 1'b1; inj_rf_addr = AW'(r); inj_rf_bit = 7'(b);
            rf_r = r; rf_b = b; s_inj_rf++;
          end
        end
        for (int p = 0; p < NL; p++) begin
          inj_bus_mask[p] = {2'b00, bm[p]};
          inj_byp_mask[p] = {2'b00, ym[p]};
        end

        // ---- 2. offer a group
        if (new_group) make_group(warm);
        drive_group();
        #1;

        // ---- 3a. writeback and stores
        for (int p = 0; p < NL; p++) begin
          checks++;
          if (wb_valid[p] !== pe[p].v || (pe[p].v && wb_dst[p] !== AW'(pe[p].dst))) begin
            fail($sformatf("lane %0d writeback valid=%b dst=%0d", p, wb_valid[p], wb_dst[p]));
          end else if (pe[p].v) begin
            automatic logic [65:0] e = enc(pe[p].val);
            s_writes++;
            if (wb_data[p].n0) s_wwd++;
            if (!pe[p].taint) begin
              checks++;
              if (wb_data[p] !== (e ^ {2'b00, bm[p]}) || wb_par[p] !== {^e[63:32], ^e[31:0]})
                fail($sformatf("lane %0d r%0d data %h expected %h", p, pe[p].dst, wb_data[p], e));
            end
            pending[pe[p].dst]    = 0;
            lock_until[pe[p].dst] = cyc + 1;
            cmask[pe[p].dst]      = bm[p];
          end
          checks++;
          if (st_valid[p] !== pe[p].st) begin
            fail($sformatf("lane %0d store valid %b", p, st_valid[p]));
          end else if (pe[p].st) begin
            checks++;
            if (st_exc[p] || st_recovered[p]) fail($sformatf("lane %0d unexpected store outcome", p));
            if (!pe[p].sttaint) begin
              checks++;
              if (st_data[p] !== pe[p].stv)
                fail($sformatf("lane %0d store data %h expected %h", p, st_data[p], pe[p].stv));
            end
          end
        end

        // ---- 3b. execute stage
        for (int l = 0; l < NL; l++) begin
          lane_exc[l] = 0; lane_rec[l] = 0; lane_taint[l] = 0;
          was_byp[l] = '{0, 0};
          eff_m[l] = exg[l].m;
          if (!exg[l].v) continue;
          for (int k = 0; k < 2; k++) if (exg[l].use_[k] && exg[l].otaint[k]) lane_taint[l] = 1;
          if (ex_replay) begin
            for (int k = 0; k < 2; k++)
              if (exg[l].use_[k] && (exg[l].ocls[k] != 2'b00 ? (eff_m[l][k][31:0] != 0) : (eff_m[l][k] != 0)))
                lane_taint[l] = 1;
            continue;
          end
          for (int k = 0; k < 2; k++) begin
            automatic logic [63:0] m = exg[l].m[k];
            automatic bit narrow = exg[l].ocls[k] != 2'b00;
            automatic bit lo_bad, hi_bad;
            if (!exg[l].use_[k]) continue;
            for (int p = 0; p < NL; p++)
              if (pe[p].v && pe[p].dst == exg[l].src[k]) begin
                m = bm[p] ^ ym[p];
                was_byp[l][k] = 1;
              end
            lo_bad = ^m[31:0];
            hi_bad = ^m[63:32];
            s_reads++;
            if (narrow) s_rwd++;
            if (m != 0) begin
              s_err_reads++;
              if ($countones(m) == 1) s_err_single++; else s_err_multi++;
            end
            if (narrow) begin
              if (m[31:0] != 0) begin
                s_err_narrow_lo++;
                if (lo_bad) begin
                  s_det_narrow++;
                  if (!hi_bad) begin
                    if (m[63:32] == 0) s_true_rec++; else begin s_false_rec++; lane_taint[l] = 1; end
                  end else s_exc_narrow++;
                end else begin
                  s_undetected++; lane_taint[l] = 1;
                end
              end else if (m != 0) s_upper_only++;
              if (lo_bad && hi_bad) lane_exc[l] = 1;
              if (lo_bad && !hi_bad) lane_rec[l] = 1;
              eff_m[l][k] = (lo_bad && !hi_bad) ? {m[63:32], m[63:32]} : m;
            end else begin
              if (m != 0) begin
                s_err_regular++;
                if (lo_bad || hi_bad) s_det_regular++;
                else begin s_undetected++; lane_taint[l] = 1; end
              end
              if (lo_bad || hi_bad) lane_exc[l] = 1;
            end
            checks++;
            if (byp_hit[l][k] !== was_byp[l][k]) fail($sformatf("lane %0d op %0d byp_hit", l, k));
          end
          if (lane_exc[l]) lane_rec[l] = 0;
          if (exg[l].exc && !lane_exc[l]) fail($sformatf("predicted exception missing, lane %0d", l));
          if (lane_rec[l]) exp_stall = 1;
        end
        for (int l = 0; l < NL; l++) begin
          checks++;
          if (rec_event[l] !== lane_rec[l] || exc_event[l] !== lane_exc[l])
            fail($sformatf("lane %0d rec=%b exc=%b expected %b %b", l, rec_event[l], exc_event[l],
                           lane_rec[l], lane_exc[l]));
          // an exception the acceptance could not foresee (forwarded value): undo its write
          if (lane_exc[l] && !exg[l].exc && exg[l].we) begin
            golden[exg[l].dst]  = exg[l].prev_val;
            scls[exg[l].dst]    = exg[l].prev_cls;
            taint[exg[l].dst]   = exg[l].prev_taint;
            cmask[exg[l].dst]   = exg[l].prev_mask ^ pflip[exg[l].dst];
            pending[exg[l].dst] = 0;
            lock_until[exg[l].dst] = cyc + 1;
          end
        end
        checks++;
        if (iss_ready !== !exp_stall) fail($sformatf("iss_ready %b expected %b", iss_ready, !exp_stall));

        // ---- 4. results into PE
        for (int l = 0; l < NL; l++) begin
          pe[l] = '{default: '0};
          if (!exp_stall && exg[l].v && !lane_exc[l]) begin
            if (exg[l].we) begin
              pe[l].v = 1; pe[l].dst = exg[l].dst; pe[l].val = exg[l].res; pe[l].taint = lane_taint[l];
              if (lane_taint[l]) taint[exg[l].dst] = 1;
            end
            if (exg[l].st) begin
              pe[l].st = 1; pe[l].stv = exg[l].opv[1];
              pe[l].sttaint = lane_taint[l] ||
                              (exg[l].ocls[1] == 2'b00 ? (eff_m[l][1] != 0) : (eff_m[l][1][31:0] != 0));
            end
          end
        end

        // ---- 5. acceptance
        foreach (prev_w[i]) prev_w[i] = 0;
        for (int l = 0; l < NL; l++)
          if (exg[l].v && exg[l].we && !lane_exc[l] && !exp_stall) prev_w[exg[l].dst] = 1;
        if (exp_stall) begin
          ex_replay = 1;
          for (int l = 0; l < NL; l++) begin
            if (lane_exc[l]) exg[l].v = 0;
            exg[l].m   = eff_m[l];
            exg[l].byp = '{0, 0};
          end
          new_group = 0;
        end else begin
          for (int l = 0; l < NL; l++) begin
            if (!grp[l].v) continue;
            for (int k = 0; k < 2; k++) begin
              automatic int s = grp[l].src[k];
              grp[l].opv[k]    = golden[s];
              grp[l].ocls[k]   = scls[s];
              grp[l].otaint[k] = taint[s];
              grp[l].byp[k]    = grp[l].use_[k] && prev_w[s];
              grp[l].m[k]      = prev_w[s] ? 64'h0 : cmask[s];
              if (grp[l].use_[k] && !prev_w[s]) begin
                automatic bit nar = scls[s] != 2'b00;
                automatic bit lo = ^cmask[s][31:0], hi = ^cmask[s][63:32];
                if (nar ? (lo && hi) : (lo || hi)) grp[l].exc = 1;
              end
            end
            grp[l].res = alu(grp[l].op, grp[l].opv[0], grp[l].opv[1]);
          end
          for (int l = 0; l < NL; l++) begin
            if (grp[l].v && grp[l].we) begin
              grp[l].prev_val   = golden[grp[l].dst];
              grp[l].prev_cls   = scls[grp[l].dst];
              grp[l].prev_taint = taint[grp[l].dst];
              grp[l].prev_mask  = cmask[grp[l].dst];
            end
            if (grp[l].v && grp[l].we && !grp[l].exc) begin
              golden[grp[l].dst]  = grp[l].res;
              scls[grp[l].dst]    = cls_of(grp[l].res);
              cmask[grp[l].dst]   = '0;
              taint[grp[l].dst]   = 0;
              pending[grp[l].dst] = 1;
              pflip[grp[l].dst]   = '0;
            end
            if (grp[l].v && grp[l].exc) lock_until[grp[l].dst] = cyc + 4;
            exg[l] = grp[l];
          end
          ex_replay = 0;
          new_group = 1;
        end

        // ---- 6. the cell upset lands at the edge unless a write replaces it
        if (rf_r >= 0 && lock_until[rf_r] != cyc + 1) begin
          if (pending[rf_r]) pflip[rf_r][rf_b] = ~pflip[rf_r][rf_b];
          else               cmask[rf_r][rf_b] = ~cmask[rf_r][rf_b];
        end
      end
      report(ri);
      checks++;
      if (s_inj_rf + s_inj_bus + s_inj_byp == 0) begin
        failures++;
        $display("FAIL no upset injected at this rate");
      end
      clear_stats();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
