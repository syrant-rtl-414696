// Shared body of the syrant_top testbenches (included inside the testbench
// module after the localparams ITER, PHASES, FULL and the DUT instance
// "dut" are declared).
//
// The testbench plays the rest of the processor: fetch, main branch
// predictor, scheduler/execution units, memory and commit. It runs a small
// loop containing a reconvergent if-then-else:
//
//   0x100 R1  <- R1,R2          0x104 BR1 (src R1) taken -> 0x200
//   not-taken path: 0x108 R5<-R3, 0x10c R6<-R4, 0x110 store [R5],R6,
//                   0x114 R7<-R6, 0x118 R8<-R5            (4 regs, 5 insts, 1 LSQ)
//   taken path:     0x200 R5<-R9, 0x204 R6<-R9            (2 regs, 2 insts, 0 LSQ)
//   0x300 R10 <- R1,R2 (control and data independent)
//   0x304 R11 <- R5    (control independent, data dependent)
//   0x308 load R12 <- [R1]       0x30c BR2 (src R10) never taken
//   0x310 R13 <- R10             0x314 BR3 always taken -> 0x100
//
// BR1's outcome is random per iteration, its prediction is random (about
// half mispredicted) and it resolves 20 cycles after rename; BR2 and BR3
// resolve after 3 cycles, so wrong-path copies of them are computed and
// land in the SBL. The store and the load use the same address; the store
// takes longer to execute, so loads execute early and memory-order
// violations occur.
//
// Checks:
//   * commits happen in program order of the correct path (ROB entry of
//     every commit is the one the testbench expects, gaps skipped);
//   * write-backs are accepted exactly when the RS-tag matches the one the
//     ROB entry was last given and the entry is not retired;
//   * an instruction kept at rename (wrong-path result reused) was renamed
//     into an entry holding a squashed copy of the same PC, and for
//     register instructions the value the testbench computes for it on the
//     correct path equals the one its wrong-path copy computed;
//   * every reconvergence measured for BR1 gives the gap (-2, -3, -1)
//     (taken-path need minus not-taken-path need);
//   * every mechanism was observed at least once (counters at the end).
// The run goes through the gap-selection modes Stab+(Conf or Size), On
// Correction Only and no gaps, in that order.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic expect_true(string what, bit c);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- the program -------------------------------------------
  typedef struct {
    bit is_br, load, store, dst_v;
    bit [1:0] src_v;
    int src0, src1, dst;
  } inst_t;

  function automatic inst_t decode(longint pc);
    inst_t i = '{default: 0};
    case (pc)
      'h100: begin i.src_v = 3; i.src0 = 1; i.src1 = 2; i.dst_v = 1; i.dst = 1; end
      'h104: begin i.is_br = 1; i.src_v = 1; i.src0 = 1; end
      'h108: begin i.src_v = 1; i.src0 = 3; i.dst_v = 1; i.dst = 5; end
      'h10c: begin i.src_v = 1; i.src0 = 4; i.dst_v = 1; i.dst = 6; end
      'h110: begin i.store = 1; i.src_v = 3; i.src0 = 5; i.src1 = 6; end
      'h114: begin i.src_v = 1; i.src0 = 6; i.dst_v = 1; i.dst = 7; end
      'h118: begin i.src_v = 1; i.src0 = 5; i.dst_v = 1; i.dst = 8; end
      'h200: begin i.src_v = 1; i.src0 = 9; i.dst_v = 1; i.dst = 5; end
      'h204: begin i.src_v = 1; i.src0 = 9; i.dst_v = 1; i.dst = 6; end
      'h300: begin i.src_v = 3; i.src0 = 1; i.src1 = 2; i.dst_v = 1; i.dst = 10; end
      'h304: begin i.src_v = 1; i.src0 = 5; i.dst_v = 1; i.dst = 11; end
      'h308: begin i.load = 1; i.src_v = 1; i.src0 = 1; i.dst_v = 1; i.dst = 12; end
      'h30c: begin i.is_br = 1; i.src_v = 1; i.src0 = 10; end
      'h310: begin i.src_v = 1; i.src0 = 10; i.dst_v = 1; i.dst = 13; end
      'h314: begin i.is_br = 1; end
      default: ;
    endcase
    return i;
  endfunction

  function automatic longint next_pc(longint pc, bit taken);
    case (pc)
      'h104:   return taken ? 'h200 : 'h108;
      'h118:   return 'h300;
      'h204:   return 'h300;
      'h30c:   return taken ? 'h400 : 'h310;
      'h314:   return taken ? 'h100 : 'h318;
      default: return pc + 4;
    endcase
  endfunction

  function automatic int mix(longint pc, int a, int b);
    return int'(pc) * 1000003 ^ (a * 7919) ^ (b * 104729) ^ (a >>> 3);
  endfunction

  // ---------------- testbench model state ---------------------------------
  typedef struct {
    longint pc;
    int rob, lsq, abl, tag, iter, val, due;
    bit is_br, is_mem, is_store, dir, actual, resolved, exec;
    int regs[16];
    int memv;
  } rec_t;

  rec_t infl[$];                 // correct-path instructions in flight
  int   regs[16];                // speculative register values
  int   memv;                    // speculative value of the shared word
  bit   outcome[1024];
  longint fpc;
  int   iter;

  // per ROB entry
  int tag_tb[NROB_TB];
  bit occ_tb[NROB_TB];
  bit ph_v[NROB_TB];
  longint ph_pc[NROB_TB];
  int ph_val[NROB_TB];
  bit ph_dst[NROB_TB];
  int rob_lsq[NROB_TB];
  bit rob_mem[NROB_TB], rob_st[NROB_TB];
  // per LSQ entry: generation (bumped on every rename that is not kept)
  int lsq_gen[NLSQ_TB];

  typedef struct { int rob, tag, due, lsq, gen; bit mem, st; longint pc; } wb_t;
  wb_t pend[$];

  // event counters
  int n_recv, n_gdec, n_gcorr, n_sbl, n_stab, n_viol, n_rec, n_keep, n_cidd;
  int n_mp, n_stall, n_rej, n_commit, n_drop, n_fwd, n_iter_done;
  int cyc, last_commit;

  function automatic int find_idx(int rob);
    foreach (infl[k]) if (infl[k].rob == rob) return k;
    return -1;
  endfunction

  // ---------------- main loop ---------------------------------------------
  initial begin : main
    rec_t r;
    inst_t ii;
    int phase;
    bit fired, mp_now;
    int bi;

    for (int k = 0; k < 1024; k++) outcome[k] = 1'($urandom);
    for (int k = 0; k < 16; k++) regs[k] = k * 11 + 3;
    memv = 77;
    fpc = 'h100; iter = 0;
    for (int k = 0; k < NROB_TB; k++) begin
      tag_tb[k] = 0; occ_tb[k] = 0; ph_v[k] = 0;
    end
    for (int k = 0; k < NLSQ_TB; k++) lsq_gen[k] = 0;
    {n_recv, n_gdec, n_gcorr, n_sbl, n_stab, n_viol, n_rec, n_keep, n_cidd} = '0;
    {n_mp, n_stall, n_rej, n_commit, n_drop, n_fwd, n_iter_done} = '0;
    cyc = 0; last_commit = 0;
    mode = FILT_STAB_CONF;
    drive_idle();

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (!ready) @(negedge clk);

    phase = 0;
    while (phase < PHASES) begin
      @(negedge clk);
      cyc++;
      drive_idle();
      mode = (phase == 0) ? FILT_STAB_CONF : (phase == 1) ? FILT_ON_CORR : FILT_NONE;

      // -- branch resolution: the oldest due, unresolved branch
      bi = -1;
      foreach (infl[k])
        if (bi < 0 && infl[k].is_br && !infl[k].resolved && infl[k].due <= cyc) bi = k;
      mp_now = 0;
      if (bi >= 0) begin
        br_valid = 1;
        br_abl = BW_TB'(infl[bi].abl);
        br_taken = infl[bi].actual;
        br_mispredict = (infl[bi].actual != infl[bi].dir);
        mp_now = br_mispredict;
      end

      // -- one write-back (and memory access) per cycle
      begin
        int wi; wi = -1;
        foreach (pend[k]) if (wi < 0 && pend[k].due <= cyc) wi = k;
        if (wi >= 0) begin
          wb_valid = 1;
          wb_rob = IW_TB'(pend[wi].rob);
          wb_tag = 8'(pend[wi].tag);
          if (pend[wi].mem && pend[wi].gen == lsq_gen[pend[wi].lsq]) begin
            int li;
            mx_valid = 1;
            mx_lsq = LW_TB'(pend[wi].lsq);
            mx_addr = 64'h1000;
            li = find_idx(pend[wi].rob);
            if (!pend[wi].st && li >= 0) begin
              // forward from the youngest older store if it has executed
              for (int k = li - 1; k >= 0; k--)
                if (infl[k].is_store) begin
                  if (infl[k].exec) begin
                    mx_fwd_v = 1; mx_fwd_idx = LW_TB'(infl[k].lsq); n_fwd++;
                  end
                  break;
                end
            end
            if (pend[wi].st && li >= 0) infl[li].exec = 1;
          end
          pend.delete(wi);
        end
      end

      // -- commit
      com_valid = ($urandom_range(0, 9) != 0);

      // -- rename: present the instruction at the fetch PC
      if ($urandom_range(0, 9) != 0) begin
        ii = decode(fpc);
        in_valid = 1;
        in_pc = 64'(fpc);
        in_is_br = ii.is_br;
        in_pred_taken = (fpc == 'h104) ? 1'($urandom) : (fpc == 'h314);
        in_low_conf = 1'($urandom);
        in_src_v = ii.src_v;
        in_src0 = AW_TB'(ii.src0);
        in_src1 = AW_TB'(ii.src1);
        in_dst_v = ii.dst_v;
        in_dst = AW_TB'(ii.dst);
        in_load = ii.load;
        in_store = ii.store;
      end

      #1;
      // ---------------- observe and update the model --------------------
      if (wb_valid)
        expect_true("write-back accepted iff RS-tag current",
                    wb_accepted == (occ_tb[wb_rob] && tag_tb[wb_rob] == int'(wb_tag)));
      if (wb_valid && !wb_accepted) n_rej++;
      if (ev_recv) begin
        n_recv++;
        if (ev_recv_pc == 64'h104)
          expect_true("BR1 gap measured as (-2,-3,-1)",
                      ev_recv_gap_r == -2 && ev_recv_gap_i == -3 && ev_recv_gap_l == -1);
      end
      if (ev_gap_dec) n_gdec++;
      if (ev_gap_corr) n_gcorr++;
      if (ev_gap_dropped) n_drop++;
      if (ev_stab_dec) n_stab++;
      if (ev_recycle) n_rec++;
      if (ev_viol) begin
        // the load has to execute again
        wb_t w;
        n_viol++;
        w.rob = int'(ev_viol_rob); w.tag = tag_tb[w.rob]; w.due = cyc + 2;
        w.lsq = rob_lsq[w.rob]; w.gen = lsq_gen[w.lsq]; w.mem = 1; w.st = 0;
        w.pc = 0;
        pend.push_back(w);
      end

      fired = in_valid && in_ready;
      if (in_valid && !in_ready && !mp_now) n_stall++;

      if (br_valid) begin
        infl[bi].resolved = 1;
        begin
          wb_t w;
          w.rob = infl[bi].rob; w.tag = infl[bi].tag; w.due = cyc + 1;
          w.lsq = 0; w.gen = 0; w.mem = 0; w.st = 0; w.pc = infl[bi].pc;
          pend.push_back(w);
        end
        if (mp_now) begin
          // squash everything younger; the ROB entries become phantoms
          n_mp++;
          while (infl.size() > bi + 1) begin
            rec_t y;
            y = infl.pop_back();
            ph_v[y.rob] = 1; ph_pc[y.rob] = y.pc; ph_val[y.rob] = y.val;
          end
          infl[bi].dir = infl[bi].actual;
          regs = infl[bi].regs;
          memv = infl[bi].memv;
          iter = infl[bi].iter + ((infl[bi].pc == 'h314 && infl[bi].actual) ? 1 : 0);
          fpc = next_pc(infl[bi].pc, infl[bi].actual);
        end
      end

      if (com_valid && com_ready) begin
        expect_true("commit in program order", infl.size() > 0 && int'(com_rob) == infl[0].rob);
        if (failures < 3 && !(infl.size() > 0 && int'(com_rob) == infl[0].rob)) begin
          $display("  com_rob=%0d expected rob=%0d pc=%h size=%0d", com_rob, infl[0].rob, infl[0].pc, infl.size());
          foreach (infl[k]) if (k < 12) $display("   infl[%0d] pc=%h rob=%0d br=%0d res=%0d", k, infl[k].pc, infl[k].rob, infl[k].is_br, infl[k].resolved);
        end
        if (infl.size() > 0) begin
          occ_tb[infl[0].rob] = 0;
          if (infl[0].pc == 'h314) n_iter_done++;
          void'(infl.pop_front());
        end
        n_commit++;
        last_commit = cyc;
      end

      if (fired) begin
        inst_t d;
        int v;
        d = decode(fpc);
        r = '{default: 0};
        r.pc = fpc; r.rob = int'(out_rob); r.lsq = int'(out_lsq); r.abl = int'(out_abl);
        r.tag = int'(out_tag); r.iter = iter; r.is_br = d.is_br;
        r.is_mem = d.load || d.store; r.is_store = d.store;
        // value computed by this instance
        v = mix(fpc, d.src_v[0] ? regs[d.src0] : 0, d.src_v[1] ? regs[d.src1] : 0);
        if (d.load) v = mix(fpc, regs[d.src0], memv);
        r.val = v;
        if (out_keep) begin
          n_keep++;
          expect_true("kept into a phantom copy of the same PC",
                      ph_v[r.rob] && ph_pc[r.rob] == fpc);
          if (d.dst_v && !d.load)
            expect_true("kept result equals the correct-path value", ph_val[r.rob] == v);
        end
        if (out_ci && !out_keep) n_cidd++;
        if (ev_sbl_used) n_sbl++;
        ph_v[r.rob] = 0;
        tag_tb[r.rob] = r.tag;
        occ_tb[r.rob] = 1;
        rob_lsq[r.rob] = r.lsq; rob_mem[r.rob] = r.is_mem; rob_st[r.rob] = d.store;
        if (r.is_mem && !out_keep) lsq_gen[r.lsq]++;
        if (d.dst_v) regs[d.dst] = v;
        if (d.store) memv = mix(fpc, regs[d.src0], regs[d.src1]);
        if (d.is_br) begin
          r.dir = out_dir;
          r.regs = regs;
          r.memv = memv;
          r.due = cyc + ((fpc == 'h104) ? 20 : 3);
          case (fpc)
            'h104: r.actual = outcome[iter % 1024];
            'h30c: r.actual = 0;
            default: r.actual = 1;
          endcase
        end else if (!out_keep) begin
          wb_t w;
          w.rob = r.rob; w.tag = r.tag; w.lsq = r.lsq; w.gen = lsq_gen[r.lsq];
          w.mem = r.is_mem; w.st = d.store; w.pc = fpc;
          w.due = cyc + (d.store ? 10 : d.load ? 2 : $urandom_range(1, 4));
          pend.push_back(w);
        end
        infl.push_back(r);
        if (d.is_br && fpc == 'h314 && out_dir) iter++;
        fpc = next_pc(fpc, d.is_br ? out_dir : 1'b0);
      end

      if (n_iter_done >= ITER * (phase + 1)) phase++;
      if (cyc - last_commit > 3000) begin
        expect_true("progress (no deadlock)", 0);
        break;
      end
    end

    $display("events: mispredict=%0d recv=%0d gap_dec=%0d gap_corr=%0d dropped=%0d sbl_used=%0d",
             n_mp, n_recv, n_gdec, n_gcorr, n_drop, n_sbl);
    $display("        stab_dec=%0d viol=%0d recycle_cycles=%0d keep=%0d ci_not_kept=%0d",
             n_stab, n_viol, n_rec, n_keep, n_cidd);
    $display("        wb_rejected=%0d stall=%0d forwards=%0d commits=%0d cycles=%0d",
             n_rej, n_stall, n_fwd, n_commit, cyc);
    expect_true("mispredictions happened", n_mp > 0);
    expect_true("reconvergence detected", n_recv > 0);
    expect_true("gap inserted on correction", n_gcorr > 0);
    expect_true("gap inserted at decode", n_gdec > 0);
    expect_true("SBL prediction used", n_sbl > 0);
    expect_true("gap registers recycled", n_rec > 0);
    expect_true("wrong-path results kept", n_keep > 0);
    expect_true("control-independent, data-dependent re-executed", n_cidd > 0);
    expect_true("stale write-back rejected", n_rej > 0);
    expect_true("memory-order violation", n_viol > 0);
    expect_true("store-to-load forwarding", n_fwd > 0);
    if (!FULL) begin
      expect_true("Stabrand32 decrement", n_stab > 0);
      expect_true("allocation stall", n_stall > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_idle();
    in_valid = 0; in_pc = '0; in_is_br = 0; in_pred_taken = 0; in_low_conf = 0;
    in_src_v = '0; in_src0 = '0; in_src1 = '0; in_dst_v = 0; in_dst = '0;
    in_load = 0; in_store = 0;
    br_valid = 0; br_abl = '0; br_taken = 0; br_mispredict = 0;
    wb_valid = 0; wb_rob = '0; wb_tag = '0;
    mx_valid = 0; mx_lsq = '0; mx_addr = '0; mx_fwd_v = 0; mx_fwd_idx = '0;
    com_valid = 0;
  endtask

  initial begin : watchdog
    #(WATCHDOG_NS);
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
