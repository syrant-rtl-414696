// tb_abl_sbl: self-checking test of the ABL/SBL reconvergence detector.
//
// Part 1 replays the example of a misprediction on branch B2 with the ABL
// holding B1..B7 at instruction counts 1, 12, 17, 22, 23, 29, 40: after
// the correction the wrong-path branches B3..B7 are in the SBL, the
// right-path branches B'3..B'5 do not match, and B6 fetched at count 32
// is detected as the reconvergence with an instruction gap of 32-29 = 3
// (B2 corrected to not-taken, so reported as taken minus not-taken = -3).
//
// Part 2 runs random pushes, resolutions, mispredictions and commits on a
// 16-entry list against a queue-based reference model kept here (ABL as
// an ordered queue, SBL as the queue of wrong-path branches, first match
// in order, counter differences with the gaps after the corrected branch
// removed, SBL prediction while the refetched branches follow the SBL).
module tb_abl_sbl;
  localparam int N = 16, PC_W = 64, RW = 12, IW = 11, LW = 10, AW = 4;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_dir, full, sblp_valid, sblp_dir, recv_valid;
  logic [PC_W-1:0] push_pc, recv_pc, res_pc;
  logic [RW-1:0] push_nreg, push_gap_r, res_gap_r, res_nreg;
  logic [IW-1:0] push_ninst, push_gap_i, res_gap_i, res_ninst;
  logic [LW-1:0] push_nlsq, push_gap_l, res_gap_l, res_nlsq;
  logic [AW-1:0] push_idx, res_idx;
  logic signed [RW-1:0] recv_gap_r;
  logic signed [IW-1:0] recv_gap_i;
  logic signed [LW-1:0] recv_gap_l;
  logic res_valid, res_taken, res_mispredict, commit_valid;
  logic [AW:0] count;

  abl_sbl #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_recv = 0, n_sblp = 0, n_mp = 0, n_full = 0;

  typedef struct { longint unsigned pc; int r, i, l; bit dir, comp; int gr, gi, gl; } ent_t;
  ent_t abl[$], sbl[$];
  int head_slot;
  bit mon, mon_dir, follow; int fptr;
  longint unsigned mon_pc; int mwr, mwi, mwl, mcr, mci, mcl;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(int v, int w);  // sign-extend the low w bits
    int m; m = v & ((1 << w) - 1);
    return (m >= (1 << (w - 1))) ? m - (1 << w) : m;
  endfunction

  task automatic idle();
    push_valid = 0; res_valid = 0; res_mispredict = 0; commit_valid = 0;
    res_taken = 0; res_idx = '0;
    push_gap_r = '0; push_gap_i = '0; push_gap_l = '0;
    res_gap_r = '0; res_gap_i = '0; res_gap_l = '0;
  endtask

  task automatic push(longint unsigned pc, int ninst, bit dir);
    @(negedge clk); idle();
    push_valid = 1; push_pc = pc; push_ninst = IW'(ninst); push_nreg = RW'(ninst);
    push_nlsq = LW'(ninst / 2); push_dir = dir;
    #1;
  endtask

  // ---------------- reference model step ---------------------------------
  task automatic model_and_check();
    int m; bit det, fh; bit e_sv, e_sd; int er, ei, el;
    // expected combinational outputs
    m = -1;
    if (mon) foreach (sbl[k]) if (m < 0 && sbl[k].pc == push_pc) m = k;
    det = mon && (m >= 0);
    fh = follow && fptr < sbl.size() && sbl[fptr].pc == push_pc;
    e_sv = 0; e_sd = 0;
    if (det) begin e_sv = sbl[m].comp; e_sd = sbl[m].dir; end
    else if (fh) begin e_sv = sbl[fptr].comp; e_sd = sbl[fptr].dir; end
    checks++;
    if (push_valid && (sblp_valid != e_sv || (e_sv && sblp_dir != e_sd))) begin
      failures++;
      if (failures < 10) $display("%t sblp mismatch got %0d/%0d exp %0d/%0d", $time, sblp_valid, sblp_dir, e_sv, e_sd);
    end
    checks++;
    if (recv_valid != (push_valid && !full && det && !(res_valid && res_mispredict))) begin
      failures++;
      if (failures < 10) $display("%t recv_valid mismatch got %0d", $time, recv_valid);
    end
    if (recv_valid && det) begin
      er = sx(int'(push_nreg) - sbl[m].r - mcr + mwr, RW);
      ei = sx(int'(push_ninst) - sbl[m].i - mci + mwi, IW);
      el = sx(int'(push_nlsq) - sbl[m].l - mcl + mwl, LW);
      if (!mon_dir) begin er = sx(-er, RW); ei = sx(-ei, IW); el = sx(-el, LW); end
      checks++;
      if (recv_pc != mon_pc || int'(recv_gap_r) != er || int'(recv_gap_i) != ei ||
          int'(recv_gap_l) != el) begin
        failures++;
        if (failures < 10) $display("%t gap mismatch got %0d/%0d/%0d exp %0d/%0d/%0d", $time,
                                    recv_gap_r, recv_gap_i, recv_gap_l, er, ei, el);
      end
      n_recv++;
    end
    if (push_valid && sblp_valid) n_sblp++;
    checks++;
    if (count != (AW+1)'(abl.size()) || full != (abl.size() == N) ||
        (push_valid && push_idx != AW'(head_slot + abl.size()))) begin
      failures++;
      if (failures < 10) $display("%t count/idx mismatch %0d vs %0d", $time, count, abl.size());
    end
    if (res_valid) begin
      int p; p = (int'(res_idx) - head_slot) & (N - 1);
      checks++;
      if (res_ninst != IW'(abl[p].i) || res_pc != abl[p].pc) begin
        failures++; if (failures < 10) $display("%t res readback mismatch", $time);
      end
    end
    // state update at the edge: resolution first, then commit (the RTL
    // addresses entries by slot, so the order does not matter there)
    @(posedge clk);
    begin
      int p;
      p = (int'(res_idx) - head_slot) & (N - 1);
      if (res_valid && res_mispredict) begin
        sbl.delete();
        for (int k = p + 1; k < abl.size(); k++) sbl.push_back(abl[k]);
        mon = (sbl.size() != 0); mon_pc = abl[p].pc; mon_dir = res_taken;
        mwr = abl[p].gr; mwi = abl[p].gi; mwl = abl[p].gl;
        mcr = int'(res_gap_r); mci = int'(res_gap_i); mcl = int'(res_gap_l);
        abl[p].dir = res_taken; abl[p].comp = 1;
        abl[p].gr = mcr; abl[p].gi = mci; abl[p].gl = mcl;
        while (abl.size() > p + 1) void'(abl.pop_back());
        follow = 0;
        n_mp++;
      end else begin
        if (res_valid) begin abl[p].dir = res_taken; abl[p].comp = 1; end
        if (push_valid && !full) begin
          ent_t e;
          e.pc = push_pc; e.r = int'(push_nreg); e.i = int'(push_ninst); e.l = int'(push_nlsq);
          e.dir = push_dir; e.comp = 0; e.gr = int'(push_gap_r); e.gi = int'(push_gap_i);
          e.gl = int'(push_gap_l);
          abl.push_back(e);
          if (det) begin mon = 0; follow = 1; fptr = m + 1; end
          else if (follow) begin follow = fh; fptr++; end
        end
        if (push_valid && full) n_full++;
      end
      if (commit_valid && abl.size() > 0) begin
        void'(abl.pop_front()); head_slot = (head_slot + 1) % N;
      end
    end
  endtask

  // ---------------- stimulus ---------------------------------------------
  longint unsigned pcs [6];
  int cr, ci, cl;

  initial begin
    pcs = '{64'h100, 64'h104, 64'h200, 64'h208, 64'h300, 64'h310};
    idle(); push_pc = '0; push_nreg = '0; push_ninst = '0; push_nlsq = '0; push_dir = 0;
    head_slot = 0; mon = 0; follow = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- part 1: the B1..B7 example
    begin
      static int ci_list [7] = '{1, 12, 17, 22, 23, 29, 40};
      static bit dl [7] = '{1, 1, 0, 0, 1, 1, 0};
      for (int k = 0; k < 7; k++) begin
        push(64'h1000 + 64'(k * 16), ci_list[k], dl[k]);
        model_and_check();
      end
      // B2 (slot 1) mispredicted: actually not taken
      @(negedge clk); idle();
      res_valid = 1; res_mispredict = 1; res_idx = 4'd1; res_taken = 0;
      #1; model_and_check();
      #1;
      checks++;
      if (count != 2 || sbl.size() != 5) begin failures++; $display("B2 correction: count=%0d", count); end
      push(64'h5000, 23, 1); model_and_check();
      checks++; if (recv_valid) begin failures++; $display("false reconvergence on B'3"); end
      push(64'h5010, 27, 0); model_and_check();
      push(64'h5020, 28, 0); model_and_check();
      push(64'h1000 + 64'(5 * 16), 32, 1);   // B6 again
      checks++;
      if (!recv_valid || recv_pc != 64'h1010 || recv_gap_i != -11'sd3) begin
        failures++; $display("B6 reconvergence not seen: v=%0d gap=%0d", recv_valid, recv_gap_i);
      end
      model_and_check();
      // drain
      while (abl.size() > 0) begin
        @(negedge clk); idle(); commit_valid = 1; #1; model_and_check();
      end
    end

    // ---- part 2: random
    cr = 0; ci = 0; cl = 0;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk); idle();
      if ($urandom_range(0, 2) != 0) begin
        push_valid = 1; push_pc = pcs[$urandom_range(0, 5)];
        ci += $urandom_range(1, 6); cr += $urandom_range(0, 5); cl += $urandom_range(0, 2);
        push_nreg = RW'(cr); push_ninst = IW'(ci); push_nlsq = LW'(cl);
        push_dir = $urandom_range(0, 1);
        push_gap_r = RW'($urandom_range(0, 2)); push_gap_i = IW'($urandom_range(0, 2));
        push_gap_l = LW'($urandom_range(0, 1));
      end
      if (abl.size() > 0 && $urandom_range(0, 3) == 0) begin
        int p; p = $urandom_range(0, abl.size() - 1);
        res_valid = 1; res_idx = AW'(head_slot + p); res_taken = $urandom_range(0, 1);
        res_mispredict = ($urandom_range(0, 2) == 0);
        res_gap_r = RW'($urandom_range(0, 2)); res_gap_i = IW'($urandom_range(0, 2));
        res_gap_l = LW'($urandom_range(0, 1));
        if (res_mispredict) begin
          // the front end refetches from the branch: counters go back
          ci = abl[p].i + 1; cr = abl[p].r; cl = abl[p].l;
        end
      end
      // commit only branches that are not being resolved now
      if (abl.size() > 1 && $urandom_range(0, 4) == 0) commit_valid = 1;
      #1;
      model_and_check();
    end
    checks++;
    if (n_recv < 20 || n_sblp < 5 || n_mp < 20 || n_full == 0) begin
      failures++;
      $display("coverage: recv=%0d sblp=%0d mp=%0d full=%0d", n_recv, n_sblp, n_mp, n_full);
    end
    $display("recv=%0d sblp=%0d mp=%0d full=%0d", n_recv, n_sblp, n_mp, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
