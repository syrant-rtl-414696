// tb_resource_allocator: self-checking test of in-order allocation with
// gaps, rollback and gap recycling, on a small configuration (16-entry ROB,
// 8-entry LSQ, 32 physical / 8 architectural registers) so that the
// structures fill up and wrap often.
//
// The testbench acts as the renamer: it keeps an architectural map with a
// checkpoint per branch, a record per in-flight instruction, the free list
// as a position -> register table, and a busy flag per physical register.
// Every cycle it checks the entry numbers, counters, stall and gap-fit
// decisions against that model, that a register handed out (or put in a
// gap) is never busy, and that after a rollback the same registers come
// out again in the same order. Gap registers must be pushed back after
// their branch commits (one per cycle), which the busy flags verify when
// the registers are handed out again.
module tb_resource_allocator;
  localparam int NROB = 16, NLSQ = 8, NPHYS = 32, NARCH = 8;
  localparam int IW = 5, LW = 4, RW = 6, PW = 5;
  logic clk = 0, rst_n = 0;
  logic ready, alloc_valid, alloc_dst, alloc_mem, alloc_ok, gap_applied;
  logic [RW-1:0] alloc_gap_r, rb_nreg, rb_gap_r, cnt_r;
  logic [IW-1:0] alloc_gap_i, rb_ninst, rb_gap_i, cnt_i;
  logic [LW-1:0] alloc_gap_l, rb_nlsq, rb_gap_l, cnt_l, lsq_tail_ptr;
  logic [IW-2:0] alloc_rob, rob_head_idx;
  logic [LW-2:0] alloc_lsq, lsq_head_idx;
  logic [PW-1:0] alloc_phys, commit_free_phys;
  logic rb_valid, rb_gap_applied, commit_valid, commit_mem, commit_free;
  logic commit_ready, rob_empty, recycling;

  resource_allocator #(.NROB(NROB), .NLSQ(NLSQ), .NPHYS(NPHYS), .NARCH(NARCH)) dut (.*);
  always #5 clk = ~clk;

  typedef struct {
    bit br, dst, mem; int phys, prev, arch;
    int gr, gi, gl, grs; int rb, ib, lb;
    int ck [NARCH];
  } rec_t;

  rec_t recs[$];
  int flpos [int];
  int rec_q[$];
  bit busy [NPHYS];
  int map [NARCH];
  int rob_t, rob_h, lsq_t, lsq_h, fl_h, fl_t;
  int checks = 0, failures = 0;
  int n_rb = 0, n_gap = 0, n_drop = 0, n_rec = 0, n_stall = 0, n_com = 0, n_same = 0;
  int seen [int];   // free-list position -> register handed out there

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("%t %s", $time, s);
  endtask

  task automatic idle();
    alloc_valid = 0; alloc_dst = 0; alloc_mem = 0; rb_valid = 0; commit_valid = 0;
    alloc_gap_r = '0; alloc_gap_i = '0; alloc_gap_l = '0;
    rb_nreg = '0; rb_ninst = '0; rb_nlsq = '0; rb_gap_r = '0; rb_gap_i = '0; rb_gap_l = '0;
    commit_mem = 0; commit_free = 0; commit_free_phys = '0;
  endtask

  initial begin
    idle();
    for (int a = 0; a < NARCH; a++) begin map[a] = a; busy[a] = 1; end
    for (int k = 0; k < NPHYS - NARCH; k++) flpos[k] = NARCH + k;
    rob_t = 0; rob_h = 0; lsq_t = 0; lsq_h = 0; fl_h = 0; fl_t = NPHYS - NARCH;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // start-up fill
    for (int k = 0; k < NPHYS; k++) begin
      @(negedge clk);
      if (ready) break;
    end
    checks++;
    if (!ready) fail("free list never became ready");

    for (int c = 0; c < 40000; c++) begin
      bit e_ok, e_gap, e_rbgap, e_cr, do_rb, do_al, do_co;
      int p, nbr;
      @(negedge clk); idle();
      // ---- choose stimulus
      nbr = 0; foreach (recs[k]) if (recs[k].br) nbr++;
      do_rb = (nbr > 0) && ($urandom_range(0, 5) == 0);
      do_co = (recs.size() > 0) && ($urandom_range(0, 9) < 4);
      if (do_rb) begin
        do begin p = $urandom_range(0, recs.size() - 1); end while (!recs[p].br);
        if (do_co && p == 0) do_co = 0;
        rb_valid = 1;
        rb_nreg = RW'(recs[p].rb); rb_ninst = IW'(recs[p].ib); rb_nlsq = LW'(recs[p].lb);
        rb_gap_r = RW'($urandom_range(0, 4)); rb_gap_i = IW'($urandom_range(0, 4));
        rb_gap_l = LW'($urandom_range(0, 2));
      end
      do_al = !do_rb && ($urandom_range(0, 9) < 7);
      if (do_al) begin
        alloc_valid = 1;
        alloc_dst = ($urandom_range(0, 9) < 6);
        alloc_mem = ($urandom_range(0, 9) < 3);
        if ($urandom_range(0, 3) == 0) begin   // a branch, maybe with a gap
          alloc_dst = 0; alloc_mem = 0;
          alloc_gap_r = RW'($urandom_range(0, 3)); alloc_gap_i = IW'($urandom_range(0, 3));
          alloc_gap_l = LW'($urandom_range(0, 2));
        end
      end
      if (do_co) begin
        commit_valid = 1;
        commit_mem = recs[0].mem; commit_free = recs[0].dst;
        commit_free_phys = PW'(recs[0].prev);
      end
      #1;
      // ---- expected combinational outputs
      e_ok = (rob_t - rob_h + 1 <= NROB) && (lsq_t - lsq_h + int'(alloc_mem) <= NLSQ)
             && (int'(alloc_dst) <= fl_t - fl_h);
      e_gap = (rob_t - rob_h + 1 + int'(alloc_gap_i) <= NROB)
              && (lsq_t - lsq_h + int'(alloc_mem) + int'(alloc_gap_l) <= NLSQ)
              && (int'(alloc_dst) + int'(alloc_gap_r) <= fl_t - fl_h);
      e_cr = (recs.size() > 0) && (rec_q.size() == 0 || recs[0].gr == 0);
      checks++;
      if (alloc_ok != e_ok) fail($sformatf("alloc_ok %0d exp %0d", alloc_ok, e_ok));
      checks++;
      if (alloc_valid && gap_applied != e_gap) fail("gap_applied");
      checks++;
      if (int'(alloc_rob) != rob_t % NROB || int'(alloc_lsq) != lsq_t % NLSQ ||
          int'(cnt_i) != rob_t % (2*NROB) || int'(cnt_l) != lsq_t % (2*NLSQ) ||
          int'(cnt_r) != fl_h % (2*NPHYS))
        fail($sformatf("pointers rob %0d/%0d lsq %0d/%0d reg %0d/%0d", alloc_rob, rob_t % NROB,
                       alloc_lsq, lsq_t % NLSQ, cnt_r, fl_h % (2*NPHYS)));
      checks++;
      if (commit_ready != e_cr) fail("commit_ready");
      checks++;
      if (recycling != (rec_q.size() != 0)) fail("recycling");
      if (fl_t - fl_h > 0) begin
        checks++;
        if (int'(alloc_phys) != flpos[fl_h]) fail($sformatf("alloc_phys %0d exp %0d", alloc_phys, flpos[fl_h]));
        if (seen.exists(fl_h)) begin
          if (seen[fl_h] == int'(alloc_phys)) n_same++;
        end
      end
      if (rb_valid) begin
        int used_i, used_l, free_r;
        used_i = recs[p].ib + 1 - rob_h; used_l = recs[p].lb - lsq_h; free_r = fl_t - recs[p].rb;
        e_rbgap = (int'(rb_gap_i) + used_i <= NROB) && (int'(rb_gap_l) + used_l <= NLSQ)
                  && (int'(rb_gap_r) <= free_r);
        checks++;
        if (rb_gap_applied != e_rbgap) fail("rb_gap_applied");
      end
      if (alloc_valid && !e_ok) n_stall++;
      // ---- state update at the edge
      @(posedge clk);
      if (rb_valid) begin
        int gr, gi, gl;
        gr = e_rbgap ? int'(rb_gap_r) : 0; gi = e_rbgap ? int'(rb_gap_i) : 0;
        gl = e_rbgap ? int'(rb_gap_l) : 0;
        // younger records disappear, their registers become free again
        while (recs.size() > p + 1) begin
          rec_t y; y = recs.pop_back();
          if (y.dst) busy[y.phys] = 0;
          for (int k = 0; k < y.gr; k++) busy[flpos[y.grs + k]] = 0;
        end
        for (int k = 0; k < recs[p].gr; k++) busy[flpos[recs[p].grs + k]] = 0;
        for (int a = 0; a < NARCH; a++) map[a] = recs[p].ck[a];
        rob_t = recs[p].ib + 1 + gi; lsq_t = recs[p].lb + gl; fl_h = recs[p].rb + gr;
        recs[p].gr = gr; recs[p].gi = gi; recs[p].gl = gl; recs[p].grs = recs[p].rb;
        for (int k = 0; k < gr; k++) begin
          if (busy[flpos[recs[p].rb + k]]) fail("gap register busy");
          busy[flpos[recs[p].rb + k]] = 1;
        end
        n_rb++; if (gr + gi + gl > 0) n_gap++; if (!e_rbgap) n_drop++;
      end else if (alloc_valid && e_ok) begin
        rec_t r; int gr, gi, gl;
        gr = e_gap ? int'(alloc_gap_r) : 0; gi = e_gap ? int'(alloc_gap_i) : 0;
        gl = e_gap ? int'(alloc_gap_l) : 0;
        r.br = (alloc_gap_r + alloc_gap_i + alloc_gap_l != 0) || (!alloc_dst && !alloc_mem);
        r.dst = alloc_dst; r.mem = alloc_mem;
        r.rb = fl_h; r.ib = rob_t; r.lb = lsq_t;
        for (int a = 0; a < NARCH; a++) r.ck[a] = map[a];
        if (alloc_dst) begin
          r.arch = $urandom_range(0, NARCH - 1);
          r.phys = flpos[fl_h];
          if (busy[r.phys]) fail($sformatf("register %0d handed out while busy", r.phys));
          busy[r.phys] = 1; seen[fl_h] = r.phys;
          r.prev = map[r.arch]; map[r.arch] = r.phys;
        end
        r.gr = gr; r.gi = gi; r.gl = gl; r.grs = fl_h + int'(alloc_dst);
        for (int k = 0; k < gr; k++) begin
          if (busy[flpos[r.grs + k]]) fail("gap register busy");
          busy[flpos[r.grs + k]] = 1;
        end
        rob_t += 1 + gi; lsq_t += int'(alloc_mem) + gl; fl_h += int'(alloc_dst) + gr;
        recs.push_back(r);
        if (!e_gap) n_drop++; else if (gr + gi + gl > 0) n_gap++;
      end
      if (commit_valid && e_cr) begin
        rec_t h; h = recs.pop_front();
        rob_h += 1 + h.gi; lsq_h += int'(h.mem) + h.gl;
        if (h.dst) begin flpos[fl_t] = h.prev; busy[h.prev] = 0; fl_t++; end
        n_com++;
        if (rec_q.size() != 0) begin
          int q; q = rec_q.pop_front(); flpos[fl_t] = flpos[q]; busy[flpos[q]] = 0; fl_t++;
        end
        for (int k = 0; k < h.gr; k++) rec_q.push_back(h.grs + k);
        if (h.gr != 0) n_rec++;
      end else if (rec_q.size() != 0) begin
        int q; q = rec_q.pop_front(); flpos[fl_t] = flpos[q]; busy[flpos[q]] = 0; fl_t++;
      end
    end
    checks++;
    if (n_rb < 100 || n_gap < 100 || n_drop == 0 || n_rec < 50 || n_stall == 0 || n_same < 50) begin
      failures++;
    end
    $display("rollbacks=%0d gaps=%0d dropped=%0d recycled=%0d stalls=%0d commits=%0d same-reg=%0d",
             n_rb, n_gap, n_drop, n_rec, n_stall, n_com, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
