// resource_allocator: ROB, LSQ and physical-register allocation with gaps.
//
// All three out-of-order resources are handed out strictly in order from
// circular structures, so that the same entries come out again when the
// front end is rolled back to a branch and refetches:
//   * the ROB and the LSQ are circular buffers with a tail (allocation)
//     and a head (commit) pointer;
//   * the free physical registers sit in a circular free list: renaming
//     pops at its head, committing pushes the freed register at its tail.
// The three pointers are kept one bit wider than an index, which also
// makes them the running counters ("registers / instructions / LSQ entries
// used so far") that the ABL records for every branch.
//
// A gap is inserted by moving a pointer further than the instruction
// needs: after a branch, the ROB tail, the LSQ tail and the free-list head
// skip gap_i, gap_l and gap_r entries. Gap entries are recycled when the
// branch commits: the ROB and LSQ heads jump over them, and the skipped
// free-list slots are read back and pushed at the free-list tail, one
// register per cycle (commit of a younger branch with a register gap waits
// while a recycle is in progress). The skipped slots are still intact at
// that time because the ring has one slot per physical register.
//
// On a misprediction the pointers return to the values recorded for the
// branch (its ROB entry kept), and the gap chosen for the corrected path
// is inserted. A gap that does not fit in the free space is dropped and the
// *_applied outputs say what was really inserted.
//
// Document: gaps are inserted by moving a pointer and leaving entries free;
// ROB and LSQ gaps are freed by incrementing the head; gap registers are
// returned to the free list when the branch commits; sizes 1024 / 512 /
// 2048. This design's own choices: one instruction renamed and one
// committed per cycle (the evaluated machine is 8-wide), 64 architectural
// registers mapped to P0..P63 at reset, the free list being filled by a
// start-up sequence of PHYS-ARCH cycles (ready low meanwhile), dropping a
// gap that does not fit, and one register recycled per cycle.
//
// Timing: alloc_* outputs are combinational from the current pointers; all
// state changes on the rising clock edge. A rollback has priority over an
// allocation in the same cycle.
module resource_allocator #(
  parameter int unsigned NROB  = syrant_pkg::ROB_ENTRIES,
  parameter int unsigned NLSQ  = syrant_pkg::LSQ_ENTRIES,
  parameter int unsigned NPHYS = syrant_pkg::PHYS_REGS,
  parameter int unsigned NARCH = syrant_pkg::ARCH_REGS,
  localparam int unsigned IW   = $clog2(NROB) + 1,
  localparam int unsigned LW   = $clog2(NLSQ) + 1,
  localparam int unsigned RW   = $clog2(NPHYS) + 1,
  localparam int unsigned PW   = $clog2(NPHYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          ready,        // free list initialised
  // allocation of one instruction, plus an optional gap after it
  input  logic          alloc_valid,
  input  logic          alloc_dst,    // needs a physical register
  input  logic          alloc_mem,    // needs an LSQ entry
  input  logic [RW-1:0] alloc_gap_r,
  input  logic [IW-1:0] alloc_gap_i,
  input  logic [LW-1:0] alloc_gap_l,
  output logic          alloc_ok,     // instruction fits (else stall)
  output logic          gap_applied,  // the requested gap fits
  output logic [IW-2:0] alloc_rob,
  output logic [LW-2:0] alloc_lsq,
  output logic [PW-1:0] alloc_phys,
  output logic [RW-1:0] cnt_r,        // counters before this instruction
  output logic [IW-1:0] cnt_i,
  output logic [LW-1:0] cnt_l,
  // rollback to a mispredicted branch and gap on the corrected path
  input  logic          rb_valid,
  input  logic [RW-1:0] rb_nreg,
  input  logic [IW-1:0] rb_ninst,
  input  logic [LW-1:0] rb_nlsq,
  input  logic [RW-1:0] rb_gap_r,
  input  logic [IW-1:0] rb_gap_i,
  input  logic [LW-1:0] rb_gap_l,
  output logic          rb_gap_applied,
  // in-order commit of the ROB head
  input  logic          commit_valid,
  input  logic          commit_mem,       // it owns an LSQ entry
  input  logic          commit_free,      // it frees an old register
  input  logic [PW-1:0] commit_free_phys,
  output logic          commit_ready,
  output logic [IW-2:0] rob_head_idx,
  output logic [LW-2:0] lsq_head_idx,
  output logic [LW-1:0] lsq_tail_ptr,
  output logic          rob_empty,
  output logic          recycling
);

  logic [IW-1:0] rob_tail, rob_head;
  logic [LW-1:0] lsq_tail, lsq_head;
  logic [RW-1:0] fl_head, fl_tail;
  logic [PW-1:0] fl [NPHYS];

  // gap recorded after each ROB entry (only branches get one)
  logic [RW-1:0] g_r [NROB];
  logic [IW-1:0] g_i [NROB];
  logic [LW-1:0] g_l [NROB];
  logic [RW-1:0] g_rs [NROB];   // free-list position of the register gap

  // start-up fill of the free list
  logic          init_busy;
  logic [RW-1:0] init_cnt;

  // register-gap recycling
  logic [RW-1:0] rec_ptr, rec_left;
  assign recycling = (rec_left != '0);

  logic [IW-1:0] rob_used;
  logic [LW-1:0] lsq_used;
  logic [RW-1:0] fl_free;
  assign rob_used = rob_tail - rob_head;
  assign lsq_used = lsq_tail - lsq_head;
  assign fl_free  = fl_tail - fl_head;

  assign ready        = !init_busy;
  assign rob_head_idx = rob_head[IW-2:0];
  assign lsq_head_idx = lsq_head[LW-2:0];
  assign lsq_tail_ptr = lsq_tail;
  assign rob_empty    = (rob_used == '0);

  // ---- allocation ------------------------------------------------------
  logic [IW:0] need_i;
  logic [LW:0] need_l;
  logic [RW:0] need_r;
  assign need_i = (IW+1)'(1);
  assign need_l = (LW+1)'(alloc_mem);
  assign need_r = (RW+1)'(alloc_dst);

  assign alloc_ok = ready && (need_i + (IW+1)'(rob_used) <= (IW+1)'(NROB))
                          && (need_l + (LW+1)'(lsq_used) <= (LW+1)'(NLSQ))
                          && (need_r <= (RW+1)'(fl_free));
  assign gap_applied =
      (need_i + (IW+1)'(alloc_gap_i) + (IW+1)'(rob_used) <= (IW+1)'(NROB)) &&
      (need_l + (LW+1)'(alloc_gap_l) + (LW+1)'(lsq_used) <= (LW+1)'(NLSQ)) &&
      (need_r + (RW+1)'(alloc_gap_r) <= (RW+1)'(fl_free));

  assign alloc_rob  = rob_tail[IW-2:0];
  assign alloc_lsq  = lsq_tail[LW-2:0];
  assign alloc_phys = fl[fl_head[PW-1:0]];
  assign cnt_r      = fl_head;
  assign cnt_i      = rob_tail;
  assign cnt_l      = lsq_tail;

  // ---- rollback ---------------------------------------------------------
  // Occupancy once the pointers are back at the branch (branch kept).
  logic [IW-1:0] rb_rob_used;
  logic [LW-1:0] rb_lsq_used;
  logic [RW-1:0] rb_fl_free;
  assign rb_rob_used = rb_ninst + IW'(1) - rob_head;
  assign rb_lsq_used = rb_nlsq - lsq_head;
  assign rb_fl_free  = fl_tail - rb_nreg;
  assign rb_gap_applied =
      ((IW+1)'(rb_gap_i) + (IW+1)'(rb_rob_used) <= (IW+1)'(NROB)) &&
      ((LW+1)'(rb_gap_l) + (LW+1)'(rb_lsq_used) <= (LW+1)'(NLSQ)) &&
      ((RW+1)'(rb_gap_r) <= (RW+1)'(rb_fl_free));

  // ---- commit -----------------------------------------------------------
  logic [IW-2:0] h;
  assign h = rob_head[IW-2:0];
  assign commit_ready = !rob_empty && (!recycling || g_r[h] == '0);

  logic do_commit, do_rec;
  assign do_commit = commit_valid && commit_ready;
  assign do_rec    = recycling;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rob_tail  <= '0;
      rob_head  <= '0;
      lsq_tail  <= '0;
      lsq_head  <= '0;
      fl_head   <= '0;
      fl_tail   <= '0;
      init_busy <= 1'b1;
      init_cnt  <= '0;
      rec_ptr   <= '0;
      rec_left  <= '0;
    end else if (init_busy) begin
      fl[init_cnt[PW-1:0]] <= PW'(init_cnt + RW'(NARCH));
      init_cnt <= init_cnt + 1'b1;
      fl_tail  <= init_cnt + 1'b1;
      if (init_cnt == RW'(NPHYS - NARCH - 1)) init_busy <= 1'b0;
    end else begin
      // -- front end
      if (rb_valid) begin
        rob_tail <= rb_ninst + IW'(1) + (rb_gap_applied ? rb_gap_i : '0);
        lsq_tail <= rb_nlsq + (rb_gap_applied ? rb_gap_l : '0);
        fl_head  <= rb_nreg + (rb_gap_applied ? rb_gap_r : '0);
        g_r[rb_ninst[IW-2:0]]  <= rb_gap_applied ? rb_gap_r : '0;
        g_i[rb_ninst[IW-2:0]]  <= rb_gap_applied ? rb_gap_i : '0;
        g_l[rb_ninst[IW-2:0]]  <= rb_gap_applied ? rb_gap_l : '0;
        g_rs[rb_ninst[IW-2:0]] <= rb_nreg;
      end else if (alloc_valid && alloc_ok) begin
        rob_tail <= rob_tail + IW'(1) + (gap_applied ? alloc_gap_i : '0);
        lsq_tail <= lsq_tail + LW'(alloc_mem) + (gap_applied ? alloc_gap_l : '0);
        fl_head  <= fl_head + RW'(alloc_dst) + (gap_applied ? alloc_gap_r : '0);
        g_r[rob_tail[IW-2:0]]  <= gap_applied ? alloc_gap_r : '0;
        g_i[rob_tail[IW-2:0]]  <= gap_applied ? alloc_gap_i : '0;
        g_l[rob_tail[IW-2:0]]  <= gap_applied ? alloc_gap_l : '0;
        g_rs[rob_tail[IW-2:0]] <= fl_head + RW'(alloc_dst);
      end

      // -- commit side: up to two free-list pushes per cycle
      if (do_commit) begin
        rob_head <= rob_head + IW'(1) + g_i[h];
        lsq_head <= lsq_head + LW'(commit_mem) + g_l[h];
      end
      if (do_commit && commit_free && do_rec) begin
        fl[fl_tail[PW-1:0]]         <= commit_free_phys;
        fl[PW'(fl_tail + RW'(1))]   <= fl[rec_ptr[PW-1:0]];
        fl_tail <= fl_tail + RW'(2);
      end else if (do_commit && commit_free) begin
        fl[fl_tail[PW-1:0]] <= commit_free_phys;
        fl_tail <= fl_tail + RW'(1);
      end else if (do_rec) begin
        fl[fl_tail[PW-1:0]] <= fl[rec_ptr[PW-1:0]];
        fl_tail <= fl_tail + RW'(1);
      end
      if (do_rec) begin
        rec_ptr  <= rec_ptr + RW'(1);
        rec_left <= rec_left - RW'(1);
      end
      if (do_commit && g_r[h] != '0) begin
        rec_ptr  <= g_rs[h];
        rec_left <= g_r[h];
      end
    end
  end

endmodule
