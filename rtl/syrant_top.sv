// syrant_top: the SYRANT additions to an out-of-order core, wired together.
//
// This is the rename-stage slice of a superscalar processor in which the
// taken and not-taken paths of a reconvergent branch are made to consume
// the same number of ROB entries, physical registers and LSQ entries, so
// that control-independent instructions after the reconvergence point get
// the same entries on both paths and their wrong-path results can be kept.
//
//   abl_sbl            records branches in flight; on a misprediction keeps
//                      the wrong-path branches and detects reconvergence
//   rant_table         remembers the measured gaps per branch PC
//   gap_filter (x2)    picks the gap at decode and on a correction
//   sbl_chooser        lets wrong-path computed directions override the
//                      main branch prediction after reconvergence
//   resource_allocator hands out ROB/LSQ/register entries in order, with gaps
//   ci_rename          RS-tag renaming: keeps control- and data-independent
//                      results, invalidates the rest
//   lsq_ci             memory-side validity of kept loads and stores
//
// The instruction fetch unit, the main branch predictor with its
// confidence estimate, the scheduler, the execution units and the caches
// are outside: their decisions arrive on the in_*, br_*, wb_*, mx_* and
// com_* ports.
//
// Interface (one instruction per cycle at each port):
//   in_*   an instruction in program order at rename; accepted when
//          in_ready. Outputs out_* describe what it was given.
//   br_*   a branch resolves (ABL slot, outcome, mispredicted?). A
//          misprediction rolls the ABL, the allocator, the map table and the
//          LSQ back to the branch in the same clock edge and may insert the
//          corrected path's gap; no instruction is accepted in that cycle.
//   wb_*   a result is written back (ROB entry and the RS-tag it carries).
//   mx_*   a load or store executes in the LSQ (address, forwarding).
//   com_*  the ROB head retires; com_ready says it is executed and may go.
//   ev_*   one-cycle event flags for monitoring.
//
// Document: the blocks and their interplay. This design's own choices:
// one instruction renamed and one retired per cycle, the per-ABL-slot
// record of the SBL and main predictions used to train the chooser, and the
// per-ROB-entry branch / memory flags kept here for commit.
module syrant_top
  import syrant_pkg::*;
#(
  parameter int unsigned NROB  = syrant_pkg::ROB_ENTRIES,
  parameter int unsigned NLSQ  = syrant_pkg::LSQ_ENTRIES,
  parameter int unsigned NPHYS = syrant_pkg::PHYS_REGS,
  parameter int unsigned NARCH = syrant_pkg::ARCH_REGS,
  parameter int unsigned NABL  = syrant_pkg::ABL_ENTRIES,
  parameter int unsigned NRANT = syrant_pkg::RANT_ENTRIES,
  parameter int unsigned PC_W  = syrant_pkg::PC_W,
  localparam int unsigned IW   = $clog2(NROB) + 1,
  localparam int unsigned LW   = $clog2(NLSQ) + 1,
  localparam int unsigned RW   = $clog2(NPHYS) + 1,
  localparam int unsigned PW   = $clog2(NPHYS),
  localparam int unsigned AW   = $clog2(NARCH),
  localparam int unsigned BW   = $clog2(NABL),
  localparam int unsigned TW   = syrant_pkg::RSTAG_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  filt_mode_e      mode,
  output logic            ready,
  // rename
  input  logic            in_valid,
  input  logic [PC_W-1:0] in_pc,
  input  logic            in_is_br,
  input  logic            in_pred_taken,   // main predictor
  input  logic            in_low_conf,     // its confidence is low
  input  logic [1:0]      in_src_v,
  input  logic [AW-1:0]   in_src0,
  input  logic [AW-1:0]   in_src1,
  input  logic            in_dst_v,
  input  logic [AW-1:0]   in_dst,
  input  logic            in_load,
  input  logic            in_store,
  output logic            in_ready,
  output logic [IW-2:0]   out_rob,
  output logic [LW-2:0]   out_lsq,
  output logic [PW-1:0]   out_phys,
  output logic [BW-1:0]   out_abl,
  output logic            out_dir,         // direction fetch follows
  output logic            out_ci,
  output logic            out_keep,
  output logic [TW-1:0]   out_tag,
  // branch resolution
  input  logic            br_valid,
  input  logic [BW-1:0]   br_abl,
  input  logic            br_taken,
  input  logic            br_mispredict,
  // write-back
  input  logic            wb_valid,
  input  logic [IW-2:0]   wb_rob,
  input  logic [TW-1:0]   wb_tag,
  output logic            wb_accepted,
  // memory execution
  input  logic            mx_valid,
  input  logic [LW-2:0]   mx_lsq,
  input  logic [PC_W-1:0] mx_addr,
  input  logic            mx_fwd_v,
  input  logic [LW-2:0]   mx_fwd_idx,
  // commit
  input  logic            com_valid,
  output logic            com_ready,
  output logic [IW-2:0]   com_rob,
  // events
  output logic            ev_recv,         // reconvergence detected
  output logic [PC_W-1:0] ev_recv_pc,      // ... for this branch PC
  output logic signed [RW-1:0] ev_recv_gap_r,  // ... with these gaps
  output logic signed [IW-1:0] ev_recv_gap_i,
  output logic signed [LW-1:0] ev_recv_gap_l,
  output logic            ev_gap_dec,      // gap inserted at decode
  output logic            ev_gap_corr,     // gap inserted on correction
  output logic            ev_gap_dropped,  // a chosen gap did not fit
  output logic            ev_sbl_used,     // SBL prediction used
  output logic            ev_stab_dec,     // Stabrand32 decrement drawn
  output logic            ev_viol,         // memory-order violation
  output logic [IW-2:0]   ev_viol_rob,     // ROB entry of the load to redo
  output logic            ev_recycle       // gap registers being recycled
);

  // ---------------- signals -----------------------------------------------
  logic fire, is_mem, alloc_ok, gap_applied, alloc_ready;
  logic [RW-1:0] cnt_r;
  logic [IW-1:0] cnt_i;
  logic [LW-1:0] cnt_l;
  logic [IW-2:0] rob_head;
  logic [LW-2:0] lsq_head;
  logic [LW-1:0] lsq_tail;
  logic commit_ready, rob_empty, recycling;

  logic abl_full;
  logic [BW:0] abl_count;
  logic sblp_valid, sblp_dir, sel_dir, sel_sbl;
  logic recv_valid;
  logic [PC_W-1:0] recv_pc;
  logic signed [RW-1:0] recv_gap_r;
  logic signed [IW-1:0] recv_gap_i;
  logic signed [LW-1:0] recv_gap_l;
  logic [RW-1:0] res_nreg;
  logic [IW-1:0] res_ninst;
  logic [LW-1:0] res_nlsq;
  logic [PC_W-1:0] res_pc;

  logic a_hit, b_hit;
  logic signed [RW-1:0] a_gap_r, b_gap_r;
  logic signed [IW-1:0] a_gap_i, b_gap_i;
  logic signed [LW-1:0] a_gap_l, b_gap_l;
  logic [STAB_W-1:0] a_stab;
  logic dec_taken;

  logic [RW-1:0] fg_r, cg_r;
  logic [IW-1:0] fg_i, cg_i;
  logic [LW-1:0] fg_l, cg_l;
  logic f_insert, f_decode_ins, c_insert, c_decode_ins;
  logic rb_gap_applied;

  logic chs_upd, chs_sbl_ok, chs_main_ok;
  logic com_go, c_br, c_mem;
  logic mp;
  assign mp = br_valid && br_mispredict;

  assign is_mem   = in_load || in_store;
  assign in_ready = alloc_ok && !mp && !(in_is_br && abl_full);
  assign fire     = in_valid && in_ready;
  assign ready    = alloc_ready;

  // ---------------- branch direction -------------------------------------
  sbl_chooser u_chooser (
    .clk, .rst_n,
    .main_dir   (in_pred_taken),
    .sblp_valid (sblp_valid && in_is_br),
    .sblp_dir,
    .sel_dir,
    .sel_sbl,
    .upd_valid  (chs_upd),
    .upd_sbl_ok (chs_sbl_ok),
    .upd_main_ok(chs_main_ok),
    .ctr        ()
  );
  assign out_dir = sel_dir;

  // prediction record per ABL slot for training the chooser
  logic [NABL-1:0] m_sblv, m_sbld, m_main;
  assign chs_upd     = br_valid && m_sblv[br_abl];
  assign chs_sbl_ok  = (m_sbld[br_abl] == br_taken);
  assign chs_main_ok = (m_main[br_abl] == br_taken);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_sblv <= '0;
      m_sbld <= '0;
      m_main <= '0;
    end else if (fire && in_is_br) begin
      m_sblv[out_abl] <= sblp_valid;
      m_sbld[out_abl] <= sblp_dir;
      m_main[out_abl] <= in_pred_taken;
    end
  end

  // ---------------- gap choice -------------------------------------------
  rant_table #(.ENTRIES(NRANT), .PC_W(PC_W), .RW(RW), .IW(IW), .LW(LW)) u_rant (
    .clk, .rst_n,
    .a_pc(in_pc), .a_hit, .a_gap_r, .a_gap_i, .a_gap_l, .a_stab,
    .b_pc(res_pc), .b_hit, .b_gap_r, .b_gap_i, .b_gap_l,
    .upd_valid(recv_valid), .upd_pc(recv_pc),
    .upd_gap_r(recv_gap_r), .upd_gap_i(recv_gap_i), .upd_gap_l(recv_gap_l),
    .dec_valid(fire && in_is_br && f_decode_ins && gap_applied),
    .dec_pc(in_pc), .dec_taken
  );

  gap_filter #(.RW(RW), .IW(IW), .LW(LW)) u_filt_fetch (
    .mode, .correction(1'b0), .dir(sel_dir), .low_conf(in_low_conf),
    .hit(a_hit && in_is_br), .stab(a_stab),
    .gap_r(a_gap_r), .gap_i(a_gap_i), .gap_l(a_gap_l),
    .ins_r(fg_r), .ins_i(fg_i), .ins_l(fg_l),
    .insert(f_insert), .decode_ins(f_decode_ins)
  );

  gap_filter #(.RW(RW), .IW(IW), .LW(LW)) u_filt_corr (
    .mode, .correction(1'b1), .dir(br_taken), .low_conf(1'b0),
    .hit(b_hit), .stab('0),
    .gap_r(b_gap_r), .gap_i(b_gap_i), .gap_l(b_gap_l),
    .ins_r(cg_r), .ins_i(cg_i), .ins_l(cg_l),
    .insert(c_insert), .decode_ins(c_decode_ins)
  );

  // ---------------- ABL / SBL --------------------------------------------
  abl_sbl #(.N(NABL), .PC_W(PC_W), .RW(RW), .IW(IW), .LW(LW)) u_abl (
    .clk, .rst_n,
    .push_valid(fire && in_is_br), .push_pc(in_pc),
    .push_nreg(cnt_r), .push_ninst(cnt_i), .push_nlsq(cnt_l),
    .push_dir(sel_dir),
    .push_gap_r(gap_applied ? fg_r : '0),
    .push_gap_i(gap_applied ? fg_i : '0),
    .push_gap_l(gap_applied ? fg_l : '0),
    .push_idx(out_abl), .full(abl_full),
    .sblp_valid, .sblp_dir,
    .recv_valid, .recv_pc, .recv_gap_r, .recv_gap_i, .recv_gap_l,
    .res_valid(br_valid), .res_idx(br_abl), .res_taken(br_taken),
    .res_mispredict(br_mispredict),
    .res_gap_r(rb_gap_applied ? cg_r : '0),
    .res_gap_i(rb_gap_applied ? cg_i : '0),
    .res_gap_l(rb_gap_applied ? cg_l : '0),
    .res_nreg, .res_ninst, .res_nlsq, .res_pc,
    .commit_valid(com_go && c_br),
    .count(abl_count)
  );

  // ---------------- allocation -------------------------------------------
  logic com_executed, com_free_v;
  logic [PW-1:0] com_free_phys;

  resource_allocator #(.NROB(NROB), .NLSQ(NLSQ), .NPHYS(NPHYS), .NARCH(NARCH)) u_alloc (
    .clk, .rst_n, .ready(alloc_ready),
    .alloc_valid(fire), .alloc_dst(in_dst_v), .alloc_mem(is_mem),
    .alloc_gap_r(in_is_br ? fg_r : '0),
    .alloc_gap_i(in_is_br ? fg_i : '0),
    .alloc_gap_l(in_is_br ? fg_l : '0),
    .alloc_ok, .gap_applied,
    .alloc_rob(out_rob), .alloc_lsq(out_lsq), .alloc_phys(out_phys),
    .cnt_r, .cnt_i, .cnt_l,
    .rb_valid(mp), .rb_nreg(res_nreg), .rb_ninst(res_ninst), .rb_nlsq(res_nlsq),
    .rb_gap_r(cg_r), .rb_gap_i(cg_i), .rb_gap_l(cg_l), .rb_gap_applied,
    .commit_valid(com_go), .commit_mem(c_mem),
    .commit_free(com_free_v), .commit_free_phys(com_free_phys),
    .commit_ready, .rob_head_idx(rob_head), .lsq_head_idx(lsq_head),
    .lsq_tail_ptr(lsq_tail), .rob_empty, .recycling
  );

  // per-ROB-entry kind flags for commit
  logic [NROB-1:0] k_br, k_mem;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_br  <= '0;
      k_mem <= '0;
    end else if (fire) begin
      k_br[out_rob]  <= in_is_br;
      k_mem[out_rob] <= is_mem;
    end
  end
  assign c_br      = k_br[rob_head];
  assign c_mem     = k_mem[rob_head];
  assign com_ready = commit_ready && com_executed;
  assign com_go    = com_valid && com_ready;
  assign com_rob   = rob_head;

  // ---------------- rename with RS-tags ----------------------------------
  logic mem_ok, ren_keep, viol_valid;
  logic [IW-2:0] viol_rob;
  logic [IW-2:0] mp_first;
  logic [IW-1:0] mp_count;
  logic [LW-1:0] mp_lcount;
  logic [IW-1:0] first_ptr;
  assign first_ptr = res_ninst + IW'(1);
  assign mp_first  = first_ptr[IW-2:0];
  assign mp_count  = cnt_i - res_ninst - IW'(1);
  assign mp_lcount = cnt_l - res_nlsq;

  ci_rename #(.NROB(NROB), .NPHYS(NPHYS), .NARCH(NARCH), .NCKPT(NABL), .PC_W(PC_W)) u_ren (
    .clk, .rst_n,
    .ren_valid(fire), .ren_rob(out_rob), .ren_pc(in_pc),
    .ren_src_v(in_src_v), .ren_src0(in_src0), .ren_src1(in_src1),
    .ren_dst_v(in_dst_v), .ren_dst(in_dst), .ren_phys(out_phys),
    .ren_mem_ok(is_mem ? mem_ok : 1'b1),
    .ren_ckpt(in_is_br), .ren_ckpt_idx(out_abl),
    .ren_ci(out_ci), .ren_keep, .ren_p0(), .ren_p1(), .ren_tag(out_tag),
    .cur_tag(),
    .mp_valid(mp), .mp_ckpt_idx(br_abl), .mp_first, .mp_count,
    .wb_valid, .wb_rob, .wb_tag, .wb_accepted,
    .inv_valid(viol_valid), .inv_rob(viol_rob),
    .com_valid(com_go), .com_rob(rob_head), .com_executed,
    .com_free_v, .com_free_phys,
    .q_phys('0), .q_valid()
  );
  assign out_keep = ren_keep;

  lsq_ci #(.NLSQ(NLSQ), .NROB(NROB), .PC_W(PC_W), .AD_W(PC_W)) u_lsq (
    .clk, .rst_n,
    .ren_valid(fire && is_mem), .ren_idx(out_lsq), .ren_pc(in_pc),
    .ren_store(in_store), .ren_rob(out_rob), .ren_keep, .mem_ok,
    .ex_valid(mx_valid), .ex_idx(mx_lsq), .ex_addr(mx_addr),
    .ex_fwd_v(mx_fwd_v), .ex_fwd_idx(mx_fwd_idx), .tail(lsq_tail),
    .viol_valid, .viol_idx(), .viol_rob,
    .mp_valid(mp), .mp_first(res_nlsq[LW-2:0]), .mp_count(mp_lcount),
    .com_valid(com_go && c_mem), .com_idx(lsq_head),
    .q_idx('0), .q_dvalid()
  );

  // ---------------- events -----------------------------------------------
  assign ev_recv        = recv_valid;
  assign ev_recv_pc     = recv_pc;
  assign ev_recv_gap_r  = recv_gap_r;
  assign ev_recv_gap_i  = recv_gap_i;
  assign ev_recv_gap_l  = recv_gap_l;
  assign ev_gap_dec     = fire && in_is_br && f_insert && gap_applied;
  assign ev_gap_corr    = mp && c_insert && rb_gap_applied;
  assign ev_gap_dropped = (fire && in_is_br && f_insert && !gap_applied)
                       || (mp && c_insert && !rb_gap_applied);
  assign ev_sbl_used    = fire && in_is_br && sel_sbl;
  assign ev_stab_dec    = dec_taken;
  assign ev_viol        = viol_valid;
  assign ev_viol_rob    = viol_rob;
  assign ev_recycle     = recycling;

endmodule
