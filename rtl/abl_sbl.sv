// abl_sbl: Active Branch List / Shadow Branch List reconvergence detector.
//
// The ABL is a circular list holding one entry per in-flight branch, in
// fetch order. An entry records the branch PC, the number of physical
// registers, ROB entries and LSQ entries allocated before the branch (the
// allocator's running counters), and the branch's current direction
// (predicted, then computed). When a branch is found mispredicted, every
// younger ABL entry -- the branches of the wrong path -- is copied into the
// SBL in one cycle, the ABL is cut back to the mispredicted branch and its
// direction is corrected. From then on every new branch pushed into the ABL
// is compared with the SBL; the first match is the first branch after the
// reconvergence point. The difference between the new entry's counters and
// the matching SBL entry's counters is the resource difference between the
// two paths (the gap sizes), which is reported on recv_* for the RANT table.
//
// After the match the SBL keeps being walked in order: while the next
// fetched branch has the PC of the next SBL entry, and that wrong-path
// branch had been computed, its computed direction is offered as an "SBL
// prediction" (sblp_*). This is the branch-prediction use of ABL/SBL.
//
// Document: ABL/SBL entry contents (PC, #registers, #instructions, #LSQ,
// direction), copy-on-misprediction, first-match detection and difference
// of the counters; 256 entries. This design's own choices: the list is a
// circular buffer popped on branch commit; the SBL copy keeps the ABL slot
// positions and a valid mask; each entry also remembers the gap inserted
// right after the branch and whether its direction has been computed; the
// measured difference has the gaps inserted after the mispredicted branch
// on either path taken out, so that a branch which already received a gap
// still measures its real path difference; when several SBL entries share
// a PC the one nearest the mispredicted branch wins; gaps are reported as
// (taken path need) - (not-taken path need).
//
// Timing: fetch/push, resolve and commit are sampled on the rising clock
// edge; sblp_* and recv_* are combinational from the push inputs and the
// current state (recv_valid is only meaningful together with push_valid).
// A misprediction resolve has priority over a push in the same cycle (the
// push is dropped, the front end is being redirected anyway).
module abl_sbl #(
  parameter int unsigned N     = syrant_pkg::ABL_ENTRIES,
  parameter int unsigned PC_W  = syrant_pkg::PC_W,
  parameter int unsigned RW    = $clog2(syrant_pkg::PHYS_REGS) + 1,
  parameter int unsigned IW    = $clog2(syrant_pkg::ROB_ENTRIES) + 1,
  parameter int unsigned LW    = $clog2(syrant_pkg::LSQ_ENTRIES) + 1,
  localparam int unsigned AW   = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fetch side: a branch enters the ABL
  input  logic                 push_valid,
  input  logic [PC_W-1:0]      push_pc,
  input  logic [RW-1:0]        push_nreg,   // registers allocated before it
  input  logic [IW-1:0]        push_ninst,  // ROB entries allocated before it
  input  logic [LW-1:0]        push_nlsq,   // LSQ entries allocated before it
  input  logic                 push_dir,    // predicted direction (1 = taken)
  input  logic [RW-1:0]        push_gap_r,  // gap inserted after this branch
  input  logic [IW-1:0]        push_gap_i,
  input  logic [LW-1:0]        push_gap_l,
  output logic [AW-1:0]        push_idx,    // ABL slot the branch gets
  output logic                 full,
  // SBL prediction for the branch being pushed
  output logic                 sblp_valid,
  output logic                 sblp_dir,
  // reconvergence detected on this push
  output logic                 recv_valid,
  output logic [PC_W-1:0]      recv_pc,     // PC of the corrected branch
  output logic signed [RW-1:0] recv_gap_r,  // taken minus not-taken need
  output logic signed [IW-1:0] recv_gap_i,
  output logic signed [LW-1:0] recv_gap_l,
  // branch resolution
  input  logic                 res_valid,
  input  logic [AW-1:0]        res_idx,
  input  logic                 res_taken,
  input  logic                 res_mispredict,
  input  logic [RW-1:0]        res_gap_r,   // gap inserted on correction
  input  logic [IW-1:0]        res_gap_i,
  input  logic [LW-1:0]        res_gap_l,
  // counters recorded for entry res_idx (allocator rollback point)
  output logic [RW-1:0]        res_nreg,
  output logic [IW-1:0]        res_ninst,
  output logic [LW-1:0]        res_nlsq,
  output logic [PC_W-1:0]      res_pc,
  // oldest branch commits
  input  logic                 commit_valid,
  output logic [AW:0]          count
);

  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [RW-1:0]   nreg;
    logic [IW-1:0]   ninst;
    logic [LW-1:0]   nlsq;
    logic            dir;
    logic            computed;
    logic [RW-1:0]   gap_r;
    logic [IW-1:0]   gap_i;
    logic [LW-1:0]   gap_l;
  } entry_t;

  entry_t abl [N];
  entry_t sbl [N];
  logic [N-1:0] sbl_v;

  logic [AW:0]   head, tail;
  logic [AW-1:0] sbl_start;

  // reconvergence monitor of the last corrected branch
  logic            mon_active;
  logic [PC_W-1:0] mon_pc;
  logic            mon_dir;         // corrected (right path) direction
  logic [RW-1:0]   mon_wgap_r, mon_cgap_r;
  logic [IW-1:0]   mon_wgap_i, mon_cgap_i;
  logic [LW-1:0]   mon_wgap_l, mon_cgap_l;
  // walking the SBL after reconvergence
  logic            follow;
  logic [AW-1:0]   fptr;

  assign count    = tail - head;
  assign full     = (count == (AW+1)'(N));
  assign push_idx = tail[AW-1:0];

  assign res_nreg  = abl[res_idx].nreg;
  assign res_ninst = abl[res_idx].ninst;
  assign res_nlsq  = abl[res_idx].nlsq;
  assign res_pc    = abl[res_idx].pc;

  // ---- first SBL match, searched from sbl_start ------------------------
  logic [N-1:0]  match;
  logic          m_found;
  logic [AW-1:0] m_idx;

  always_comb begin
    for (int k = 0; k < N; k++)
      match[k] = sbl_v[k] && (sbl[k].pc == push_pc);
    m_found = 1'b0;
    m_idx   = '0;
    for (int j = 0; j < N; j++) begin
      if (!m_found && match[AW'(sbl_start + AW'(j))]) begin
        m_found = 1'b1;
        m_idx   = AW'(sbl_start + AW'(j));
      end
    end
  end

  logic detect, fol_hit;
  assign detect  = mon_active && m_found;
  assign fol_hit = follow && sbl_v[fptr] && (sbl[fptr].pc == push_pc);

  always_comb begin
    sblp_valid = 1'b0;
    sblp_dir   = 1'b0;
    if (detect) begin
      sblp_valid = sbl[m_idx].computed;
      sblp_dir   = sbl[m_idx].dir;
    end else if (fol_hit) begin
      sblp_valid = sbl[fptr].computed;
      sblp_dir   = sbl[fptr].dir;
    end
  end

  // ---- measured gap: (right path) - (wrong path), gaps after the
  // corrected branch removed, then oriented as taken minus not-taken ------
  logic signed [RW-1:0] raw_r;
  logic signed [IW-1:0] raw_i;
  logic signed [LW-1:0] raw_l;
  always_comb begin
    raw_r = $signed(push_nreg  - sbl[m_idx].nreg  - mon_cgap_r + mon_wgap_r);
    raw_i = $signed(push_ninst - sbl[m_idx].ninst - mon_cgap_i + mon_wgap_i);
    raw_l = $signed(push_nlsq  - sbl[m_idx].nlsq  - mon_cgap_l + mon_wgap_l);
  end

  assign recv_valid = push_valid && !full && detect && !(res_valid && res_mispredict);
  assign recv_pc    = mon_pc;
  assign recv_gap_r = mon_dir ? raw_r : -raw_r;
  assign recv_gap_i = mon_dir ? raw_i : -raw_i;
  assign recv_gap_l = mon_dir ? raw_l : -raw_l;

  // ---- sequential -------------------------------------------------------
  logic [AW-1:0] nwrong;
  assign nwrong = AW'(tail[AW-1:0] - res_idx - AW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head       <= '0;
      tail       <= '0;
      sbl_v      <= '0;
      sbl_start  <= '0;
      mon_active <= 1'b0;
      mon_pc     <= '0;
      mon_dir    <= 1'b0;
      mon_wgap_r <= '0; mon_wgap_i <= '0; mon_wgap_l <= '0;
      mon_cgap_r <= '0; mon_cgap_i <= '0; mon_cgap_l <= '0;
      follow     <= 1'b0;
      fptr       <= '0;
    end else begin
      if (commit_valid && count != '0)
        head <= head + 1'b1;

      if (res_valid && res_mispredict) begin
        // copy the wrong-path branches into the SBL
        for (int k = 0; k < N; k++) begin
          sbl[k]   <= abl[k];
          sbl_v[k] <= (nwrong != '0) && (AW'(AW'(k) - res_idx - AW'(1)) < nwrong);
        end
        sbl_start  <= AW'(res_idx + AW'(1));
        // cut the ABL back to the corrected branch
        tail <= tail - (AW+1)'(nwrong);
        abl[res_idx].dir      <= res_taken;
        abl[res_idx].computed <= 1'b1;
        abl[res_idx].gap_r    <= res_gap_r;
        abl[res_idx].gap_i    <= res_gap_i;
        abl[res_idx].gap_l    <= res_gap_l;
        mon_active <= (nwrong != '0);
        mon_pc     <= abl[res_idx].pc;
        mon_dir    <= res_taken;
        mon_wgap_r <= abl[res_idx].gap_r;
        mon_wgap_i <= abl[res_idx].gap_i;
        mon_wgap_l <= abl[res_idx].gap_l;
        mon_cgap_r <= res_gap_r;
        mon_cgap_i <= res_gap_i;
        mon_cgap_l <= res_gap_l;
        follow     <= 1'b0;
      end else begin
        if (res_valid) begin
          abl[res_idx].dir      <= res_taken;
          abl[res_idx].computed <= 1'b1;
        end
        if (push_valid && !full) begin
          abl[tail[AW-1:0]] <= '{pc: push_pc, nreg: push_nreg, ninst: push_ninst,
                                 nlsq: push_nlsq, dir: push_dir, computed: 1'b0,
                                 gap_r: push_gap_r, gap_i: push_gap_i,
                                 gap_l: push_gap_l};
          tail <= tail + 1'b1;
          if (detect) begin
            mon_active <= 1'b0;
            follow     <= 1'b1;
            fptr       <= m_idx + AW'(1);
          end else if (follow) begin
            follow <= fol_hit;
            fptr   <= fptr + AW'(1);
          end
        end
      end
    end
  end

endmodule
