// ci_rename: register renaming with rename-sequence tags (RS-tags).
//
// A run of instructions renamed without being interrupted by a
// misprediction recovery is a rename sequence; each has its own RS-tag, and
// the current tag is incremented at every recovery. Every map-table entry
// holds a physical register and the RS-tag of the value it names, and every
// ROB entry keeps the PC, the renamed sources (physical register + tag), the
// destination, its tag and an "executed" bit.
//
// Thanks to symmetric allocation, a control-independent instruction renamed
// on the correct path arrives in the very ROB entry, and with the very
// destination register, it used on the wrong path. When an instruction is
// renamed into an entry still holding a squashed (phantom) instruction:
//   * different PC (or different destination register): not control
//     independent -- new tag in the ROB entry and the map, register marked
//     invalid, instruction unexecuted;
//   * same PC and its renamed sources, tags included, equal the ones stored
//     on the wrong path (which covers an instruction with no source): the
//     old tag, the register's valid bit and the executed bit are kept --
//     the wrong-path result is reused (control and data independent);
//   * otherwise (data dependent): new tag, register invalid, unexecuted.
// Loads and stores are only kept if the LSQ side agrees too (mem_ok).
// A write-back is accepted only if its tag is the one now in the ROB entry,
// so a late result computed with stale operands cannot validate a register.
//
// Document: the RS-tag scheme and the three rules above, tags in the ROB
// entry and the map table. This design's own choices: 8-bit tags
// (wrap-around allowed), a phantom bit per ROB entry set when the entry is
// squashed, the extra destination-register check, one map checkpoint per
// ABL slot to restore the map on a misprediction, and the load-invalidate
// port used for memory-order violations (only the load itself is
// invalidated; its dependants are the scheduler's business).
//
// Timing: ren_* results are combinational; all state updates on the rising
// clock edge. Recovery has priority over a rename in the same cycle.
module ci_rename #(
  parameter int unsigned NROB  = syrant_pkg::ROB_ENTRIES,
  parameter int unsigned NPHYS = syrant_pkg::PHYS_REGS,
  parameter int unsigned NARCH = syrant_pkg::ARCH_REGS,
  parameter int unsigned NCKPT = syrant_pkg::ABL_ENTRIES,
  parameter int unsigned PC_W  = syrant_pkg::PC_W,
  parameter int unsigned TW    = syrant_pkg::RSTAG_W,
  localparam int unsigned OW   = $clog2(NROB),
  localparam int unsigned PW   = $clog2(NPHYS),
  localparam int unsigned AW   = $clog2(NARCH),
  localparam int unsigned CW   = $clog2(NCKPT)
) (
  input  logic            clk,
  input  logic            rst_n,
  // rename of one instruction
  input  logic            ren_valid,
  input  logic [OW-1:0]   ren_rob,
  input  logic [PC_W-1:0] ren_pc,
  input  logic [1:0]      ren_src_v,
  input  logic [AW-1:0]   ren_src0,
  input  logic [AW-1:0]   ren_src1,
  input  logic            ren_dst_v,
  input  logic [AW-1:0]   ren_dst,
  input  logic [PW-1:0]   ren_phys,     // from the allocator
  input  logic            ren_mem_ok,   // LSQ agrees (1 for non-memory)
  input  logic            ren_ckpt,     // save the map (branch)
  input  logic [CW-1:0]   ren_ckpt_idx,
  output logic            ren_ci,       // control independent
  output logic            ren_keep,     // wrong-path result reused
  output logic [PW-1:0]   ren_p0,       // renamed sources
  output logic [PW-1:0]   ren_p1,
  output logic [TW-1:0]   ren_tag,      // tag given to the result
  output logic [TW-1:0]   cur_tag,
  // misprediction recovery
  input  logic            mp_valid,
  input  logic [CW-1:0]   mp_ckpt_idx,
  input  logic [OW-1:0]   mp_first,     // first squashed ROB entry
  input  logic [OW:0]     mp_count,     // number of squashed entries
  // write-back
  input  logic            wb_valid,
  input  logic [OW-1:0]   wb_rob,
  input  logic [TW-1:0]   wb_tag,
  output logic            wb_accepted,
  // memory-order violation: a load result is wrong
  input  logic            inv_valid,
  input  logic [OW-1:0]   inv_rob,
  // commit
  input  logic            com_valid,
  input  logic [OW-1:0]   com_rob,
  output logic            com_executed,
  output logic            com_free_v,   // an old mapping is released
  output logic [PW-1:0]   com_free_phys,
  // register status query (for a scheduler / testbench)
  input  logic [PW-1:0]   q_phys,
  output logic            q_valid
);

  typedef struct packed {
    logic [PW-1:0] phys;
    logic [TW-1:0] tag;
  } name_t;

  typedef struct packed {
    logic          v;
    name_t         n;
  } src_t;

  name_t [NARCH-1:0] map;
  name_t [NARCH-1:0] ckpt [NCKPT];
  logic  [NPHYS-1:0] pvalid;

  logic [PC_W-1:0] r_pc   [NROB];
  src_t            r_s0   [NROB];
  src_t            r_s1   [NROB];
  logic            r_dv   [NROB];
  logic [PW-1:0]   r_dp   [NROB];
  logic [PW-1:0]   r_prev [NROB];
  logic [TW-1:0]   r_tag  [NROB];
  logic [NROB-1:0] r_exec, r_occ, r_ph;

  // ---- rename decision ------------------------------------------------
  src_t s0, s1;
  assign s0 = '{v: ren_src_v[0], n: ren_src_v[0] ? map[ren_src0] : '0};
  assign s1 = '{v: ren_src_v[1], n: ren_src_v[1] ? map[ren_src1] : '0};
  assign ren_p0 = s0.n.phys;
  assign ren_p1 = s1.n.phys;

  logic same_ops;
  assign ren_ci   = r_occ[ren_rob] && r_ph[ren_rob] && (r_pc[ren_rob] == ren_pc)
                    && (r_dv[ren_rob] == ren_dst_v)
                    && (!ren_dst_v || r_dp[ren_rob] == ren_phys);
  assign same_ops = (r_s0[ren_rob] == s0) && (r_s1[ren_rob] == s1);
  assign ren_keep = ren_ci && same_ops && ren_mem_ok;
  assign ren_tag  = ren_keep ? r_tag[ren_rob] : cur_tag;

  assign wb_accepted = wb_valid && r_occ[wb_rob] && (r_tag[wb_rob] == wb_tag);

  assign com_executed  = r_exec[com_rob];
  assign com_free_v    = r_dv[com_rob];
  assign com_free_phys = r_prev[com_rob];
  assign q_valid       = pvalid[q_phys];

  function automatic name_t [NARCH-1:0] reset_map();
    name_t [NARCH-1:0] m;
    for (int a = 0; a < NARCH; a++) m[a] = '{phys: PW'(a), tag: '0};
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map     <= reset_map();
      cur_tag <= '0;
      pvalid  <= {{(NPHYS-NARCH){1'b0}}, {NARCH{1'b1}}};
      r_exec  <= '0;
      r_occ   <= '0;
      r_ph    <= '0;
    end else begin
      if (mp_valid) begin
        map     <= ckpt[mp_ckpt_idx];
        cur_tag <= cur_tag + 1'b1;
        for (int k = 0; k < NROB; k++)
          if (OW'(OW'(k) - mp_first) < mp_count[OW-1:0] || mp_count[OW])
            r_ph[k] <= r_occ[k];
      end else if (ren_valid) begin
        r_pc[ren_rob]  <= ren_pc;
        r_s0[ren_rob]  <= s0;
        r_s1[ren_rob]  <= s1;
        r_dv[ren_rob]  <= ren_dst_v;
        r_dp[ren_rob]  <= ren_phys;
        r_prev[ren_rob] <= map[ren_dst].phys;
        r_occ[ren_rob] <= 1'b1;
        r_ph[ren_rob]  <= 1'b0;
        if (ren_dst_v) map[ren_dst] <= '{phys: ren_phys, tag: ren_tag};
        if (!ren_keep) begin
          r_tag[ren_rob]  <= cur_tag;
          r_exec[ren_rob] <= 1'b0;
          if (ren_dst_v) pvalid[ren_phys] <= 1'b0;
        end
        if (ren_ckpt) ckpt[ren_ckpt_idx] <= map;
      end

      if (wb_accepted) begin
        r_exec[wb_rob] <= 1'b1;
        if (r_dv[wb_rob]) pvalid[r_dp[wb_rob]] <= 1'b1;
      end
      if (inv_valid) begin
        r_exec[inv_rob] <= 1'b0;
        if (r_dv[inv_rob]) pvalid[r_dp[inv_rob]] <= 1'b0;
      end
      if (com_valid) begin
        r_occ[com_rob] <= 1'b0;
        r_ph[com_rob]  <= 1'b0;
      end
    end
  end

endmodule
