// lsq_ci: the SYRANT additions to the load/store queue.
//
// Every LSQ entry remembers the PC and kind of the memory instruction that
// owns it, its ROB entry, its address, whether its data is valid, and -- for
// a load that received its data from an older, not yet committed store --
// the LSQ index of that store. Entries of squashed instructions stay as
// phantoms. When a memory instruction is renamed on the correct path into a
// phantom entry:
//   * mem_ok tells the renamer whether the memory side allows keeping the
//     wrong-path work: same PC and kind, and, for a load that was fed by a
//     store, that store's data still valid on the correct path (the store
//     has been renamed again on the correct path and kept, or it is older
//     than the branch, i.e. not a phantom);
//   * the entry's data stays valid only if the renamer keeps the
//     instruction (ren_keep); otherwise it is invalidated.
// When a store executes, every later load with valid data from the same
// address that did not take its data from this store has read a stale
// value; the first such load is reported (viol_*) and invalidated. This
// also catches loads whose wrong-path result was preserved.
//
// Document: store validity rules, the forwarding-store index kept with a
// load and checked at rename, invalidation of preserved loads on a
// memory-order violation; 512 entries. This design's own choices: word
// addresses compared exactly, one store check per cycle and reporting of
// the first violating load only.
//
// Timing: mem_ok and viol_* are combinational; state updates on the
// rising clock edge; recovery has priority over a rename in the same cycle.
module lsq_ci #(
  parameter int unsigned NLSQ = syrant_pkg::LSQ_ENTRIES,
  parameter int unsigned NROB = syrant_pkg::ROB_ENTRIES,
  parameter int unsigned PC_W = syrant_pkg::PC_W,
  parameter int unsigned AD_W = syrant_pkg::PC_W,
  localparam int unsigned QW  = $clog2(NLSQ),
  localparam int unsigned OW  = $clog2(NROB)
) (
  input  logic            clk,
  input  logic            rst_n,
  // rename
  input  logic            ren_valid,     // a memory instruction is renamed
  input  logic [QW-1:0]   ren_idx,
  input  logic [PC_W-1:0] ren_pc,
  input  logic            ren_store,
  input  logic [OW-1:0]   ren_rob,
  input  logic            ren_keep,      // decision of the renamer
  output logic            mem_ok,
  // execution of a load or store
  input  logic            ex_valid,
  input  logic [QW-1:0]   ex_idx,
  input  logic [AD_W-1:0] ex_addr,
  input  logic            ex_fwd_v,      // load data came from a store
  input  logic [QW-1:0]   ex_fwd_idx,
  input  logic [QW:0]     tail,          // LSQ tail pointer (allocator)
  output logic            viol_valid,
  output logic [QW-1:0]   viol_idx,
  output logic [OW-1:0]   viol_rob,
  // recovery
  input  logic            mp_valid,
  input  logic [QW-1:0]   mp_first,
  input  logic [QW:0]     mp_count,
  // commit
  input  logic            com_valid,
  input  logic [QW-1:0]   com_idx,
  // status query
  input  logic [QW-1:0]   q_idx,
  output logic            q_dvalid
);

  logic [PC_W-1:0] e_pc   [NLSQ];
  logic [AD_W-1:0] e_addr [NLSQ];
  logic [OW-1:0]   e_rob  [NLSQ];
  logic [QW-1:0]   e_fwd  [NLSQ];
  logic [NLSQ-1:0] e_st, e_occ, e_ph, e_dv, e_fv;

  assign q_dvalid = e_dv[q_idx];

  assign mem_ok = e_occ[ren_idx] && e_ph[ren_idx] && (e_pc[ren_idx] == ren_pc)
                  && (e_st[ren_idx] == ren_store)
                  && (ren_store || !e_fv[ren_idx]
                      || (e_dv[e_fwd[ren_idx]] && !e_ph[e_fwd[ren_idx]]));

  // ---- store address check against younger loads --------------------
  logic [QW-1:0] younger;   // entries after the store up to the tail
  assign younger = QW'(tail[QW-1:0] - ex_idx - QW'(1));

  // candidate loads, by absolute slot; then the first one after the store
  logic [NLSQ-1:0] cand;
  always_comb begin
    for (int k = 0; k < NLSQ; k++)
      cand[k] = ex_valid && e_st[ex_idx] && !e_st[k] && e_dv[k]
                && (QW'(QW'(k) - ex_idx - QW'(1)) < younger)
                && (e_addr[k] == ex_addr)
                && !(e_fv[k] && e_fwd[k] == ex_idx);
    viol_valid = 1'b0;
    viol_idx   = '0;
    for (int j = 1; j < NLSQ; j++) begin
      if (!viol_valid && cand[QW'(ex_idx + QW'(j))]) begin
        viol_valid = 1'b1;
        viol_idx   = QW'(ex_idx + QW'(j));
      end
    end
  end
  assign viol_rob = e_rob[viol_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_occ <= '0;
      e_ph  <= '0;
      e_dv  <= '0;
      e_fv  <= '0;
      e_st  <= '0;
    end else begin
      if (mp_valid) begin
        for (int k = 0; k < NLSQ; k++)
          if (QW'(QW'(k) - mp_first) < mp_count[QW-1:0] || mp_count[QW])
            e_ph[k] <= e_occ[k];
      end else if (ren_valid) begin
        e_pc[ren_idx]  <= ren_pc;
        e_st[ren_idx]  <= ren_store;
        e_rob[ren_idx] <= ren_rob;
        e_occ[ren_idx] <= 1'b1;
        e_ph[ren_idx]  <= 1'b0;
        if (!ren_keep) begin
          e_dv[ren_idx] <= 1'b0;
          e_fv[ren_idx] <= 1'b0;
        end
      end
      if (ex_valid) begin
        e_addr[ex_idx] <= ex_addr;
        e_dv[ex_idx]   <= 1'b1;
        e_fv[ex_idx]   <= ex_fwd_v && !e_st[ex_idx];
        e_fwd[ex_idx]  <= ex_fwd_idx;
      end
      if (viol_valid) e_dv[viol_idx] <= 1'b0;
      if (com_valid) begin
        e_occ[com_idx] <= 1'b0;
        e_ph[com_idx]  <= 1'b0;
      end
    end
  end

endmodule
