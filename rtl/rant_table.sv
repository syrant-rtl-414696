// rant_table: Resource Allocation on Not-taken and Taken paths table.
//
// One entry per reconvergent branch: the branch PC and the signed register,
// ROB and LSQ gap sizes last measured for it (taken-path need minus
// not-taken-path need), plus a stability counter. An entry is written each
// time the ABL/SBL detector reports a reconvergence: a new branch gets its
// gaps and a counter of 1, a branch that reconverges again with the same
// three gaps has its counter incremented (saturating), and a branch whose
// gaps changed gets the new gaps and its counter reset to 0. The stability
// counter also drops by one with probability 1/32 each time a gap was
// inserted at decode time for the branch (the "Stabrand32" policy), drawn
// from a 16-bit Fibonacci LFSR (taps 16,14,13,11) that steps every cycle;
// the decrement happens when the LFSR's low five bits are all zero.
//
// Document: entry contents (PC, three signed gaps), 4K entries, stability
// counter with reset on change, 1/32 random decrement. This design's own
// choices: direct-mapped, indexed by PC bits [2 +: 12] (4-byte
// instructions) with the full PC kept as tag; a 3-bit counter; counting
// the first detection as 1; the LFSR; an update has priority over a
// decrement of the same entry in the same cycle.
//
// Timing: two asynchronous read ports (fetch lookup and correction
// lookup); update and decrement are written on the rising clock edge.
module rant_table #(
  parameter int unsigned ENTRIES = syrant_pkg::RANT_ENTRIES,
  parameter int unsigned PC_W    = syrant_pkg::PC_W,
  parameter int unsigned RW      = $clog2(syrant_pkg::PHYS_REGS) + 1,
  parameter int unsigned IW      = $clog2(syrant_pkg::ROB_ENTRIES) + 1,
  parameter int unsigned LW      = $clog2(syrant_pkg::LSQ_ENTRIES) + 1,
  parameter int unsigned SW      = syrant_pkg::STAB_W,
  localparam int unsigned XW     = $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // read port A (fetch)
  input  logic [PC_W-1:0]      a_pc,
  output logic                 a_hit,
  output logic signed [RW-1:0] a_gap_r,
  output logic signed [IW-1:0] a_gap_i,
  output logic signed [LW-1:0] a_gap_l,
  output logic [SW-1:0]        a_stab,
  // read port B (misprediction correction)
  input  logic [PC_W-1:0]      b_pc,
  output logic                 b_hit,
  output logic signed [RW-1:0] b_gap_r,
  output logic signed [IW-1:0] b_gap_i,
  output logic signed [LW-1:0] b_gap_l,
  // update from a detected reconvergence
  input  logic                 upd_valid,
  input  logic [PC_W-1:0]      upd_pc,
  input  logic signed [RW-1:0] upd_gap_r,
  input  logic signed [IW-1:0] upd_gap_i,
  input  logic signed [LW-1:0] upd_gap_l,
  // a decode-time gap was inserted for dec_pc: maybe decrement
  input  logic                 dec_valid,
  input  logic [PC_W-1:0]      dec_pc,
  output logic                 dec_taken     // the 1/32 draw fired
);

  logic [ENTRIES-1:0] valid;
  logic [PC_W-1:0]    tag   [ENTRIES];
  logic [RW-1:0]      gap_r [ENTRIES];
  logic [IW-1:0]      gap_i [ENTRIES];
  logic [LW-1:0]      gap_l [ENTRIES];
  logic [SW-1:0]      stab  [ENTRIES];

  function automatic logic [XW-1:0] idx_of(logic [PC_W-1:0] pc);
    return pc[2 +: XW];
  endfunction

  logic [XW-1:0] ai, bi, ui, di;
  assign ai = idx_of(a_pc);
  assign bi = idx_of(b_pc);
  assign ui = idx_of(upd_pc);
  assign di = idx_of(dec_pc);

  assign a_hit   = valid[ai] && (tag[ai] == a_pc);
  assign a_gap_r = $signed(gap_r[ai]);
  assign a_gap_i = $signed(gap_i[ai]);
  assign a_gap_l = $signed(gap_l[ai]);
  assign a_stab  = stab[ai];

  assign b_hit   = valid[bi] && (tag[bi] == b_pc);
  assign b_gap_r = $signed(gap_r[bi]);
  assign b_gap_i = $signed(gap_i[bi]);
  assign b_gap_l = $signed(gap_l[bi]);

  // 1/32 draw
  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end
  assign dec_taken = dec_valid && (lfsr[4:0] == 5'd0);

  logic u_hit, u_same, d_hit;
  assign u_hit  = valid[ui] && (tag[ui] == upd_pc);
  assign u_same = u_hit && (gap_r[ui] == upd_gap_r) && (gap_i[ui] == upd_gap_i)
                        && (gap_l[ui] == upd_gap_l);
  assign d_hit  = valid[di] && (tag[di] == dec_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (upd_valid) begin
      valid[ui] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      tag[ui]   <= upd_pc;
      gap_r[ui] <= upd_gap_r;
      gap_i[ui] <= upd_gap_i;
      gap_l[ui] <= upd_gap_l;
      if (u_same)     stab[ui] <= (stab[ui] == '1) ? stab[ui] : stab[ui] + 1'b1;
      else if (u_hit) stab[ui] <= '0;
      else            stab[ui] <= SW'(1);
    end
    if (dec_taken && d_hit && stab[di] != '0 && !(upd_valid && ui == di))
      stab[di] <= stab[di] - 1'b1;
  end

endmodule
