// gap_filter: decides the gap to insert after a branch.
//
// Given the RANT entry of a branch (signed gaps = taken-path need minus
// not-taken-path need, stability counter) and the direction the front end
// is about to follow, each resource is looked at on its own: if the
// followed path needs fewer entries than the other one, the difference is
// the gap to insert on it; otherwise nothing is inserted for that resource.
// Whether the gap is really inserted depends on the filter mode:
//   FILT_NONE      never (phantom execution without SYRANT),
//   FILT_ON_CORR   only when the branch is being corrected after a
//                  misprediction ("On Correction Only"),
//   FILT_STAB_CONF always on a correction; at decode only if the
//                  stability counter has reached STAB_TH and either the
//                  prediction is low-confidence or every gap is below its
//                  size threshold (the "Stab+(Conf or Size)" filter),
//   FILT_ALWAYS    on every RANT hit.
// decode_ins flags a decode-time insertion, which the RANT table uses for
// its 1/32 stability decrement.
//
// Document: the filters, the stability threshold of 2 and the size
// thresholds of 4 ROB entries, 4 registers and 2 LSQ entries; "less than"
// is taken as strict. This design's own choices: the per-resource
// orientation of the gap and the mode encoding.
//
// Timing: purely combinational.
module gap_filter
  import syrant_pkg::*;
#(
  parameter int unsigned RW      = $clog2(syrant_pkg::PHYS_REGS) + 1,
  parameter int unsigned IW      = $clog2(syrant_pkg::ROB_ENTRIES) + 1,
  parameter int unsigned LW      = $clog2(syrant_pkg::LSQ_ENTRIES) + 1,
  parameter int unsigned SW      = syrant_pkg::STAB_W,
  parameter int unsigned STAB_TH = 2,
  parameter int unsigned SIZE_R  = 4,
  parameter int unsigned SIZE_I  = 4,
  parameter int unsigned SIZE_L  = 2
) (
  input  filt_mode_e           mode,
  input  logic                 correction,  // 1: misprediction correction
  input  logic                 dir,         // direction followed (1 = taken)
  input  logic                 low_conf,    // main predictor confidence low
  input  logic                 hit,
  input  logic [SW-1:0]        stab,
  input  logic signed [RW-1:0] gap_r,
  input  logic signed [IW-1:0] gap_i,
  input  logic signed [LW-1:0] gap_l,
  output logic [RW-1:0]        ins_r,
  output logic [IW-1:0]        ins_i,
  output logic [LW-1:0]        ins_l,
  output logic                 insert,
  output logic                 decode_ins
);

  // positive = the followed path is the less demanding one by that much
  logic signed [RW-1:0] d_r;
  logic signed [IW-1:0] d_i;
  logic signed [LW-1:0] d_l;
  assign d_r = dir ? -gap_r : gap_r;
  assign d_i = dir ? -gap_i : gap_i;
  assign d_l = dir ? -gap_l : gap_l;

  logic [RW-1:0] a_r;
  logic [IW-1:0] a_i;
  logic [LW-1:0] a_l;
  assign a_r = (d_r > 0) ? RW'(d_r) : '0;
  assign a_i = (d_i > 0) ? IW'(d_i) : '0;
  assign a_l = (d_l > 0) ? LW'(d_l) : '0;

  logic size_ok, stable, allow;
  assign size_ok = (a_r < RW'(SIZE_R)) && (a_i < IW'(SIZE_I)) && (a_l < LW'(SIZE_L));
  assign stable  = (stab >= SW'(STAB_TH));

  always_comb begin
    unique case (mode)
      FILT_NONE:      allow = 1'b0;
      FILT_ON_CORR:   allow = hit && correction;
      FILT_STAB_CONF: allow = hit && (correction || (stable && (low_conf || size_ok)));
      FILT_ALWAYS:    allow = hit;
      default:        allow = 1'b0;
    endcase
  end

  assign ins_r      = allow ? a_r : '0;
  assign ins_i      = allow ? a_i : '0;
  assign ins_l      = allow ? a_l : '0;
  assign insert     = allow && ((a_r != '0) || (a_i != '0) || (a_l != '0));
  assign decode_ins = insert && !correction;

endmodule
