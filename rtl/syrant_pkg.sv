// syrant_pkg: sizes and types shared by the SYRANT blocks.
//
// SYRANT (symmetric resource allocation on the not-taken and taken paths)
// makes the two paths after a conditional branch consume the same number of
// ROB entries, physical registers and LSQ entries, by inserting "gaps" on the
// less demanding path. Control-independent instructions after the
// reconvergence point then land in the same entries on both paths and their
// wrong-path results can be kept.
//
// The structure sizes below are those of the evaluated processor: a
// 1024-entry ROB, a 512-entry LSQ, 2048 physical registers, 256-entry
// ABL/SBL and a 4K-entry RANT table. The 64-bit PC and the 64 architectural
// registers (32 integer + 32 floating point) follow from the Alpha ISA the
// evaluation uses. RS-tag width, checkpoint organisation and all encodings
// are this design's own choices.
package syrant_pkg;

  // ---- document sizes -------------------------------------------------
  localparam int unsigned ROB_ENTRIES  = 1024;
  localparam int unsigned LSQ_ENTRIES  = 512;
  localparam int unsigned PHYS_REGS    = 2048;
  localparam int unsigned ABL_ENTRIES  = 256;
  localparam int unsigned RANT_ENTRIES = 4096;

  // ---- ISA / design choices -------------------------------------------
  localparam int unsigned PC_W      = 64;  // Alpha virtual address
  localparam int unsigned ARCH_REGS = 64;  // 32 int + 32 fp
  localparam int unsigned RSTAG_W   = 8;   // rename-sequence tag width
  localparam int unsigned STAB_W    = 3;   // RANT stability counter width

  // Gap insertion filter modes.
  typedef enum logic [1:0] {
    FILT_NONE      = 2'd0,  // no gap insertion (phantom execution only)
    FILT_ON_CORR   = 2'd1,  // gaps only when a misprediction is corrected
    FILT_STAB_CONF = 2'd2,  // corrections + Stab and (Conf or Size) at decode
    FILT_ALWAYS    = 2'd3   // every RANT hit inserts (unfiltered)
  } filt_mode_e;

endpackage
