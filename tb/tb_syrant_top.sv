// tb_syrant_top: end-to-end test of syrant_top at a reduced size.
//
// The top is built with a 16-entry ROB, an 8-entry LSQ, 96 physical
// registers, an 8-entry ABL and a 16-entry RANT so that allocation stalls,
// wrap-around and gap recycling happen often in a short run. The stimulus
// and the checks are shared with the full-size testbench and described in
// tb_syrant_top_body.svh; this run also requires a Stabrand32 decrement and
// an allocation stall to have been seen. Runs 3 x 800 loop iterations.
module tb_syrant_top;
  import syrant_pkg::*;
  localparam int NROB_TB = 16, NLSQ_TB = 8, NPHYS_TB = 96, NARCH_TB = 64;
  localparam int NABL_TB = 8, NRANT_TB = 16;
  localparam int IW_TB = $clog2(NROB_TB), LW_TB = $clog2(NLSQ_TB);
  localparam int PW_TB = $clog2(NPHYS_TB), AW_TB = $clog2(NARCH_TB), BW_TB = $clog2(NABL_TB);
  localparam int ITER = 800, PHASES = 3;
  localparam bit FULL = 0;
  localparam longint WATCHDOG_NS = 64'd20_000_000;

  filt_mode_e mode;
  logic ready, in_valid, in_is_br, in_pred_taken, in_low_conf, in_dst_v, in_load, in_store;
  logic in_ready, out_dir, out_ci, out_keep;
  logic [63:0] in_pc, mx_addr;
  logic [1:0] in_src_v;
  logic [AW_TB-1:0] in_src0, in_src1, in_dst;
  logic [IW_TB-1:0] out_rob, wb_rob, com_rob, ev_viol_rob;
  logic [LW_TB-1:0] out_lsq, mx_lsq, mx_fwd_idx;
  logic [PW_TB-1:0] out_phys;
  logic [BW_TB-1:0] out_abl, br_abl;
  logic [7:0] out_tag, wb_tag;
  logic br_valid, br_taken, br_mispredict, wb_valid, wb_accepted;
  logic mx_valid, mx_fwd_v, com_valid, com_ready;
  logic ev_recv, ev_gap_dec, ev_gap_corr, ev_gap_dropped, ev_sbl_used, ev_stab_dec;
  logic ev_viol, ev_recycle;
  logic [63:0] ev_recv_pc;
  logic signed [PW_TB:0] ev_recv_gap_r;
  logic signed [IW_TB:0] ev_recv_gap_i;
  logic signed [LW_TB:0] ev_recv_gap_l;

  syrant_top #(.NROB(NROB_TB), .NLSQ(NLSQ_TB), .NPHYS(NPHYS_TB), .NARCH(NARCH_TB),
               .NABL(NABL_TB), .NRANT(NRANT_TB), .PC_W(64)) dut (.*);

`include "tb_syrant_top_body.svh"
endmodule
