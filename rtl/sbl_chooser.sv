// sbl_chooser: global selector between SBL prediction and the main
// branch predictor.
//
// A single 4-bit saturating counter watches, over the whole program,
// whether the directions recorded in the Shadow Branch List predict the
// branches after a reconvergence better than the main predictor does.
// When a branch that had an SBL prediction resolves and exactly one of the
// two predictions was right, the counter moves towards that predictor.
// While its most significant bit is set, an available SBL prediction
// overrides the main prediction.
//
// Document: one global 4-bit counter monitors the SBL prediction quality.
// This design's own choices: the update rule, the MSB threshold and the
// reset value 8 (weakly in favour of the SBL prediction).
//
// Timing: sel_* is combinational; the counter updates on the rising edge.
module sbl_chooser #(
  parameter int unsigned CW = 4
) (
  input  logic clk,
  input  logic rst_n,
  // prediction
  input  logic main_dir,
  input  logic sblp_valid,
  input  logic sblp_dir,
  output logic sel_dir,
  output logic sel_sbl,       // the SBL prediction was used
  // training at resolution of a branch that had an SBL prediction
  input  logic upd_valid,
  input  logic upd_sbl_ok,
  input  logic upd_main_ok,
  output logic [CW-1:0] ctr
);

  assign sel_sbl = sblp_valid && ctr[CW-1];
  assign sel_dir = sel_sbl ? sblp_dir : main_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctr <= CW'(1) << (CW - 1);
    end else if (upd_valid && (upd_sbl_ok != upd_main_ok)) begin
      if (upd_sbl_ok && ctr != '1)       ctr <= ctr + 1'b1;
      else if (upd_main_ok && ctr != '0) ctr <= ctr - 1'b1;
    end
  end

endmodule
