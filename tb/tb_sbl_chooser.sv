// tb_sbl_chooser: self-checking test of the global SBL/main predictor
// selector. A reference 4-bit saturating counter (reset 8, moves only when
// exactly one predictor was right, SBL used while it is 8 or more) is kept
// here and compared with the block's counter and selection every cycle
// under random training and prediction inputs.
module tb_sbl_chooser;
  logic clk = 0, rst_n = 0;
  logic main_dir, sblp_valid, sblp_dir, sel_dir, sel_sbl;
  logic upd_valid, upd_sbl_ok, upd_main_ok;
  logic [3:0] ctr;
  int ref_ctr = 8;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  sbl_chooser dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {main_dir, sblp_valid, sblp_dir, upd_valid, upd_sbl_ok, upd_main_ok} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      main_dir = $urandom_range(0, 1);
      sblp_valid = $urandom_range(0, 1);
      sblp_dir = $urandom_range(0, 1);
      upd_valid = $urandom_range(0, 1);
      // phases biased towards one predictor, to reach both ends
      upd_sbl_ok  = (i % 1000 < 500) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      upd_main_ok = $urandom_range(0, 1);
      #1;
      checks++;
      if (ctr != 4'(ref_ctr) || sel_sbl != (sblp_valid && ref_ctr >= 8) ||
          sel_dir != ((sblp_valid && ref_ctr >= 8) ? sblp_dir : main_dir)) begin
        failures++;
        if (failures < 10) $display("mismatch ctr=%0d ref=%0d", ctr, ref_ctr);
      end
      @(posedge clk);
      if (upd_valid && upd_sbl_ok && !upd_main_ok && ref_ctr < 15) ref_ctr++;
      else if (upd_valid && !upd_sbl_ok && upd_main_ok && ref_ctr > 0) ref_ctr--;
      if (ref_ctr == 15) sat_hi++;
      if (ref_ctr == 0) sat_lo++;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("counter never saturated at both ends");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
