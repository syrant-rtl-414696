// tb_gap_filter: self-checking test of the gap insertion filter.
//
// Drives random RANT contents, directions, confidence and stability values
// in every filter mode and compares the inserted gaps with a reference
// written here from the filter rules: the followed path receives the
// difference when it is the less demanding one, corrections always pass in
// the Stab+(Conf or Size) mode, decode-time insertion needs a stability of
// 2 and either low confidence or gaps below 4 registers, 4 ROB entries and
// 2 LSQ entries. A few directed cases pin the thresholds.
module tb_gap_filter;
  import syrant_pkg::*;
  localparam int RW = 12, IW = 11, LW = 10, SW = 3;

  filt_mode_e mode;
  logic correction, dir, low_conf, hit;
  logic [SW-1:0] stab;
  logic signed [RW-1:0] gap_r;
  logic signed [IW-1:0] gap_i;
  logic signed [LW-1:0] gap_l;
  logic [RW-1:0] ins_r;
  logic [IW-1:0] ins_i;
  logic [LW-1:0] ins_l;
  logic insert, decode_ins;

  int checks = 0, failures = 0;

  gap_filter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int er, ei, el;
    bit allow, szok, e_ins;
    er = dir ? -int'(gap_r) : int'(gap_r); if (er < 0) er = 0;
    ei = dir ? -int'(gap_i) : int'(gap_i); if (ei < 0) ei = 0;
    el = dir ? -int'(gap_l) : int'(gap_l); if (el < 0) el = 0;
    szok = (er < 4) && (ei < 4) && (el < 2);
    case (mode)
      FILT_NONE:      allow = 0;
      FILT_ON_CORR:   allow = hit && correction;
      FILT_STAB_CONF: allow = hit && (correction || (stab >= 2 && (low_conf || szok)));
      default:        allow = hit;
    endcase
    if (!allow) begin er = 0; ei = 0; el = 0; end
    e_ins = allow && (er != 0 || ei != 0 || el != 0);
    #1;
    checks++;
    if (int'(ins_r) != er || int'(ins_i) != ei || int'(ins_l) != el ||
        insert != e_ins || decode_ins != (e_ins && !correction)) begin
      failures++;
      if (failures < 10)
        $display("mismatch mode=%0d corr=%0d dir=%0d g=%0d/%0d/%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
                 mode, correction, dir, gap_r, gap_i, gap_l, ins_r, ins_i, ins_l, er, ei, el);
    end
  endtask

  initial begin
    // directed: the size thresholds, stable, high confidence
    mode = FILT_STAB_CONF; correction = 0; low_conf = 0; hit = 1; stab = 2;
    dir = 0; gap_r = 3; gap_i = 3; gap_l = 1; check_one();
    if (!insert) begin failures++; $display("gap under threshold refused"); end
    gap_i = 4; check_one();
    if (insert) begin failures++; $display("gap at ROB threshold accepted"); end
    low_conf = 1; check_one();
    if (!insert || ins_i != 4) begin failures++; $display("low-confidence gap refused"); end
    stab = 1; check_one();
    if (insert) begin failures++; $display("unstable gap accepted"); end
    correction = 1; check_one();
    if (!insert) begin failures++; $display("correction gap refused"); end
    // taken path is the more demanding one: nothing to insert on it
    dir = 1; check_one();
    if (insert) begin failures++; $display("gap on more demanding path"); end
    // random
    repeat (20000) begin
      mode = filt_mode_e'($urandom_range(0, 3));
      correction = $urandom_range(0, 1);
      dir = $urandom_range(0, 1);
      low_conf = $urandom_range(0, 1);
      hit = ($urandom_range(0, 7) != 0);
      stab = SW'($urandom_range(0, 7));
      gap_r = RW'($urandom_range(0, 12) - 6);
      gap_i = IW'($urandom_range(0, 12) - 6);
      gap_l = LW'($urandom_range(0, 6) - 3);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
