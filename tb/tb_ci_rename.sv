// tb_ci_rename: self-checking test of RS-tag renaming.
//
// Replays the register example of the SYRANT rename rules: a branch whose
// wrong (taken) path renames R23,R24->R6 and R26,R30->R4 after a one-entry
// gap, and whose correct (not-taken) path renames R15,R14->R5,
// R17,R11->R4 and R19,R22->R6. The four control-independent instructions
// that follow (R4,R16->R15; R1,R2->R3; R6,R2->R7; R7,R3->R9) land in the
// same ROB entries and registers on both paths. Expected: all four are
// recognised as control independent, only R1,R2->R3 keeps its old tag, its
// executed bit and its register's valid bit; the other three get the new
// tag and must execute again. Then checks that a write-back carrying a
// stale tag is refused, that an instruction with no source operand is
// kept, that a memory instruction is not kept when the LSQ side refuses,
// that the load-invalidate port clears the result, and the commit outputs.
module tb_ci_rename;
  localparam int NROB = 16, NPHYS = 64, NARCH = 32, NCKPT = 8, TW = 8;
  localparam int OW = 4, PW = 6, AW = 5, CW = 3;
  logic clk = 0, rst_n = 0;
  logic ren_valid, ren_dst_v, ren_mem_ok, ren_ckpt, ren_ci, ren_keep;
  logic [OW-1:0] ren_rob, mp_first, wb_rob, inv_rob, com_rob;
  logic [63:0] ren_pc;
  logic [1:0] ren_src_v;
  logic [AW-1:0] ren_src0, ren_src1, ren_dst;
  logic [PW-1:0] ren_phys, ren_p0, ren_p1, com_free_phys, q_phys;
  logic [CW-1:0] ren_ckpt_idx, mp_ckpt_idx;
  logic [TW-1:0] ren_tag, cur_tag, wb_tag;
  logic mp_valid, wb_valid, wb_accepted, inv_valid, com_valid, com_executed, com_free_v, q_valid;
  logic [OW:0] mp_count;

  ci_rename #(.NROB(NROB), .NPHYS(NPHYS), .NARCH(NARCH), .NCKPT(NCKPT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic idle();
    ren_valid = 0; ren_dst_v = 0; ren_mem_ok = 1; ren_ckpt = 0; ren_src_v = 0;
    ren_rob = '0; ren_pc = '0; ren_src0 = '0; ren_src1 = '0; ren_dst = '0; ren_phys = '0;
    ren_ckpt_idx = '0; mp_valid = 0; mp_ckpt_idx = '0; mp_first = '0; mp_count = '0;
    wb_valid = 0; wb_rob = '0; wb_tag = '0; inv_valid = 0; inv_rob = '0;
    com_valid = 0; com_rob = '0; q_phys = '0;
  endtask

  // rename one instruction; returns {ci, keep} and the tag it got
  task automatic ren(int rob, longint pc, int s0, int s1, int d, int phys,
                     bit br, bit mem_ok, output bit ci, output bit keep, output int tag);
    @(negedge clk); idle();
    ren_valid = 1; ren_rob = OW'(rob); ren_pc = 64'(pc);
    ren_src_v = {s1 >= 0, s0 >= 0};
    ren_src0 = AW'(s0 < 0 ? 0 : s0); ren_src1 = AW'(s1 < 0 ? 0 : s1);
    ren_dst_v = (d >= 0); ren_dst = AW'(d < 0 ? 0 : d); ren_phys = PW'(phys);
    ren_mem_ok = mem_ok; ren_ckpt = br; ren_ckpt_idx = '0;
    #1; ci = ren_ci; keep = ren_keep; tag = int'(ren_tag);
    @(posedge clk);
  endtask

  task automatic wb(int rob, int tag);
    @(negedge clk); idle();
    wb_valid = 1; wb_rob = OW'(rob); wb_tag = TW'(tag);
    @(posedge clk);
  endtask

  function automatic bit reg_valid(int p);
    q_phys = PW'(p);
    return 1'b0;
  endfunction

  task automatic query(int p, output bit v);
    @(negedge clk); idle(); q_phys = PW'(p); #1; v = q_valid;
  endtask

  task automatic commit_look(int rob, output bit ex, output bit fv, output int fp);
    @(negedge clk); idle(); com_rob = OW'(rob); #1;
    ex = com_executed; fv = com_free_v; fp = int'(com_free_phys);
  endtask

  bit ci, keep, v, ex, fv;
  int tag, fp;

  initial begin
    idle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- common prefix and branch
    ren(0, 'h100, 18, 25, 1, 32, 0, 1, ci, keep, tag);
    ren(1, 'h104, 12, 13, 2, 33, 0, 1, ci, keep, tag);
    ren(2, 'h108, 2, -1, -1, 0, 1, 1, ci, keep, tag);          // branch, map saved
    // ---- wrong (taken) path after a one-entry gap (ROB 3, register 34)
    ren(4, 'h200, 23, 24, 6, 35, 0, 1, ci, keep, tag);
    ren(5, 'h204, 26, 30, 4, 36, 0, 1, ci, keep, tag);
    ren(6, 'h300, 4, 16, 15, 37, 0, 1, ci, keep, tag);
    ren(7, 'h304, 1, 2, 3, 38, 0, 1, ci, keep, tag);
    ren(8, 'h308, 6, 2, 7, 39, 0, 1, ci, keep, tag);
    ren(9, 'h30c, 7, 3, 9, 40, 0, 1, ci, keep, tag);
    expect_eq("no reuse without a misprediction", keep, 0);
    for (int r = 0; r < 10; r++) if (r != 3) wb(r, 0);
    query(38, v); expect_eq("R3 result valid on the wrong path", v, 1);

    // ---- misprediction: back to the branch, entries 3..9 become phantoms
    @(negedge clk); idle();
    mp_valid = 1; mp_ckpt_idx = '0; mp_first = 4'd3; mp_count = 5'd7;
    @(posedge clk);
    @(negedge clk); idle(); #1;
    expect_eq("RS-tag incremented", cur_tag, 1);

    // ---- correct (not-taken) path
    ren(3, 'h180, 15, 14, 5, 34, 0, 1, ci, keep, tag);
    expect_eq("N3 not CI", ci, 0);
    ren(4, 'h184, 17, 11, 4, 35, 0, 1, ci, keep, tag);
    expect_eq("N4 not CI (other PC in its entry)", ci, 0);
    expect_eq("N4 new tag", tag, 1);
    ren(5, 'h188, 19, 22, 6, 36, 0, 1, ci, keep, tag);
    expect_eq("N5 not CI", ci, 0);
    ren(6, 'h300, 4, 16, 15, 37, 0, 1, ci, keep, tag);
    expect_eq("R4,R16->R15 CI", ci, 1);
    expect_eq("R4,R16->R15 CIDD", keep, 0);
    expect_eq("R4,R16->R15 tag", tag, 1);
    ren(7, 'h304, 1, 2, 3, 38, 0, 1, ci, keep, tag);
    expect_eq("R1,R2->R3 CI", ci, 1);
    expect_eq("R1,R2->R3 CIDI kept", keep, 1);
    expect_eq("R1,R2->R3 old tag", tag, 0);
    ren(8, 'h308, 6, 2, 7, 39, 0, 1, ci, keep, tag);
    expect_eq("R6,R2->R7 CIDD", keep, 0);
    ren(9, 'h30c, 7, 3, 9, 40, 0, 1, ci, keep, tag);
    expect_eq("R7,R3->R9 CI", ci, 1);
    expect_eq("R7,R3->R9 CIDD through R7", keep, 0);

    query(38, v); expect_eq("R3 kept valid", v, 1);
    query(37, v); expect_eq("R15 invalidated", v, 0);
    query(40, v); expect_eq("R9 invalidated", v, 0);
    commit_look(7, ex, fv, fp);
    expect_eq("R1,R2->R3 still executed", ex, 1);
    expect_eq("frees the old R3 mapping", fp, 3);
    expect_eq("frees a register", fv, 1);
    commit_look(6, ex, fv, fp);
    expect_eq("R4,R16->R15 must execute again", ex, 0);

    // ---- stale write-back refused, current one accepted
    @(negedge clk); idle(); wb_valid = 1; wb_rob = 4'd6; wb_tag = 8'd0; #1;
    expect_eq("stale-tag write-back refused", wb_accepted, 0);
    wb_tag = 8'd1; #1;
    expect_eq("current-tag write-back accepted", wb_accepted, 1);
    @(posedge clk);
    query(37, v); expect_eq("R15 valid after write-back", v, 1);

    // ---- second branch: no-source instruction, memory refusal, invalidate
    ren(10, 'h400, 9, -1, -1, 0, 1, 1, ci, keep, tag);         // branch, map saved
    ren(11, 'h500, -1, -1, 12, 41, 0, 1, ci, keep, tag);       // li R12
    ren(12, 'h504, 12, -1, 13, 42, 0, 1, ci, keep, tag);       // ld R13,(R12)
    wb(11, 1); wb(12, 1);
    @(negedge clk); idle();
    mp_valid = 1; mp_ckpt_idx = '0; mp_first = 4'd11; mp_count = 5'd2;
    @(posedge clk);
    ren(11, 'h500, -1, -1, 12, 41, 0, 1, ci, keep, tag);
    expect_eq("no-source instruction kept", keep, 1);
    ren(12, 'h504, 12, -1, 13, 42, 0, 0, ci, keep, tag);
    expect_eq("memory side refuses: load not kept", keep, 0);
    query(41, v); expect_eq("li result still valid", v, 1);
    query(42, v); expect_eq("refused load result invalid", v, 0);
    @(negedge clk); idle(); inv_valid = 1; inv_rob = 4'd11; @(posedge clk);
    query(41, v); expect_eq("invalidated result", v, 0);
    commit_look(11, ex, fv, fp); expect_eq("invalidated not executed", ex, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
