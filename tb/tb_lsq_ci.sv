// tb_lsq_ci: self-checking test of the SYRANT LSQ additions.
//
// A store S, a load L that takes its data from S and an independent load
// L2 execute on a wrong path and are squashed. On the correct path S is
// renamed again but not kept (its operands changed), so L -- fed by S --
// must be refused (mem_ok low) while L2 is accepted, and a different PC in
// an entry is refused. Then the store-address check: a store executing
// with the address of an already executed younger load that did not take
// its data from it reports that load and clears its data; a load fed by
// the store and entries beyond the tail are not reported. Last, a load fed
// by a store that stays a phantom on the correct path is refused, and the
// same load is accepted once the store has been renamed again and kept.
module tb_lsq_ci;
  localparam int NLSQ = 8, NROB = 16, QW = 3, OW = 4;
  logic clk = 0, rst_n = 0;
  logic ren_valid, ren_store, ren_keep, mem_ok, ex_valid, ex_fwd_v;
  logic [QW-1:0] ren_idx, ex_idx, ex_fwd_idx, viol_idx, mp_first, com_idx, q_idx;
  logic [63:0] ren_pc, ex_addr;
  logic [OW-1:0] ren_rob, viol_rob;
  logic [QW:0] tail, mp_count;
  logic viol_valid, mp_valid, com_valid, q_dvalid;

  lsq_ci #(.NLSQ(NLSQ), .NROB(NROB)) dut (.*);
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
    if (got != exp) begin failures++; $display("%t %s: got %0d expected %0d", $time, what, got, exp); end
  endtask

  task automatic idle();
    ren_valid = 0; ren_store = 0; ren_keep = 0; ren_idx = '0; ren_pc = '0; ren_rob = '0;
    ex_valid = 0; ex_idx = '0; ex_addr = '0; ex_fwd_v = 0; ex_fwd_idx = '0;
    mp_valid = 0; mp_first = '0; mp_count = '0; com_valid = 0; com_idx = '0; q_idx = '0;
  endtask

  task automatic ren(int idx, longint pc, bit st, int rob, bit keep, output bit ok);
    @(negedge clk); idle();
    ren_valid = 1; ren_idx = QW'(idx); ren_pc = 64'(pc); ren_store = st; ren_rob = OW'(rob);
    ren_keep = keep; #1; ok = mem_ok;
    @(posedge clk);
  endtask

  task automatic exec(int idx, longint addr, bit fv, int fi, output bit vv, output int vi, output int vr);
    @(negedge clk); idle();
    ex_valid = 1; ex_idx = QW'(idx); ex_addr = 64'(addr); ex_fwd_v = fv; ex_fwd_idx = QW'(fi);
    #1; vv = viol_valid; vi = int'(viol_idx); vr = int'(viol_rob);
    @(posedge clk);
  endtask

  task automatic dvalid(int idx, output bit v);
    @(negedge clk); idle(); q_idx = QW'(idx); #1; v = q_dvalid;
  endtask

  bit ok, vv, v; int vi, vr;

  initial begin
    idle(); tail = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- wrong path: S, L (fed by S), L2
    tail = 4'd3;
    ren(0, 'h10, 1, 5, 0, ok);
    ren(1, 'h14, 0, 6, 0, ok);
    ren(2, 'h18, 0, 7, 0, ok);
    expect_eq("first rename never matches", ok, 0);
    exec(0, 'h40, 0, 0, vv, vi, vr);
    exec(1, 'h40, 1, 0, vv, vi, vr);
    exec(2, 'h80, 0, 0, vv, vi, vr);
    expect_eq("no violation yet", vv, 0);
    // ---- squash all three
    @(negedge clk); idle(); mp_valid = 1; mp_first = '0; mp_count = 4'd3; @(posedge clk);
    // ---- correct path
    ren(0, 'h10, 1, 5, 0, ok);
    expect_eq("store matches its LSQ entry", ok, 1);
    dvalid(0, v); expect_eq("store not kept: data invalid", v, 0);
    ren(1, 'h14, 0, 6, 0, ok);
    expect_eq("load fed by an invalid store refused", ok, 0);
    ren(2, 'h18, 0, 7, 1, ok);
    expect_eq("independent load accepted", ok, 1);
    dvalid(2, v); expect_eq("kept load still valid", v, 1);
    // ---- other PC in a phantom entry
    exec(1, 'h40, 1, 0, vv, vi, vr);      // L executes again, fed by S
    @(negedge clk); idle(); mp_valid = 1; mp_first = 3'd1; mp_count = 4'd2; @(posedge clk);
    ren(1, 'h99, 0, 6, 0, ok);
    expect_eq("different PC refused", ok, 0);
    ren(2, 'h18, 0, 7, 1, ok);
    expect_eq("same PC accepted", ok, 1);
    // ---- store address check
    exec(1, 'h40, 1, 0, vv, vi, vr);      // L fed by S again
    exec(0, 'h80, 0, 0, vv, vi, vr);      // S writes L2's address
    expect_eq("violation found", vv, 1);
    expect_eq("violating load index", vi, 2);
    expect_eq("violating load ROB entry", vr, 7);
    dvalid(2, v); expect_eq("violating load invalidated", v, 0);
    exec(2, 'h80, 0, 0, vv, vi, vr);      // L2 re-executes
    exec(0, 'h40, 0, 0, vv, vi, vr);      // L has its data from S itself
    expect_eq("forwarded load not a violation", vv, 0);
    tail = 4'd2;                          // L2 beyond the tail
    exec(0, 'h80, 0, 0, vv, vi, vr);
    expect_eq("entry beyond tail ignored", vv, 0);
    // ---- commit frees the entry: it is no longer a phantom candidate
    @(negedge clk); idle(); com_valid = 1; com_idx = '0; @(posedge clk);
    @(negedge clk); idle(); mp_valid = 1; mp_first = '0; mp_count = 4'd1; @(posedge clk);
    ren(0, 'h10, 1, 5, 0, ok);
    expect_eq("committed entry not matched", ok, 0);
    // ---- load fed by a store that stays a phantom (gap on the correct path)
    tail = 4'd6;
    ren(3, 'h30, 1, 9, 0, ok);
    ren(4, 'h34, 0, 10, 0, ok);
    exec(3, 'hc0, 0, 0, vv, vi, vr);
    exec(4, 'hc0, 1, 3, vv, vi, vr);      // L3 takes its data from S3
    @(negedge clk); idle(); mp_valid = 1; mp_first = 3'd3; mp_count = 4'd2; @(posedge clk);
    ren(4, 'h34, 0, 10, 0, ok);           // S3 not renamed again
    expect_eq("load fed by a phantom store refused", ok, 0);
    dvalid(4, v); expect_eq("refused load data invalid", v, 0);
    exec(4, 'hc0, 1, 3, vv, vi, vr);
    @(negedge clk); idle(); mp_valid = 1; mp_first = 3'd3; mp_count = 4'd2; @(posedge clk);
    ren(3, 'h30, 1, 9, 1, ok);            // S3 renamed again and kept
    expect_eq("store matches again", ok, 1);
    ren(4, 'h34, 0, 10, 1, ok);
    expect_eq("load fed by a kept store accepted", ok, 1);
    dvalid(4, v); expect_eq("accepted load keeps its data", v, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
