// tb_rant_table: self-checking test of the RANT table.
//
// A reference model kept here (one record per direct-mapped slot, the same
// 16-bit LFSR for the 1/32 draw) tracks random reconvergence updates and
// decode-time decrements over a small set of branch PCs, some of which
// alias on the same slot. Both read ports are compared with the model every
// cycle: hit, the three signed gaps and the stability counter. It also
// checks that the counter rose to its maximum and was reset by a change.
module tb_rant_table;
  localparam int ENT = 4096, PC_W = 64, RW = 12, IW = 11, LW = 10, SW = 3;
  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0] a_pc, b_pc, upd_pc, dec_pc;
  logic a_hit, b_hit, upd_valid, dec_valid, dec_taken;
  logic signed [RW-1:0] a_gap_r, b_gap_r, upd_gap_r;
  logic signed [IW-1:0] a_gap_i, b_gap_i, upd_gap_i;
  logic signed [LW-1:0] a_gap_l, b_gap_l, upd_gap_l;
  logic [SW-1:0] a_stab;

  rant_table dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit v; longint unsigned tag; int r, i, l, s; } rec_t;
  rec_t m [int];
  logic [15:0] lfsr;
  int checks = 0, failures = 0, n_sat = 0, n_reset = 0, n_dec = 0;
  longint unsigned pcs [8];

  function automatic int idx(longint unsigned pc); return int'((pc >> 2) & (ENT - 1)); endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp_port(longint unsigned pc, bit hit, int r, int i, int l, int s, bit chk_s);
    int x; bit eh;
    x = idx(pc);
    eh = m.exists(x) && m[x].v && m[x].tag == pc;
    checks++;
    if (hit != eh || (eh && (r != m[x].r || i != m[x].i || l != m[x].l ||
                             (chk_s && s != m[x].s)))) begin
      failures++;
      if (failures < 10) $display("port mismatch pc=%h hit=%0d/%0d r=%0d/%0d s=%0d/%0d",
                                  pc, hit, eh, r, eh ? m[x].r : 0, s, eh ? m[x].s : 0);
    end
  endtask

  initial begin
    pcs[0] = 64'h1000; pcs[1] = 64'h1004; pcs[2] = 64'h2040;
    pcs[3] = 64'h1000 + 64'(ENT * 4);            // aliases pcs[0]
    pcs[4] = 64'h7ffc; pcs[5] = 64'h123450; pcs[6] = 64'h8008; pcs[7] = 64'h2044;
    {upd_valid, dec_valid} = '0;
    a_pc = '0; b_pc = '0; upd_pc = '0; dec_pc = '0;
    upd_gap_r = '0; upd_gap_i = '0; upd_gap_l = '0;
    lfsr = 16'hACE1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // the loop starts one clock edge later: the LFSR has stepped once
    lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      a_pc = pcs[$urandom_range(0, 7)];
      b_pc = pcs[$urandom_range(0, 7)];
      upd_valid = ($urandom_range(0, 2) == 0);
      upd_pc = pcs[$urandom_range(0, 7)];
      // mostly repeat the stored gaps so that counters climb
      if (m.exists(idx(upd_pc)) && m[idx(upd_pc)].tag == upd_pc && $urandom_range(0, 9) != 0) begin
        upd_gap_r = RW'(m[idx(upd_pc)].r); upd_gap_i = IW'(m[idx(upd_pc)].i);
        upd_gap_l = LW'(m[idx(upd_pc)].l);
      end else begin
        upd_gap_r = RW'($urandom_range(0, 8) - 4);
        upd_gap_i = IW'($urandom_range(0, 8) - 4);
        upd_gap_l = LW'($urandom_range(0, 4) - 2);
      end
      dec_valid = ($urandom_range(0, 1) == 0);
      dec_pc = pcs[$urandom_range(0, 7)];
      #1;
      cmp_port(a_pc, a_hit, a_gap_r, a_gap_i, a_gap_l, a_stab, 1);
      cmp_port(b_pc, b_hit, b_gap_r, b_gap_i, b_gap_l, 0, 0);
      checks++;
      if (dec_taken != (dec_valid && lfsr[4:0] == 0)) begin
        failures++; $display("draw mismatch");
      end
      @(posedge clk);
      // model update
      begin
        int u, d; bit same, hitu, decd;
        u = idx(upd_pc); d = idx(dec_pc);
        decd = dec_valid && lfsr[4:0] == 0 && m.exists(d) && m[d].v && m[d].tag == dec_pc
               && m[d].s != 0 && !(upd_valid && u == d);
        if (decd) begin m[d].s--; n_dec++; end
        if (upd_valid) begin
          hitu = m.exists(u) && m[u].v && m[u].tag == upd_pc;
          same = hitu && m[u].r == int'(upd_gap_r) && m[u].i == int'(upd_gap_i) && m[u].l == int'(upd_gap_l);
          if (same) begin if (m[u].s < 7) m[u].s++; else n_sat++; end
          else if (hitu) begin m[u].s = 0; n_reset++; end
          else m[u].s = 1;
          m[u].v = 1; m[u].tag = upd_pc;
          m[u].r = int'(upd_gap_r); m[u].i = int'(upd_gap_i); m[u].l = int'(upd_gap_l);
        end
        lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      end
    end
    checks++;
    if (n_sat == 0 || n_reset == 0 || n_dec == 0) begin
      failures++; $display("coverage: sat=%0d reset=%0d dec=%0d", n_sat, n_reset, n_dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
