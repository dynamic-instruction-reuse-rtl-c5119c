// tb_reuse_top: end-to-end test of the three reuse buffers at their default
// size (128 entries, 4 lookups, 4 writes, 4 commits, 8 checkpoints).
//
// A random 16-instruction static program is run pass after pass as a dynamic
// stream; all three buffers see the same stream. The testbench plays a simple
// in-order superscalar pipeline: a group of 1..4 instructions is decoded (reuse
// test) each cycle, and in the next cycle the instructions that were not
// reused write their results and the whole group commits. Some branches are
// treated as mispredicted: the branch takes an RST checkpoint, a few
// wrong-path instructions (the ones that follow in the program) are decoded
// and executed on a scratch copy of the state but never commit, the RST is
// restored, and the correct path runs one extra instruction before
// reconverging on the same instructions - the squash-reuse situation.
//
// Checks: every reused result and every reused address equals the value a
// golden interpreter computes for that instruction. Each mechanism (reuse in
// each scheme, chains reused in one cycle, load value reuse, address-only
// reuse, store address reuse, FIFO eviction, dependence conversion on
// eviction, RST restore, squash reuse) must occur at least once.
//
// Next to the top, a fourth buffer runs on the same stream: scheme Sv with
// 128 entries organised as 32 sets of 4 ways, the set-associative
// configuration. Its reused results are checked the same way, and it must
// reuse at least once.
`timescale 1ns/1ps
module tb_reuse_top;
  import rb_pkg::*;
  import tb_prog_pkg::*;

  localparam int unsigned ENTRIES = 128;
  localparam int unsigned L   = 4;
  localparam int unsigned HW  = $clog2(ENTRIES) + 1;
  localparam int unsigned CW  = 3;
  localparam int unsigned NS  = 4;          // 0 Sv, 1 Sn, 2 Sn+d, 3 Sv 4-way
  localparam int unsigned NDYN = 6000;      // correct-path instructions

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  lookup_req_t   lk      [L];
  logic          hit     [NS][L];
  logic          ahit    [NS][L];
  word_t         res     [NS][L];
  word_t         adr     [NS][L];
  logic          alloc   [NS][L];
  logic [HW-1:0] hdl     [NS][L];
  write_req_t    wr      [NS][L];
  logic [HW-1:0] wr_h    [NS][L];
  commit_req_t   cm      [L];
  logic [HW-1:0] cm_h    [L];
  logic          restore;
  logic [CW-1:0] restore_id;
  logic [L-1:0]  conv;

  reuse_top dut (
    .clk, .rst_n,
    .sv_lk_req (lk), .sv_lk_hit (hit[0]), .sv_lk_addr_hit (ahit[0]),
    .sv_lk_result (res[0]), .sv_lk_address (adr[0]), .sv_lk_alloc (alloc[0]),
    .sv_lk_handle (hdl[0]), .sv_wr_req (wr[0]), .sv_wr_handle (wr_h[0]), .sv_cm_req (cm),
    .sn_lk_req (lk), .sn_lk_hit (hit[1]), .sn_lk_addr_hit (ahit[1]),
    .sn_lk_result (res[1]), .sn_lk_address (adr[1]), .sn_lk_alloc (alloc[1]),
    .sn_lk_handle (hdl[1]), .sn_wr_req (wr[1]), .sn_wr_handle (wr_h[1]), .sn_cm_req (cm),
    .snd_lk_req (lk), .snd_lk_hit (hit[2]), .snd_lk_addr_hit (ahit[2]),
    .snd_lk_result (res[2]), .snd_lk_address (adr[2]), .snd_lk_alloc (alloc[2]),
    .snd_lk_handle (hdl[2]), .snd_wr_req (wr[2]), .snd_wr_handle (wr_h[2]),
    .snd_cm_req (cm), .snd_cm_handle (cm_h),
    .snd_restore (restore), .snd_restore_id (restore_id),
    .snd_ev_converted (conv)
  );

  rb_sv #(.WAYS(4)) u_sv4 (
    .clk, .rst_n,
    .lk_req (lk), .lk_hit (hit[3]), .lk_addr_hit (ahit[3]),
    .lk_result (res[3]), .lk_address (adr[3]), .lk_alloc (alloc[3]),
    .lk_handle (hdl[3]), .wr_req (wr[3]), .wr_handle (wr_h[3]), .cm_req (cm)
  );

  int checks = 0, failures = 0;

  // mechanism counters
  int n_hit [NS];
  int n_chain_sv = 0, n_chain_snd = 0, n_load_val = 0, n_addr_only = 0;
  int n_store_addr = 0, n_evict = 0, n_conv = 0, n_restore = 0, n_squash = 0;
  int n_dep_beyond_sn = 0, n_alloc [NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog [16];
  instr_t extra [8];

  initial begin
    regs_t  R, RW;                 // architectural and wrong-path state
    mem_t   M, MW;
    instr_t grp [L];
    int     gn;
    bit     grp_wp;                // current group is on the wrong path
    word_t  gold_res [L];
    word_t  gold_adr [L];
    // previous group, completing this cycle
    instr_t p_grp [L];
    int     p_n;
    bit     p_wp;
    write_req_t p_wr [L];
    commit_req_t p_cm [L];
    logic   p_alloc [NS][L];
    logic [HW-1:0] p_hdl [NS][L];
    logic [15:0] p_regw;           // registers the previous group writes
    logic [15:0] p_memw;           // memory words the previous group stores
    logic [15:0] wp_regw, wp_memw; // written on the current wrong path
    logic [15:0] infl, meminfl;
    bit     wp_flag [NS][ENTRIES];
    int     pos, pc_n, done, wp_left, ck_id;
    bit     in_wp, need_restore;
    instr_t wpq [$];
    int     resume_n;
    logic   mp;

    for (int n = 0; n < 16; n++) prog[n] = rand_instr(n, 32'h400);
    // make sure the program holds at least two branches, a load and a store
    prog[5]  = mk(I_BEQ, 0, 1, 2, 0, prog[5].pc);
    prog[9]  = mk(I_LW, 3, 8, 0, 8, prog[9].pc);
    prog[10] = mk(I_ADD, 4, 3, 7, 0, prog[10].pc);
    prog[12] = mk(I_SW, 0, 8, 4, 12, prog[12].pc);
    prog[13] = mk(I_BEQ, 0, 3, 1, 0, prog[13].pc);
    prog[14] = mk(I_LW, 5, 8, 0, 12, prog[14].pc);
    for (int x = 0; x < 8; x++) extra[x] = mk(I_ADDI, 6, 6, 0, 3, 32'h800 + 32'(4 * x));

    R = '0; M = '0;
    for (int w = 0; w < 16; w++) M[w] = 32'(w * 7);
    for (int s = 0; s < NS; s++) begin
      n_hit[s] = 0; n_alloc[s] = 0;
      for (int e = 0; e < ENTRIES; e++) wp_flag[s][e] = 1'b0;
    end
    for (int k = 0; k < L; k++) begin
      lk[k] = '0; cm[k] = '0; cm_h[k] = '0;
      for (int s = 0; s < NS; s++) begin wr[s][k] = '0; wr_h[s][k] = '0; end
    end
    restore = 1'b0; restore_id = '0;
    p_n = 0; p_wp = 1'b0; p_regw = '0; p_memw = '0; wp_regw = '0; wp_memw = '0;
    pc_n = 0; done = 0; in_wp = 1'b0; need_restore = 1'b0; ck_id = 0; resume_n = 0;
    RW = R; MW = M;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    while (done < NDYN || p_n != 0 || in_wp) begin
      @(negedge clk);
      // ---- completion of the previous group: result writes and commits
      for (int k = 0; k < L; k++) begin
        cm[k] = '0; cm_h[k] = '0;
        for (int s = 0; s < NS; s++) begin wr[s][k] = '0; wr_h[s][k] = '0; end
        if (k < p_n) begin
          for (int s = 0; s < NS; s++) if (p_alloc[s][k]) begin
            wr[s][k] = p_wr[k]; wr_h[s][k] = p_hdl[s][k];
          end
          if (!p_wp) begin cm[k] = p_cm[k]; cm_h[k] = p_hdl[2][k]; end
        end
      end
      infl    = (p_wp ? 16'h0 : p_regw) | wp_regw;
      meminfl = (p_wp ? 16'h0 : p_memw) | wp_memw;

      // ---- form the group decoded this cycle
      gn = 0; grp_wp = in_wp; restore = 1'b0;
      for (int k = 0; k < L; k++) lk[k] = '0;
      if (need_restore) begin
        restore = 1'b1; restore_id = CW'(ck_id);
        need_restore = 1'b0; in_wp = 1'b0; grp_wp = 1'b0;
        wp_regw = '0; wp_memw = '0; n_restore++;
        ck_id = (ck_id + 1) % 8;
      end else if (in_wp) begin
        while (gn < int'($urandom_range(1, L)) && wpq.size() > 0) begin
          grp[gn] = wpq.pop_front(); gn++;
        end
        if (wpq.size() == 0) need_restore = 1'b1;
      end else if (done < NDYN) begin
        int want;
        want = $urandom_range(1, L);
        while (gn < want && done < NDYN) begin
          mp = 1'b0;
          if (resume_n < 0) begin
            // correct path after a misprediction: one extra instruction
            grp[gn] = extra[$urandom_range(0, 7)];
            resume_n = -resume_n - 1;
          end else begin
            grp[gn] = prog[resume_n];
            if (grp[gn].op == I_BEQ && $urandom_range(0, 99) < 45) mp = 1'b1;
            resume_n = (resume_n + 1) % 16;
          end
          gn++; done++;
          if (mp) begin
            // the branch ends the group; wrong path follows, then reconverges
            lk[gn-1].ckpt = 1'b1;
            wpq.delete();
            for (int w = 0; w < int'($urandom_range(2, 6)); w++)
              wpq.push_back(prog[(resume_n + w) % 16]);
            resume_n = -resume_n - 1;
            break;
          end
        end
      end

      // ---- decode requests and golden outcomes
      begin
        regs_t Rc; mem_t Mc;
        logic [15:0] gw_reg, gw_mem;
        logic ckflag [L];
        for (int k = 0; k < L; k++) ckflag[k] = lk[k].ckpt;
        if (!grp_wp && gn > 0) begin RW = R; MW = M; end
        Rc = grp_wp ? RW : R;
        Mc = grp_wp ? MW : M;
        gw_reg = '0; gw_mem = '0;
        for (int k = 0; k < gn; k++) begin
          word_t a;
          a = ea(grp[k], Rc);
          lk[k] = mk_req(grp[k], Rc, infl);
          lk[k].ckpt = ckflag[k];
          lk[k].st_pending = (meminfl != 0);
          lk[k].ckpt_id = CW'(ck_id);
          p_wr[k] = mk_wr(grp[k], Rc, Mc);
          p_wr[k].fwd = grp[k].op == I_LW && (meminfl[a[5:2]] || gw_mem[a[5:2]]);
          p_cm[k] = mk_cm(grp[k], Rc);
          gold_res[k] = result_of(grp[k], Rc, Mc);
          gold_adr[k] = a;
          if (has_rd(grp[k])) gw_reg[grp[k].rd] = 1'b1;
          if (grp[k].op == I_SW) gw_mem[a[5:2]] = 1'b1;
          step(grp[k], Rc, Mc);
        end
        if (grp_wp) begin
          RW = Rc; MW = Mc; wp_regw |= gw_reg; wp_memw |= gw_mem;
        end else begin
          R = Rc; M = Mc;
          if (gn > 0 && lk[gn-1].ckpt) begin
            in_wp = 1'b1; RW = R; MW = M;
          end
        end
        p_regw = gw_reg; p_memw = gw_mem;
      end

      #1;
      // ---- check the reuse outcome of every scheme
      for (int s = 0; s < NS; s++) begin
        for (int k = 0; k < gn; k++) begin
          if (hit[s][k]) begin
            n_hit[s]++;
            check(res[s][k] == gold_res[k], $sformatf("scheme %0d slot %0d result op %s pc %h wp %0d got %0d exp %0d", s, k, grp[k].op.name(), grp[k].pc, grp_wp, res[s][k], gold_res[k]));
            if (grp[k].op == I_LW) n_load_val++;
            if (!grp_wp && wp_flag[s][hdl[s][k][HW-2:0]] && s == 2) n_squash++;
            for (int m = 0; m < k; m++)
              if (hit[s][m] && has_rd(grp[m]) &&
                  ((uses_rs(grp[k]) && grp[k].rs == grp[m].rd) ||
                   (uses_rt(grp[k]) && grp[k].rt == grp[m].rd))) begin
                if (s == 0) n_chain_sv++;
                if (s == 2) n_chain_snd++;
              end
            if (s == 2 && !hit[1][k]) n_dep_beyond_sn++;
          end
          if (ahit[s][k]) begin
            check(adr[s][k] == gold_adr[k], $sformatf("scheme %0d slot %0d address", s, k));
            if (grp[k].op == I_LW && !hit[s][k]) n_addr_only++;
            if (grp[k].op == I_SW) n_store_addr++;
          end
          check(alloc[s][k] == !(hit[s][k] || (grp[k].op == I_SW && ahit[s][k])),
                "reservation rule");
          p_alloc[s][k] = alloc[s][k];
          p_hdl[s][k]   = hdl[s][k];
          if (alloc[s][k]) begin
            n_alloc[s]++;
            wp_flag[s][hdl[s][k][HW-2:0]] = grp_wp;
          end
        end
      end
      for (int k = 0; k < L; k++) if (conv[k]) n_conv++;
      p_grp = grp; p_n = gn; p_wp = grp_wp;
    end
    for (int s = 0; s < NS; s++) if (n_alloc[s] > n_evict) n_evict = n_alloc[s] - int'(ENTRIES);

    $display("dynamic instructions %0d", done);
    $display("reused: Sv %0d  Sn %0d  Sn+d %0d  Sv 4-way %0d",
             n_hit[0], n_hit[1], n_hit[2], n_hit[3]);
    $display("chains in one cycle: Sv %0d  Sn+d %0d; Sn+d reuse missed by Sn %0d",
             n_chain_sv, n_chain_snd, n_dep_beyond_sn);
    $display("load values %0d, address only %0d, store address %0d",
             n_load_val, n_addr_only, n_store_addr);
    $display("evictions %0d, dependence conversions %0d, RST restores %0d, squash reuse %0d",
             n_evict, n_conv, n_restore, n_squash);
    check(n_hit[0] > 0, "Sv reuse happened");
    check(n_hit[1] > 0, "Sn reuse happened");
    check(n_hit[2] > 0, "Sn+d reuse happened");
    check(n_hit[3] > 0, "set-associative Sv reuse happened");
    check(n_chain_sv > 0, "Sv chain reuse happened");
    check(n_chain_snd > 0, "Sn+d chain reuse happened");
    check(n_dep_beyond_sn > 0, "Sn+d reuse beyond Sn happened");
    check(n_load_val > 0, "load value reuse happened");
    check(n_addr_only > 0, "address-only reuse happened");
    check(n_store_addr > 0, "store address reuse happened");
    check(n_evict > 0, "FIFO eviction happened");
    check(n_conv > 0, "dependence conversion happened");
    check(n_restore > 0, "RST restore happened");
    check(n_squash > 0, "squash reuse happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
