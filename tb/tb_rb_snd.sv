// tb_rb_snd: directed test of the scheme Sn+d reuse buffer with its register
// source table (8 entries, 4 checkpoints).
//
// 1. The chain I: r1<-0, J: r2<-r1+4, K: r3<-r1+r2 executes, then R: r1<-4.
//    J alone then misses (its src-index no longer names the newest producer
//    of r1), but the group I2, J2, K2 is reused in a single cycle: reusing I2
//    points the RST at I's entry, which is exactly J's and K's src-index.
// 2. Dependent operands ignore register writes; an independent operand is
//    invalidated by a write of its register and blocked while in flight.
// 3. A branch takes a checkpoint; a wrong-path R moves the RST; restoring
//    the checkpoint makes J reusable again.
// 4. Evicting a committed current producer turns its dependent into an
//    independent entry (ev_converted) that stays reusable; evicting a
//    producer that has not committed invalidates the dependent.
`timescale 1ns/1ps
module tb_rb_snd;
  import rb_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned L    = 4;
  localparam int unsigned HW   = $clog2(N) + 1;
  localparam int unsigned CK   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  lookup_req_t   lk   [L];
  logic          hit  [L], ahit [L], alloc [L];
  word_t         res  [L], adr  [L];
  logic [HW-1:0] hdl  [L];
  write_req_t    wr   [L];
  logic [HW-1:0] wr_h [L];
  commit_req_t   cm   [L];
  logic [HW-1:0] cm_h [L];
  logic          restore;
  logic [1:0]    restore_id;
  logic [L-1:0]  conv;

  rb_snd #(.ENTRIES(N), .LOOKUPS(L), .WRITES(L), .COMMITS(L), .CKPTS(CK)) dut (
    .clk, .rst_n,
    .lk_req (lk), .lk_hit (hit), .lk_addr_hit (ahit), .lk_result (res),
    .lk_address (adr), .lk_alloc (alloc), .lk_handle (hdl),
    .wr_req (wr), .wr_handle (wr_h), .cm_req (cm), .cm_handle (cm_h),
    .restore (restore), .restore_id (restore_id), .ev_converted (conv)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lookup_req_t rq(logic [31:0] pc, bit u0, int s0, bit u1, int s1,
                                     bit hd, int d);
    lookup_req_t q;
    q = '0;
    q.valid = 1'b1; q.pc = pc; q.kind = K_ALU;
    q.src_used = {u1, u0}; q.src[0] = areg_t'(s0); q.src[1] = areg_t'(s1);
    q.has_dest = hd; q.dest = areg_t'(d);
    return q;
  endfunction

  function automatic write_req_t wq(word_t r);
    write_req_t w;
    w = '0; w.valid = 1'b1; w.kind = K_ALU; w.result = r;
    return w;
  endfunction

  function automatic commit_req_t cq(bit hd, int d);
    commit_req_t c;
    c = '0; c.valid = 1'b1; c.has_dest = hd; c.dest = areg_t'(d);
    return c;
  endfunction

  task automatic clear();
    for (int k = 0; k < L; k++) begin
      lk[k] = '0; wr[k] = '0; wr_h[k] = '0; cm[k] = '0; cm_h[k] = '0;
    end
    restore = 1'b0; restore_id = '0;
  endtask

  task automatic tick();
    @(posedge clk); #1; clear();
  endtask

  // decode one instruction; optionally write its result and commit it
  task automatic run1(input lookup_req_t q, input word_t r, input bit do_commit,
                      output logic was_hit, output logic [HW-1:0] h);
    lk[0] = q;
    #1;
    was_hit = hit[0]; h = hdl[0];
    tick();
    if (!was_hit) begin wr[0] = wq(r); wr_h[0] = h; end
    if (do_commit) begin cm[0] = cq(q.has_dest, int'(q.dest)); cm_h[0] = h; end
    tick();
  endtask

  logic hb;
  logic [HW-1:0] hi, hj, hk, hr, hx, hp, hq, hs, ht;

  // reserve filler entries (no destination) until entry 'idx' is replaced;
  // returns ev_converted of the replacing reservation
  task automatic evict_until(input logic [HW-2:0] idx, output logic c);
    int guard;
    guard = 0;
    c = 1'b0;
    forever begin
      lk[0] = rq(32'hf00 + 32'(4 * guard), 0, 0, 0, 0, 0, 0);
      #1;
      if (hdl[0][HW-2:0] == idx) begin c = conv[0]; tick(); break; end
      tick();
      guard++;
      if (guard > 2 * N) begin check(0, "eviction target reached"); break; end
    end
  endtask

  initial begin
    logic c;
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;

    // ---------------------------------------------------- 1. Figure 7
    run1(rq(32'h100, 0, 0, 0, 0, 1, 1), 0, 1, hb, hi);
    run1(rq(32'h104, 1, 1, 0, 0, 1, 2), 4, 1, hb, hj);
    run1(rq(32'h108, 1, 1, 1, 2, 1, 3), 4, 1, hb, hk);
    run1(rq(32'h200, 0, 0, 0, 0, 1, 1), 4, 1, hb, hr);         // R: r1 <- 4
    lk[0] = rq(32'h104, 1, 1, 0, 0, 1, 2);
    #1;
    check(!hit[0], "J alone after R: r1 now comes from R");
    clear();                                                   // not decoded
    lk[0] = rq(32'h100, 0, 0, 0, 0, 1, 1);
    lk[1] = rq(32'h104, 1, 1, 0, 0, 1, 2);
    lk[2] = rq(32'h108, 1, 1, 1, 2, 1, 3);
    #1;
    check(hit[0] && res[0] == 0 && hdl[0] == hi, "I2 reused from I1's entry");
    check(hit[1] && res[1] == 4 && hdl[1] == hj, "J2 reused in the same cycle");
    check(hit[2] && res[2] == 4 && hdl[2] == hk, "K2 reused in the same cycle");
    tick();
    for (int k = 0; k < 3; k++) begin cm[k] = cq(1, k + 1); end
    cm_h[0] = hi; cm_h[1] = hj; cm_h[2] = hk;
    tick();

    // ---------------------------------------------------- 2. invalidations
    cm[0] = cq(1, 1); cm_h[0] = hi;       // r1 written (I again): J, K dependent
    tick();
    lk[0] = rq(32'h100, 0, 0, 0, 0, 1, 1);
    lk[1] = rq(32'h104, 1, 1, 0, 0, 1, 2);
    #1;
    check(hit[0] && hit[1], "dependent entry survives a write of its register");
    tick();
    cm[0] = cq(1, 1); cm_h[0] = hi; cm[1] = cq(1, 2); cm_h[1] = hj;
    tick();
    run1(rq(32'h300, 1, 5, 0, 0, 1, 6), 21, 1, hb, hx);       // r5 not in RB
    lk[0] = rq(32'h300, 1, 5, 0, 0, 1, 6);
    lk[1] = rq(32'h300, 1, 5, 0, 0, 1, 6);
    lk[1].src_inflight = 2'b01;
    #1;
    check(hit[0] && res[0] == 21, "independent entry reused");
    check(!hit[1], "independent operand in flight: not reused");
    clear();
    cm[0] = cq(1, 5);
    tick();
    lk[0] = rq(32'h300, 1, 5, 0, 0, 1, 6);
    #1;
    check(!hit[0], "independent entry invalidated by the write of r5");
    clear();

    // ---------------------------------------------------- 3. checkpoints
    lk[0] = rq(32'h700, 1, 1, 1, 2, 0, 0);                   // branch
    lk[0].ckpt = 1'b1; lk[0].ckpt_id = 3'd2;
    #1;
    tick();
    lk[0] = rq(32'h200, 0, 0, 0, 0, 1, 1);                   // wrong-path R
    #1;
    check(hit[0] && hdl[0] == hr, "wrong-path R reused");
    tick();
    lk[0] = rq(32'h104, 1, 1, 0, 0, 1, 2);
    #1;
    check(!hit[0], "on the wrong path J misses");
    clear();
    restore = 1'b1; restore_id = 2'd2;
    tick();
    lk[0] = rq(32'h104, 1, 1, 0, 0, 1, 2);
    #1;
    check(hit[0] && res[0] == 4, "after the restore J is reused again");
    clear();

    // ---------------------------------------------------- 4. eviction
    run1(rq(32'h800, 0, 0, 0, 0, 1, 10), 7, 1, hb, hp);      // P: r10 <- 7
    run1(rq(32'h804, 1, 10, 0, 0, 1, 11), 8, 1, hb, hq);     // Q: r11 <- r10+1
    evict_until(hp[HW-2:0], c);
    check(c == 1'b1, "evicting a committed current producer converts");
    lk[0] = rq(32'h804, 1, 10, 0, 0, 1, 11);
    #1;
    check(hit[0] && res[0] == 8, "converted dependent still reused");
    clear();
    cm[0] = cq(1, 10);
    tick();
    lk[0] = rq(32'h804, 1, 10, 0, 0, 1, 11);
    #1;
    check(!hit[0], "converted entry now invalidated by a write of r10");
    clear();

    run1(rq(32'h900, 0, 0, 0, 0, 1, 12), 3, 0, hb, hs);      // S, not committed
    run1(rq(32'h904, 1, 12, 0, 0, 1, 13), 5, 0, hb, ht);     // T depends on S
    lk[0] = rq(32'h904, 1, 12, 0, 0, 1, 13);
    #1;
    check(hit[0] && res[0] == 5, "T reusable while S is its producer");
    clear();
    evict_until(hs[HW-2:0], c);
    check(c == 1'b0, "evicting an uncommitted producer does not convert");
    lk[0] = rq(32'h904, 1, 12, 0, 0, 1, 13);
    #1;
    check(!hit[0], "dependent of an evicted producer invalidated");
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
