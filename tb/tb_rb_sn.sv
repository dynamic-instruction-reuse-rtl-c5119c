// tb_rb_sn: directed test of the scheme Sn reuse buffer (8 entries).
//
// 1. The chain I: r1<-0, J: r2<-r1+4, K: r3<-r1+r2 executes and commits one
//    instruction at a time; the instruction R: r1<-4 commits and must
//    invalidate J and K (they name r1). Presented again, only I is reused.
// 2. An operand whose producer is in flight, or is written by an earlier slot
//    of the same group, prevents reuse; an entry reserved in that state never
//    becomes valid.
// 3. A register write invalidates only entries that name that register.
// 4. Loads: value reuse, pending store, store invalidation by word.
// 5. A store reuses its address.
`timescale 1ns/1ps
module tb_rb_sn;
  import rb_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned L  = 4;
  localparam int unsigned HW = $clog2(N) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  lookup_req_t   lk   [L];
  logic          hit  [L], ahit [L], alloc [L];
  word_t         res  [L], adr  [L];
  logic [HW-1:0] hdl  [L];
  write_req_t    wr   [L];
  logic [HW-1:0] wr_h [L];
  commit_req_t   cm   [L];

  rb_sn #(.ENTRIES(N), .LOOKUPS(L), .WRITES(L), .COMMITS(L)) dut (
    .clk, .rst_n,
    .lk_req (lk), .lk_hit (hit), .lk_addr_hit (ahit), .lk_result (res),
    .lk_address (adr), .lk_alloc (alloc), .lk_handle (hdl),
    .wr_req (wr), .wr_handle (wr_h), .cm_req (cm)
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

  function automatic lookup_req_t rq(logic [31:0] pc, kind_e kd,
      bit u0, int s0, bit u1, int s1, bit hd, int d);
    lookup_req_t q;
    q = '0;
    q.valid = 1'b1; q.pc = pc; q.kind = kd;
    q.src_used = {u1, u0}; q.src[0] = areg_t'(s0); q.src[1] = areg_t'(s1);
    q.has_dest = hd; q.dest = areg_t'(d);
    return q;
  endfunction

  function automatic write_req_t wq(kind_e kd, word_t r, word_t a);
    write_req_t w;
    w = '0; w.valid = 1'b1; w.kind = kd; w.result = r; w.address = a;
    return w;
  endfunction

  function automatic commit_req_t cq(bit hd, int d, bit st, word_t a);
    commit_req_t c;
    c = '0; c.valid = 1'b1; c.has_dest = hd; c.dest = areg_t'(d);
    c.is_store = st; c.st_addr = a;
    return c;
  endfunction

  task automatic clear();
    for (int k = 0; k < L; k++) begin
      lk[k] = '0; wr[k] = '0; wr_h[k] = '0; cm[k] = '0;
    end
  endtask

  task automatic tick();
    @(posedge clk); #1; clear();
  endtask

  // decode one instruction, then write its result and commit it
  task automatic run1(input lookup_req_t q, input word_t r, input word_t a,
                      output logic was_hit, output word_t got);
    logic [HW-1:0] h;
    lk[0] = q;
    #1;
    was_hit = hit[0]; got = res[0];
    h = hdl[0];
    tick();
    if (!was_hit) begin
      wr[0] = wq(q.kind, r, a); wr_h[0] = h;
    end
    cm[0] = cq(q.has_dest, int'(q.dest), q.kind == K_STORE, a);
    tick();
  endtask

  logic  hb;
  word_t rv;
  logic [HW-1:0] hh;

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;

    // ---------------------------------------------------- 1. Figure 5(a)
    run1(rq(32'h100, K_ALU, 0, 0, 0, 0, 1, 1), 0, 0, hb, rv);
    check(!hb, "I1 new");
    run1(rq(32'h104, K_ALU, 1, 1, 0, 0, 1, 2), 4, 0, hb, rv);
    run1(rq(32'h108, K_ALU, 1, 1, 1, 2, 1, 3), 4, 0, hb, rv);
    lk[0] = rq(32'h104, K_ALU, 1, 1, 0, 0, 1, 2);
    lk[1] = rq(32'h108, K_ALU, 1, 1, 1, 2, 1, 3);
    #1;
    check(hit[0] && res[0] == 4, "J reusable before R");
    check(!hit[1], "K not reused: r2 written by the earlier slot");
    clear();
    run1(rq(32'h200, K_ALU, 0, 0, 0, 0, 1, 1), 4, 0, hb, rv);   // R: r1 <- 4
    lk[0] = rq(32'h100, K_ALU, 0, 0, 0, 0, 1, 1);
    #1;
    check(hit[0] && res[0] == 0, "I2 reused");
    clear();
    lk[0] = rq(32'h104, K_ALU, 1, 1, 0, 0, 1, 2);
    lk[1] = rq(32'h210, K_ALU, 1, 1, 0, 0, 1, 9);
    lk[1].pc = 32'h108; lk[1].src_used = 2'b11; lk[1].src[1] = areg_t'(2); lk[1].dest = areg_t'(3);
    #1;
    check(!hit[0], "J2 invalidated by the write of r1");
    check(!hit[1], "K2 invalidated by the write of r1");
    tick();

    // ---------------------------------------------------- 2. in flight
    lk[0] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    lk[0].src_inflight = 2'b01;
    #1;
    check(alloc[0] && !hit[0], "in-flight operand: reserved, not reused");
    hh = hdl[0];
    tick();
    wr[0] = wq(K_ALU, 11, 0); wr_h[0] = hh;
    cm[0] = cq(1, 6, 0, 0);
    tick();
    lk[0] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    #1;
    check(!hit[0], "entry reserved with an in-flight operand never valid");
    hh = hdl[0];
    tick();
    wr[0] = wq(K_ALU, 12, 0); wr_h[0] = hh;
    cm[0] = cq(1, 6, 0, 0);
    tick();
    lk[0] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    lk[1] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    lk[1].src_inflight = 2'b01;
    #1;
    check(hit[0] && res[0] == 12, "architectural operand: reused");
    check(!hit[1], "same entry, operand in flight: not reused");
    clear();

    // ---------------------------------------------------- 3. selective
    cm[0] = cq(1, 7, 0, 0);                  // write of r7: nothing names it
    tick();
    lk[0] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    #1;
    check(hit[0], "write of an unrelated register leaves the entry valid");
    clear();
    cm[0] = cq(1, 5, 0, 0);
    tick();
    lk[0] = rq(32'h300, K_ALU, 1, 5, 0, 0, 1, 6);
    #1;
    check(!hit[0], "write of the operand register invalidates");
    tick();

    // ---------------------------------------------------- 4. loads
    run1(rq(32'h400, K_LOAD, 1, 8, 0, 0, 1, 4), 55, 32'h1020, hb, rv);
    lk[0] = rq(32'h400, K_LOAD, 1, 8, 0, 0, 1, 4);
    lk[1] = rq(32'h400, K_LOAD, 1, 8, 0, 0, 1, 4);
    lk[1].st_pending = 1'b1;
    #1;
    check(hit[0] && res[0] == 55 && adr[0] == 32'h1020, "load value reused");
    check(!hit[1] && ahit[1], "pending store: address only");
    clear();
    cm[0] = cq(0, 0, 1, 32'h1024);           // neighbouring word
    tick();
    lk[0] = rq(32'h400, K_LOAD, 1, 8, 0, 0, 1, 4);
    #1;
    check(hit[0], "store to another word leaves the value");
    clear();
    cm[0] = cq(0, 0, 1, 32'h1022);
    tick();
    lk[0] = rq(32'h400, K_LOAD, 1, 8, 0, 0, 1, 4);
    #1;
    check(!hit[0] && ahit[0] && alloc[0], "store to the word invalidates the value");
    tick();

    // ---------------------------------------------------- 5. store address
    run1(rq(32'h500, K_STORE, 1, 8, 0, 0, 0, 0), 0, 32'h1030, hb, rv);
    lk[0] = rq(32'h500, K_STORE, 1, 8, 0, 0, 0, 0);
    #1;
    check(ahit[0] && adr[0] == 32'h1030 && !alloc[0] && !hit[0], "store address reused");
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
