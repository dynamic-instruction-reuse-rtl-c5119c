// tb_rb_sv: directed test of the scheme Sv reuse buffer (8 entries, so that
// FIFO replacement is reached quickly).
//
// 1. The chain I: r1<-0, J: r2<-r1+4, K: r3<-r1+r2 is executed, r1 is then
//    overwritten with 4, and the chain is presented again in one decode
//    group: all three must be reused in that cycle, J and K through the
//    values forwarded from the reused I and J.
// 2. Different or unknown operand values prevent reuse.
// 3. A load is reused with its value; a pending older store or a committed
//    store to the same word leaves only the address reusable; a store to
//    another word does not; a forwarded load value is never marked valid.
// 4. A store reuses its address and reserves nothing.
// 5. Nine reservations replace the oldest entry; a late write carrying the
//    replaced entry's handle is dropped.
// 6. A second buffer, 16 entries as 4 sets of 4 ways: reservations land in
//    the set selected by PC bits 3:2, each set has its own FIFO order, and
//    twenty reservations in one set replace only that set's entries.
`timescale 1ns/1ps
module tb_rb_sv;
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

  rb_sv #(.ENTRIES(N), .LOOKUPS(L), .WRITES(L), .COMMITS(L)) dut (
    .clk, .rst_n,
    .lk_req (lk), .lk_hit (hit), .lk_addr_hit (ahit), .lk_result (res),
    .lk_address (adr), .lk_alloc (alloc), .lk_handle (hdl),
    .wr_req (wr), .wr_handle (wr_h), .cm_req (cm)
  );

  // set-associative buffer with its own ports
  localparam int unsigned N2  = 16;
  localparam int unsigned HW2 = $clog2(N2) + 1;
  lookup_req_t    lk2   [L];
  logic           hit2  [L], ahit2 [L], alloc2 [L];
  word_t          res2  [L], adr2  [L];
  logic [HW2-1:0] hdl2  [L];
  write_req_t     wr2   [L];
  logic [HW2-1:0] wr_h2 [L];
  commit_req_t    cm2   [L];

  rb_sv #(.ENTRIES(N2), .LOOKUPS(L), .WRITES(L), .COMMITS(L), .WAYS(4)) dut_sa (
    .clk, .rst_n,
    .lk_req (lk2), .lk_hit (hit2), .lk_addr_hit (ahit2), .lk_result (res2),
    .lk_address (adr2), .lk_alloc (alloc2), .lk_handle (hdl2),
    .wr_req (wr2), .wr_handle (wr_h2), .cm_req (cm2)
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
      bit u0, int s0, word_t v0, bit u1, int s1, word_t v1, bit hd, int d);
    lookup_req_t q;
    q = '0;
    q.valid = 1'b1; q.pc = pc; q.kind = kd;
    q.src_used = {u1, u0}; q.src[0] = areg_t'(s0); q.src[1] = areg_t'(s1);
    q.src_val[0] = v0; q.src_val[1] = v1; q.src_known = 2'b11;
    q.has_dest = hd; q.dest = areg_t'(d);
    return q;
  endfunction

  function automatic write_req_t wq(kind_e kd, word_t r, word_t a, word_t v0, word_t v1);
    write_req_t w;
    w = '0; w.valid = 1'b1; w.kind = kd; w.result = r; w.address = a;
    w.src_val[0] = v0; w.src_val[1] = v1;
    return w;
  endfunction

  task automatic clear();
    for (int k = 0; k < L; k++) begin
      lk[k] = '0; wr[k] = '0; wr_h[k] = '0; cm[k] = '0;
      lk2[k] = '0; wr2[k] = '0; wr_h2[k] = '0; cm2[k] = '0;
    end
  endtask

  // end the current cycle and start the next one with idle ports
  task automatic tick();
    @(posedge clk); #1; clear();
  endtask

  logic [HW-1:0] h [8];
  logic [HW2-1:0] ha, hb;

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;

    // ---------------------------------------------------- 1. I, J, K chain
    lk[0] = rq(32'h100, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    lk[1] = rq(32'h104, K_ALU, 1, 1, 0, 0, 0, 0, 1, 2);
    lk[2] = rq(32'h108, K_ALU, 1, 1, 0, 1, 2, 0, 1, 3);
    #1;
    check(!hit[0] && !hit[1] && !hit[2], "empty buffer reuses nothing");
    check(alloc[0] && alloc[1] && alloc[2], "three reservations");
    check(hdl[0] == 0 && hdl[1] == 1 && hdl[2] == 2, "FIFO order of handles");
    h[0] = hdl[0]; h[1] = hdl[1]; h[2] = hdl[2];
    tick();
    wr[0] = wq(K_ALU, 0, 0, 0, 0); wr_h[0] = h[0];
    wr[1] = wq(K_ALU, 4, 0, 0, 0); wr_h[1] = h[1];
    wr[2] = wq(K_ALU, 4, 0, 0, 4); wr_h[2] = h[2];
    tick();
    lk[0] = rq(32'h200, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);   // R: r1 <- 4
    #1; h[3] = hdl[0];
    tick();
    wr[0] = wq(K_ALU, 4, 0, 0, 0); wr_h[0] = h[3];
    tick();
    // I2, J2, K2 with the register file holding r1=4, r2=4, r3=4
    lk[0] = rq(32'h100, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    lk[1] = rq(32'h104, K_ALU, 1, 1, 4, 0, 0, 0, 1, 2);
    lk[2] = rq(32'h108, K_ALU, 1, 1, 4, 1, 2, 4, 1, 3);
    #1;
    check(hit[0] && res[0] == 0, "I2 reused");
    check(hit[1] && res[1] == 4, "J2 reused through forwarded r1");
    check(hit[2] && res[2] == 4, "K2 reused through forwarded r1, r2");
    check(!alloc[0] && !alloc[1] && !alloc[2], "reused instructions reserve nothing");
    tick();

    // ---------------------------------------------------- 2. operand values
    lk[0] = rq(32'h104, K_ALU, 1, 1, 4, 0, 0, 0, 1, 2);    // r1 = 4 now
    lk[0].src_known = 2'b00;
    lk[1] = rq(32'h104, K_ALU, 1, 9, 4, 0, 0, 0, 1, 2);
    #1;
    check(!hit[0], "unknown operand is not reused");
    check(!hit[1] && alloc[1], "different operand value misses and reserves");
    tick();

    // ---------------------------------------------------- 3. loads
    clear();
    lk[0] = rq(32'h300, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 5);
    lk[1] = rq(32'h304, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 6);
    lk[2] = rq(32'h308, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 7);
    #1; h[4] = hdl[0]; h[5] = hdl[1]; h[6] = hdl[2];
    check(!ahit[0] && alloc[0], "first load misses");
    tick();
    wr[0] = wq(K_LOAD, 77, 32'h1008, 32'h1000, 0); wr_h[0] = h[4];
    wr[1] = wq(K_LOAD, 88, 32'h100c, 32'h1000, 0); wr_h[1] = h[5];
    wr[2] = wq(K_LOAD, 99, 32'h1010, 32'h1000, 0); wr_h[2] = h[6];
    wr[2].fwd = 1'b1;
    tick();
    lk[0] = rq(32'h300, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 5);
    lk[1] = rq(32'h300, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 5);
    lk[1].st_pending = 1'b1;
    lk[2] = rq(32'h308, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 7);
    #1;
    check(hit[0] && res[0] == 77 && ahit[0] && adr[0] == 32'h1008, "load value reused");
    check(!hit[1] && ahit[1] && adr[1] == 32'h1008, "pending store: address only");
    check(!hit[2] && ahit[2] && adr[2] == 32'h1010, "forwarded value not reusable");
    lk[1] = '0; lk[2] = '0;
    tick();
    cm[0].valid = 1'b1; cm[0].is_store = 1'b1; cm[0].st_addr = 32'h100a;  // same word
    tick();
    lk[0] = rq(32'h300, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 5);
    lk[1] = rq(32'h304, K_LOAD, 1, 4, 32'h1000, 0, 0, 0, 1, 6);
    #1;
    check(!hit[0] && ahit[0] && alloc[0], "store invalidated the load value");
    check(hit[1] && res[1] == 88, "store to another word leaves the load valid");
    lk[0] = '0; lk[1] = '0;
    tick();

    // ---------------------------------------------------- 4. store address
    lk[0] = rq(32'h400, K_STORE, 1, 4, 32'h2000, 0, 0, 0, 0, 0);
    #1; h[7] = hdl[0];
    check(alloc[0] && !hit[0], "first store reserves");
    tick();
    wr[0] = wq(K_STORE, 0, 32'h2004, 32'h2000, 0); wr_h[0] = h[7];
    tick();
    lk[0] = rq(32'h400, K_STORE, 1, 4, 32'h2000, 0, 0, 0, 0, 0);
    #1;
    check(ahit[0] && adr[0] == 32'h2004 && !hit[0] && !alloc[0], "store address reused");
    tick();

    // ---------------------------------------------------- 5. replacement
    // 8 entries: eight new reservations take over every entry, including the
    // one of I. The first of them (pc 0x600) is itself replaced by the ninth.
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < L; k++)
        lk[k] = rq(32'h600 + 32'(16 * c + 4 * k), K_ALU, 0, 0, 0, 0, 0, 0, 1, 9);
      #1;
      if (c == 0) h[0] = hdl[0];
      tick();
    end
    lk[0] = rq(32'h100, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    #1;
    check(!hit[0] && alloc[0], "replaced entry no longer reused");
    h[1] = hdl[0];
    tick();
    // stale write with the handle of an instruction whose entry was replaced
    wr[0] = wq(K_ALU, 123, 0, 0, 0); wr_h[0] = h[0];
    tick();
    lk[0] = rq(32'h600, K_ALU, 0, 0, 0, 0, 0, 0, 1, 9);
    #1;
    check(!hit[0], "write with a stale handle dropped");
    lk[0] = '0;
    tick();
    wr[0] = wq(K_ALU, 5, 0, 0, 0); wr_h[0] = h[1];
    tick();
    lk[0] = rq(32'h100, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    #1;
    check(hit[0] && res[0] == 5, "re-inserted instruction reused");
    tick();

    // ---------------------------------------------------- 6. set associative
    lk2[0] = rq(32'h700, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);   // set 0
    lk2[1] = rq(32'h704, K_ALU, 0, 0, 0, 0, 0, 0, 1, 2);   // set 1
    #1;
    check(alloc2[0] && hdl2[0] == HW2'(0), "set 0, way 0");
    check(alloc2[1] && hdl2[1] == HW2'(4), "set 1, way 0");
    ha = hdl2[0]; hb = hdl2[1];
    tick();
    wr2[0] = wq(K_ALU, 11, 0, 0, 0); wr_h2[0] = ha;
    wr2[1] = wq(K_ALU, 22, 0, 0, 0); wr_h2[1] = hb;
    tick();
    lk2[0] = rq(32'h700, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    lk2[1] = rq(32'h704, K_ALU, 0, 0, 0, 0, 0, 0, 1, 2);
    #1;
    check(hit2[0] && res2[0] == 11 && hit2[1] && res2[1] == 22, "both sets reused");
    tick();
    // five groups of four new set-0 instructions
    for (int c = 0; c < 5; c++) begin
      for (int k = 0; k < L; k++)
        lk2[k] = rq(32'h900 + 32'(64 * c + 16 * k), K_ALU, 0, 0, 0, 0, 0, 0, 1, 3);
      #1;
      if (c == 0)
        check(hdl2[0] == HW2'(1) && hdl2[1] == HW2'(2) && hdl2[2] == HW2'(3) &&
              hdl2[3] == HW2'(16), "set 0 FIFO order, next lap");
      tick();
    end
    lk2[0] = rq(32'h700, K_ALU, 0, 0, 0, 0, 0, 0, 1, 1);
    lk2[1] = rq(32'h704, K_ALU, 0, 0, 0, 0, 0, 0, 1, 2);
    #1;
    check(!hit2[0], "set 0 entry replaced by its own set");
    check(hit2[1] && res2[1] == 22, "set 1 entry kept after 20 reservations");
    check(alloc2[0] && hdl2[0][1:0] == 2'(1) && hdl2[0][3:2] == 2'(0),
          "set 0 pointer continues at way 1");
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
