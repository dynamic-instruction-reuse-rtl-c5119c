// rb_sv: reuse buffer for scheme Sv, where the reuse test compares operand
// values.
//
// Each entry holds part of the PC (tag), the two operand values an earlier
// dynamic instance executed with, its result and, for loads and stores, its
// effective address and a memvalid bit saying that the result field still
// holds the current contents of that address. The buffer is indexed by the
// PC and replaces entries in FIFO order. By default (WAYS = ENTRIES) it is
// fully associative with one FIFO pointer; with fewer WAYS it is set
// associative: PC bits above the word offset select one of ENTRIES/WAYS sets,
// entry index = set * WAYS + way, and each set has its own FIFO pointer. The
// search still compares the full tag of every entry, which gives the same
// answer as searching only the selected set, since an instruction is only
// ever placed in the set its PC selects.
//
// Decode (combinational, LOOKUPS slots per cycle, program order):
//   an entry matches when its tag equals the PC and every register operand of
//   the instruction is known and equal to the stored value. An ALU or control
//   instruction reuses the result (hit). A load or store reuses its address
//   (addr_hit); a load reuses the loaded value only if memvalid is also set
//   (hit). An operand written by an earlier slot of the same group takes that
//   slot's reused result, so a dependent chain up to LOOKUPS long is reused in
//   one cycle; if the earlier slot was not reused, the operand is unknown and
//   the instruction is not reused. An operand whose value is not known at
//   decode also prevents reuse.
//   An instruction that is not reused reserves the next FIFO entry (alloc) at
//   the clock edge and receives a handle {epoch, index}. A store whose address
//   is reused reserves nothing.
// Result write (WRITES ports): after execution the handle, result, address
//   and operand values are written; the entry then takes part in the test.
//   A write whose handle epoch no longer matches (the entry was replaced) is
//   dropped.
// Commit (COMMITS ports): a committing store clears memvalid of every entry
//   whose address is the same 32-bit word; a store that commits while a load
//   entry is still waiting for its value prevents memvalid from being set.
//
// Loads and older stores: memvalid only says that no committed store has
// written the address. A load is therefore not given its value while an
// older store has not committed (st_pending, or a store earlier in the same
// group), and a load whose value was forwarded from an uncommitted store
// (write fwd bit) never sets memvalid.
//
// Follows the document: entry fields, reuse test, store invalidation, FIFO
// fully associative organisation and the 4-way set-associative option,
// 4 lookup, 4 write and 4 invalidation ports per cycle, chained reuse in
// one cycle. Own choices: the filled and epoch
// bits, the st_pending and fwd rules, word-granular address comparison
// and lowest-index priority when several entries match.
module rb_sv
  import rb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LOOKUPS = 4,
  parameter int unsigned WRITES  = 4,
  parameter int unsigned COMMITS = 4,
  parameter int unsigned WAYS    = ENTRIES,
  localparam int unsigned IDXW   = $clog2(ENTRIES),
  localparam int unsigned HW     = IDXW + 1,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned WAYW   = $clog2(WAYS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // decode: reuse test and reservation
  input  lookup_req_t          lk_req      [LOOKUPS],
  output logic                 lk_hit      [LOOKUPS],
  output logic                 lk_addr_hit [LOOKUPS],
  output word_t                lk_result   [LOOKUPS],
  output word_t                lk_address  [LOOKUPS],
  output logic                 lk_alloc    [LOOKUPS],
  output logic [HW-1:0]        lk_handle   [LOOKUPS],
  // execute: result write into the reserved entry
  input  write_req_t           wr_req      [WRITES],
  input  logic [HW-1:0]        wr_handle   [WRITES],
  // commit: store invalidation
  input  commit_req_t          cm_req      [COMMITS]
);

  typedef struct packed {
    logic        occ;       // entry holds an instruction
    logic        filled;    // result written
    logic        epoch;     // FIFO lap in which the entry was reserved
    tag_t        tag;
    logic        memvalid;
    logic        memkill;   // store committed before the load value arrived
    word_t [1:0] opv;
    word_t       address;
    word_t       result;
  } ent_t;

  ent_t          ent_q [ENTRIES];
  ent_t          ent_d [ENTRIES];
  // one FIFO pointer {epoch, way} per set
  logic [WAYW:0] ptr_q [SETS];
  logic [WAYW:0] ptr_d [SETS];

  function automatic int unsigned set_of(input tag_t t);
    return int'({{(32 - TAG_W){1'b0}}, t} % SETS);
  endfunction

  // ---------------------------------------------------------------- decode
  always_comb begin
    logic [WAYW:0]      p [SETS];
    int unsigned        st;
    logic               known [2];
    word_t              val   [2];
    logic               m_any, f_any;
    logic [IDXW-1:0]    m_idx, f_idx;
    logic               match;
    logic               stp;
    logic               hit_l [LOOKUPS];
    word_t              res_l [LOOKUPS];
    for (int k = 0; k < LOOKUPS; k++) begin
      hit_l[k] = 1'b0;
      res_l[k] = '0;
    end
    p = ptr_q;
    for (int k = 0; k < LOOKUPS; k++) begin
      // operand values, forwarded through earlier slots of the group
      for (int j = 0; j < 2; j++) begin
        known[j] = lk_req[k].src_known[j];
        val[j]   = lk_req[k].src_val[j];
        for (int m = 0; m < k; m++) begin
          if (lk_req[m].valid && lk_req[m].has_dest &&
              lk_req[m].dest == lk_req[k].src[j]) begin
            known[j] = hit_l[m];
            val[j]   = res_l[m];
          end
        end
      end
      // a store ahead of a load may change its value until it commits
      stp = lk_req[k].st_pending;
      for (int m = 0; m < k; m++)
        if (lk_req[m].valid && lk_req[m].kind == K_STORE) stp = 1'b1;
      m_any = 1'b0; f_any = 1'b0; m_idx = '0; f_idx = '0;
      for (int e = ENTRIES - 1; e >= 0; e--) begin
        match = ent_q[e].occ && ent_q[e].filled &&
                ent_q[e].tag == pc_tag(lk_req[k].pc) &&
                (!lk_req[k].src_used[0] || (known[0] && ent_q[e].opv[0] == val[0])) &&
                (!lk_req[k].src_used[1] || (known[1] && ent_q[e].opv[1] == val[1]));
        if (match) begin
          m_any = 1'b1; m_idx = IDXW'(e);
          if (lk_req[k].kind != K_LOAD || (ent_q[e].memvalid && !stp)) begin
            f_any = 1'b1; f_idx = IDXW'(e);
          end
        end
      end
      lk_hit[k]      = lk_req[k].valid && f_any && lk_req[k].kind != K_STORE;
      lk_addr_hit[k] = lk_req[k].valid && m_any && lk_req[k].kind != K_ALU;
      lk_result[k]   = ent_q[f_idx].result;
      hit_l[k]       = lk_hit[k];
      res_l[k]       = lk_result[k];
      lk_address[k]  = ent_q[m_idx].address;
      lk_alloc[k]    = lk_req[k].valid && !lk_hit[k] &&
                       !(lk_req[k].kind == K_STORE && lk_addr_hit[k]);
      st             = set_of(pc_tag(lk_req[k].pc));
      lk_handle[k]   = lk_alloc[k] ?
                       {p[st][WAYW], IDXW'(st * WAYS + int'(p[st]) % WAYS)} :
                       {ent_q[f_idx].epoch, f_idx};
      if (lk_alloc[k]) p[st] = p[st] + 1'b1;
    end
    ptr_d = p;
  end

  // ------------------------------------------------------------ next state
  // Written entry by entry: result writes, then store invalidations, then
  // reservations, which replace whatever the entry held.
  for (genvar e = 0; e < ENTRIES; e++) begin : g_next
    always_comb begin
      ent_t n;
      n = ent_q[e];
      for (int w = 0; w < WRITES; w++) begin
        if (wr_req[w].valid && ent_q[e].occ && !ent_q[e].filled &&
            wr_handle[w] == {ent_q[e].epoch, IDXW'(e)}) begin
          n.filled   = 1'b1;
          n.opv      = wr_req[w].src_val;
          n.result   = wr_req[w].result;
          n.address  = wr_req[w].address;
          n.memvalid = wr_req[w].kind == K_LOAD && !wr_req[w].fwd &&
                       !ent_q[e].memkill;
        end
      end
      for (int c = 0; c < COMMITS; c++) begin
        if (cm_req[c].valid && cm_req[c].is_store) begin
          if (n.filled && n.address[XLEN-1:2] == cm_req[c].st_addr[XLEN-1:2])
            n.memvalid = 1'b0;
          if (n.occ && !n.filled)
            n.memkill = 1'b1;
        end
      end
      for (int k = 0; k < LOOKUPS; k++) begin
        if (lk_alloc[k] && lk_handle[k][IDXW-1:0] == IDXW'(e)) begin
          n       = '0;
          n.occ   = 1'b1;
          n.epoch = lk_handle[k][IDXW];
          n.tag   = pc_tag(lk_req[k].pc);
        end
      end
      ent_d[e] = n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < SETS; t++) ptr_q[t] <= '0;
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= '0;
    end else begin
      ptr_q <= ptr_d;
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= ent_d[e];
    end
  end

  initial begin
    assert (ENTRIES == (1 << IDXW)) else $fatal(1, "ENTRIES must be a power of two");
    assert (WAYS == (1 << WAYW) && WAYS <= ENTRIES)
      else $fatal(1, "WAYS must be a power of two no larger than ENTRIES");
    assert (LOOKUPS <= WAYS) else $fatal(1, "LOOKUPS must not exceed WAYS");
  end

endmodule
