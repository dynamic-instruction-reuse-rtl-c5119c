// rb_sn: reuse buffer for scheme Sn, where the reuse test is a valid bit and
// staleness is removed by invalidating on register names.
//
// Each entry holds the PC tag, the architectural register names of the two
// operands, the effective address, the result, a resultvalid bit and a
// memvalid bit. The buffer is fully associative, indexed by the PC, with FIFO
// replacement.
//
// Decode (combinational, LOOKUPS slots per cycle, program order): an entry
// with a matching tag and resultvalid set is reused (hit for ALU and control
// instructions, addr_hit for loads and stores, hit for a load only when
// memvalid is also set). The entry says that the operand registers have not
// been written since the result was computed, so it only speaks for the
// architectural register file: an operand whose newest producer is still in
// flight (src_inflight, or an earlier slot of the same group writes it)
// prevents reuse. An instruction that is not reused reserves the next FIFO
// entry and gets a handle {epoch, index}; a store whose address is reused
// reserves nothing.
// Result write: the execute stage writes result and address with the handle.
// resultvalid is set then, unless the entry was reserved with an in-flight
// operand or was invalidated while waiting (its nv bit): such a result was
// computed from register values that never were, or no longer are, the
// architectural ones.
// Commit: a committing register write clears resultvalid of every entry
// naming that register as an operand; a committing store clears memvalid of
// every entry holding the same 32-bit word address.
//
// Loads and older stores: memvalid only says that no committed store has
// written the address. A load is therefore not given its value while an
// older store has not committed (st_pending, or a store earlier in the same
// group), and a load whose value was forwarded from an uncommitted store
// (write fwd bit) never sets memvalid.
//
// Follows the document: entry fields, valid-bit reuse test, invalidation by
// register name and by store address at commit, FIFO fully associative
// organisation, port counts. Own choices: setting resultvalid when the
// result arrives rather than at reservation, the in-flight rule and nv
// bit, the st_pending and fwd rules, the epoch bit and lowest-index
// priority.
module rb_sn
  import rb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LOOKUPS = 4,
  parameter int unsigned WRITES  = 4,
  parameter int unsigned COMMITS = 4,
  localparam int unsigned IDXW   = $clog2(ENTRIES),
  localparam int unsigned HW     = IDXW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lookup_req_t          lk_req      [LOOKUPS],
  output logic                 lk_hit      [LOOKUPS],
  output logic                 lk_addr_hit [LOOKUPS],
  output word_t                lk_result   [LOOKUPS],
  output word_t                lk_address  [LOOKUPS],
  output logic                 lk_alloc    [LOOKUPS],
  output logic [HW-1:0]        lk_handle   [LOOKUPS],
  input  write_req_t           wr_req      [WRITES],
  input  logic [HW-1:0]        wr_handle   [WRITES],
  input  commit_req_t          cm_req      [COMMITS]
);

  typedef struct packed {
    logic        occ;
    logic        filled;
    logic        rvalid;    // resultvalid
    logic        nv;        // result may never become valid
    logic        epoch;
    tag_t        tag;
    logic [1:0]  used;
    areg_t [1:0] name;
    logic        memvalid;
    logic        memkill;
    word_t       address;
    word_t       result;
  } ent_t;

  ent_t          ent_q [ENTRIES];
  ent_t          ent_d [ENTRIES];
  logic [HW-1:0] ptr_q, ptr_d;
  logic [1:0]    infl  [LOOKUPS];

  // ---------------------------------------------------------------- decode
  always_comb begin
    logic [HW-1:0]   p;
    logic            m_any, f_any;
    logic [IDXW-1:0] m_idx, f_idx;
    logic            match;
    logic            stp;
    p = ptr_q;
    for (int k = 0; k < LOOKUPS; k++) begin
      for (int j = 0; j < 2; j++) begin
        infl[k][j] = lk_req[k].src_inflight[j];
        for (int m = 0; m < k; m++)
          if (lk_req[m].valid && lk_req[m].has_dest && lk_req[m].dest == lk_req[k].src[j])
            infl[k][j] = 1'b1;
      end
      // a store ahead of a load may change its value until it commits
      stp = lk_req[k].st_pending;
      for (int m = 0; m < k; m++)
        if (lk_req[m].valid && lk_req[m].kind == K_STORE) stp = 1'b1;
      m_any = 1'b0; f_any = 1'b0; m_idx = '0; f_idx = '0;
      for (int e = ENTRIES - 1; e >= 0; e--) begin
        match = ent_q[e].occ && ent_q[e].rvalid &&
                ent_q[e].tag == pc_tag(lk_req[k].pc) &&
                !(lk_req[k].src_used[0] && infl[k][0]) &&
                !(lk_req[k].src_used[1] && infl[k][1]);
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
      lk_address[k]  = ent_q[m_idx].address;
      lk_alloc[k]    = lk_req[k].valid && !lk_hit[k] &&
                       !(lk_req[k].kind == K_STORE && lk_addr_hit[k]);
      lk_handle[k]   = lk_alloc[k] ? p : {ent_q[f_idx].epoch, f_idx};
      if (lk_alloc[k]) p = p + 1'b1;
    end
    ptr_d = p;
  end

  // ------------------------------------------------------------ next state
  // Written entry by entry: result writes, then commit invalidations, then
  // reservations, which replace whatever the entry held.
  for (genvar e = 0; e < ENTRIES; e++) begin : g_next
    always_comb begin
      ent_t n;
      n = ent_q[e];
      for (int w = 0; w < WRITES; w++) begin
        if (wr_req[w].valid && ent_q[e].occ && !ent_q[e].filled &&
            wr_handle[w] == {ent_q[e].epoch, IDXW'(e)}) begin
          n.filled   = 1'b1;
          n.rvalid   = !ent_q[e].nv;
          n.result   = wr_req[w].result;
          n.address  = wr_req[w].address;
          n.memvalid = wr_req[w].kind == K_LOAD && !wr_req[w].fwd &&
                       !ent_q[e].memkill;
        end
      end
      for (int c = 0; c < COMMITS; c++) begin
        if (cm_req[c].valid && cm_req[c].has_dest &&
            ((n.used[0] && n.name[0] == cm_req[c].dest) ||
             (n.used[1] && n.name[1] == cm_req[c].dest))) begin
          n.rvalid = 1'b0;
          n.nv     = 1'b1;
        end
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
          n.used  = lk_req[k].src_used;
          n.name  = lk_req[k].src;
          n.nv    = (lk_req[k].src_used[0] && infl[k][0]) ||
                           (lk_req[k].src_used[1] && infl[k][1]);
        end
      end
      ent_d[e] = n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= '0;
    end else begin
      ptr_q <= ptr_d;
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= ent_d[e];
    end
  end

  initial begin
    assert (ENTRIES == (1 << IDXW)) else $fatal(1, "ENTRIES must be a power of two");
    assert (LOOKUPS <= ENTRIES) else $fatal(1, "LOOKUPS must not exceed ENTRIES");
  end

endmodule
