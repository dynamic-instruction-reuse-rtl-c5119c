// rb_snd: reuse buffer for scheme Sn+d, which adds dependence links between
// buffer entries to scheme Sn, so that a whole chain of dependent
// instructions is reused together.
//
// Each entry holds what an Sn entry holds plus, per operand, a src-index:
// the buffer index of the entry that produced that operand, or invalid when
// the producer was not in the buffer. An operand with a valid src-index is a
// dependent operand; one without is an independent operand. The Register
// Source Table (rb_rst) gives, for every architectural register, the entry
// of its newest producer.
//
// Decode (combinational, LOOKUPS slots per cycle, program order). A working
// copy of the RST is carried from slot to slot, as a rename map is:
//   reuse test: the tag matches, resultvalid is set (and memvalid for the
//     value of a load), every dependent operand's src-index equals the
//     current RST entry of that register, and no independent operand has a
//     producer still in flight (src_inflight, or an earlier slot of the group
//     writes it). A chain I, J, K whose head is reused is therefore reused in
//     the same cycle: reusing I points the working RST at I's entry, which is
//     exactly J's src-index.
//   reservation: an instruction that is not reused takes the next FIFO entry;
//     its src-indexes are read from the working RST. Replacing the previous
//     occupant E (an eviction) clears working-RST pointers to E and is
//     reported to rb_rst, which scrubs its checkpoints.
//   RST update: a reused instruction points its destination at the entry it
//     reused, a reserved one at its new entry.
//   Entries reserved earlier in the same cycle are never taken as sources or
//     candidates with their old meaning.
// Result write: as in Sn; resultvalid is set unless an independent operand was
// in flight at reservation or the entry was invalidated while waiting.
// Commit: a register write clears resultvalid only of entries that use that
// register as an independent operand; a store clears memvalid of matching
// addresses; the committing handle marks the RST entry committed.
// Eviction of E: entries depending on E are invalidated, except when E is the
// committed newest producer of its register: its dependents then become
// independent on that operand, since the register file now holds E's value.
//
// Loads and older stores: memvalid only says that no committed store has
// written the address. A load is therefore not given its value while an
// older store has not committed (st_pending, or a store earlier in the same
// group), and a load whose value was forwarded from an uncommitted store
// (write fwd bit) never sets memvalid.
//
// Follows the document: entry fields including src-index, the RST and its
// checkpoints, the reuse test for independent and dependent instructions,
// selective invalidation, invalidation on eviction with the current-producer
// optimisation, same-cycle chain reuse. Own choices: per-operand treatment of
// mixed entries, the in-flight rule and nv bit, the committed condition on the
// eviction optimisation, the st_pending and fwd rules, epoch bits and
// lowest-index priority.
module rb_snd
  import rb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LOOKUPS = 4,
  parameter int unsigned WRITES  = 4,
  parameter int unsigned COMMITS = 4,
  parameter int unsigned CKPTS   = MAX_CKPTS,
  localparam int unsigned IDXW   = $clog2(ENTRIES),
  localparam int unsigned HW     = IDXW + 1,
  localparam int unsigned EW     = HW + 2,
  localparam int unsigned CW     = $clog2(CKPTS)
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
  input  commit_req_t          cm_req      [COMMITS],
  input  logic [HW-1:0]        cm_handle   [COMMITS],
  // branch misprediction: reload the RST from a checkpoint (no decode then)
  input  logic                 restore,
  input  logic [CW-1:0]        restore_id,
  // eviction that turned dependents independent (event count, for testing)
  output logic [LOOKUPS-1:0]   ev_converted
);

  localparam int unsigned V_BIT = EW - 1;
  localparam int unsigned C_BIT = EW - 2;

  typedef logic [NUM_AREGS-1:0][EW-1:0] map_t;

  typedef struct packed {
    logic                  occ;
    logic                  filled;
    logic                  rvalid;
    logic                  nv;
    logic                  epoch;
    tag_t                  tag;
    logic [1:0]            used;
    areg_t [1:0]           name;
    logic [1:0]            sv;      // src-index valid
    logic [1:0][IDXW-1:0]  sidx;    // src-index
    logic                  has_dest;
    areg_t                 dest;
    logic                  memvalid;
    logic                  memkill;
    word_t                 address;
    word_t                 result;
  } ent_t;

  ent_t            ent_q [ENTRIES];
  ent_t            ent_d [ENTRIES];
  logic [HW-1:0]   ptr_q, ptr_d;

  map_t            rst_map;
  map_t            map_next;
  map_t            ckpt_map  [LOOKUPS];
  logic            ckpt_take [LOOKUPS];
  logic [CW-1:0]   ckpt_id   [LOOKUPS];
  logic            ev_valid  [LOOKUPS];
  logic [IDXW-1:0] ev_idx    [LOOKUPS];
  logic            ev_conv   [LOOKUPS];
  logic [1:0]      new_sv    [LOOKUPS];
  logic [1:0][IDXW-1:0] new_sidx [LOOKUPS];
  logic            new_nv    [LOOKUPS];
  logic            cm_valid  [COMMITS];
  areg_t           cm_reg    [COMMITS];

  // Reservations of one cycle take consecutive FIFO entries from ptr_q on,
  // so entry x was reserved by an earlier slot of the group when its
  // distance from ptr_q is below the number of reservations so far.
  function automatic logic taken(input logic [IDXW-1:0] x,
                                 input logic [IDXW-1:0] base,
                                 input logic [HW-1:0]   cnt);
    logic [IDXW-1:0] d;
    d = x - base;
    return {1'b0, d} < cnt;
  endfunction

  // ---------------------------------------------------------------- decode
  always_comb begin
    map_t            v;
    logic [HW-1:0]   p;
    logic [HW-1:0]   cnt;              // entries reserved by earlier slots
    logic [1:0]      infl;
    logic [1:0]      ov;
    logic [1:0][IDXW-1:0] oidx;
    logic            m_any, f_any;
    logic [IDXW-1:0] m_idx, f_idx, vic;
    logic            match, dep_ok;
    logic            stp;
    v     = rst_map;
    p     = ptr_q;
    for (int k = 0; k < LOOKUPS; k++) begin
      for (int j = 0; j < 2; j++) begin
        infl[j] = lk_req[k].src_inflight[j];
        for (int m = 0; m < k; m++)
          if (lk_req[m].valid && lk_req[m].has_dest && lk_req[m].dest == lk_req[k].src[j])
            infl[j] = 1'b1;
        ov[j]   = lk_req[k].src_used[j] && v[lk_req[k].src[j]][V_BIT];
        oidx[j] = v[lk_req[k].src[j]][IDXW-1:0];
      end
      // a store ahead of a load may change its value until it commits
      stp = lk_req[k].st_pending;
      for (int m = 0; m < k; m++)
        if (lk_req[m].valid && lk_req[m].kind == K_STORE) stp = 1'b1;
      m_any = 1'b0; f_any = 1'b0; m_idx = '0; f_idx = '0;
      cnt = p - ptr_q;
      for (int e = ENTRIES - 1; e >= 0; e--) begin
        dep_ok = 1'b1;
        for (int j = 0; j < 2; j++) begin
          if (lk_req[k].src_used[j]) begin
            if (ent_q[e].sv[j])
              dep_ok = dep_ok && ov[j] && oidx[j] == ent_q[e].sidx[j] &&
                       !taken(ent_q[e].sidx[j], ptr_q[IDXW-1:0], cnt);
            else
              dep_ok = dep_ok && !infl[j];
          end
        end
        match = ent_q[e].occ && ent_q[e].rvalid &&
                !taken(IDXW'(e), ptr_q[IDXW-1:0], cnt) &&
                ent_q[e].tag == pc_tag(lk_req[k].pc) && dep_ok;
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

      // reservation and eviction of the previous occupant
      vic         = p[IDXW-1:0];
      ev_valid[k] = lk_alloc[k] && ent_q[vic].occ;
      ev_idx[k]   = vic;
      ev_conv[k]  = ev_valid[k] && ent_q[vic].has_dest &&
                    v[ent_q[vic].dest][V_BIT] && v[ent_q[vic].dest][C_BIT] &&
                    v[ent_q[vic].dest][HW-1:0] == {ent_q[vic].epoch, vic};
      if (lk_alloc[k]) begin
        for (int r = 0; r < NUM_AREGS; r++)
          if (v[r][IDXW-1:0] == vic) v[r][V_BIT] = 1'b0;
      end
      new_nv[k] = 1'b0;
      for (int j = 0; j < 2; j++) begin
        new_sv[k][j]   = lk_req[k].src_used[j] && v[lk_req[k].src[j]][V_BIT];
        new_sidx[k][j] = v[lk_req[k].src[j]][IDXW-1:0];
        if (lk_req[k].src_used[j] && !new_sv[k][j] && infl[j]) new_nv[k] = 1'b1;
      end
      // RST update for the destination
      if (lk_req[k].valid && lk_req[k].has_dest)
        v[lk_req[k].dest] = {lk_hit[k] || lk_alloc[k], 1'b0, lk_handle[k]};
      ckpt_take[k] = lk_req[k].valid && lk_req[k].ckpt;
      ckpt_id[k]   = lk_req[k].ckpt_id[CW-1:0];
      ckpt_map[k]  = v;
      if (lk_alloc[k]) p = p + 1'b1;
    end
    map_next = v;
    ptr_d    = p;
  end

  always_comb
    for (int k = 0; k < LOOKUPS; k++) ev_converted[k] = ev_conv[k];

  // ------------------------------------------------------------ next state
  // Written entry by entry: result writes, commit invalidations, then for
  // each slot in order the eviction scan and the reservation, so that an
  // eviction also reaches an entry reserved earlier in the same cycle.
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
        if (cm_req[c].valid && cm_req[c].has_dest) begin
          for (int j = 0; j < 2; j++) begin
            if (n.used[j] && !n.sv[j] && n.name[j] == cm_req[c].dest) begin
              n.rvalid = 1'b0;
              n.nv     = 1'b1;
            end
          end
        end
        if (cm_req[c].valid && cm_req[c].is_store) begin
          if (n.filled && n.address[XLEN-1:2] == cm_req[c].st_addr[XLEN-1:2])
            n.memvalid = 1'b0;
          if (n.occ && !n.filled)
            n.memkill = 1'b1;
        end
      end
      for (int k = 0; k < LOOKUPS; k++) begin
        if (ev_valid[k]) begin
          for (int j = 0; j < 2; j++) begin
            if (n.sv[j] && n.sidx[j] == ev_idx[k]) begin
              n.sv[j] = 1'b0;
              if (!ev_conv[k]) begin
                n.rvalid = 1'b0;
                n.nv     = 1'b1;
              end
            end
          end
        end
        if (lk_alloc[k] && lk_handle[k][IDXW-1:0] == IDXW'(e)) begin
          n          = '0;
          n.occ      = 1'b1;
          n.epoch    = lk_handle[k][IDXW];
          n.tag      = pc_tag(lk_req[k].pc);
          n.used     = lk_req[k].src_used;
          n.name     = lk_req[k].src;
          n.sv       = new_sv[k];
          n.sidx     = new_sidx[k];
          n.nv       = new_nv[k];
          n.has_dest = lk_req[k].has_dest;
          n.dest     = lk_req[k].dest;
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

  // ------------------------------------------------------------------- RST
  always_comb
    for (int c = 0; c < COMMITS; c++) begin
      cm_valid[c] = cm_req[c].valid && cm_req[c].has_dest;
      cm_reg[c]   = cm_req[c].dest;
    end

  rb_rst #(
    .ENTRIES (ENTRIES),
    .LOOKUPS (LOOKUPS),
    .COMMITS (COMMITS),
    .CKPTS   (CKPTS)
  ) u_rst (
    .clk        (clk),
    .rst_n      (rst_n),
    .map_q      (rst_map),
    .upd_en     (!restore),
    .map_next   (map_next),
    .ckpt_take  (ckpt_take),
    .ckpt_id    (ckpt_id),
    .ckpt_map   (ckpt_map),
    .restore    (restore),
    .restore_id (restore_id),
    .ev_valid   (ev_valid),
    .ev_idx     (ev_idx),
    .cm_valid   (cm_valid),
    .cm_reg     (cm_reg),
    .cm_handle  (cm_handle)
  );

  initial begin
    assert (ENTRIES == (1 << IDXW)) else $fatal(1, "ENTRIES must be a power of two");
    assert (LOOKUPS <= ENTRIES) else $fatal(1, "LOOKUPS must not exceed ENTRIES");
  end

  logic any_lookup;
  always_comb begin
    any_lookup = 1'b0;
    for (int k = 0; k < LOOKUPS; k++) any_lookup = any_lookup || lk_req[k].valid;
  end

  a_no_decode_on_restore: assert property (@(posedge clk) disable iff (!rst_n)
    restore |-> !any_lookup);

endmodule
