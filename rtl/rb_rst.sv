// rb_rst: Register Source Table (RST) of scheme Sn+d, with checkpoints.
//
// The RST has one entry per architectural register: {valid, committed,
// handle}. handle names the reuse buffer entry ({epoch, index}) that holds,
// or will hold, the newest value of that register; valid is clear when that
// producer is not in the buffer. committed says the producer has left the
// machine, so the register file already holds its value.
//
// The table is updated speculatively at decode. Which entries a decode group
// changes, with the forwarding between the instructions of one group, is
// worked out by the reuse buffer (rb_snd) and arrives here as a whole new map
// (upd_en, map_next). Like a rename map, the RST is copied into one of CKPTS
// checkpoints when a branch is predicted (ckpt_take for the slot holding the
// branch; the copy is the map as it stands after that slot) and is reloaded
// from it when the prediction turns out wrong (restore). Two things keep the
// copies honest while they wait:
//   - a buffer entry that is replaced (ev_valid, ev_idx) is no longer the
//     producer of anything: pointers to it are cleared in every checkpoint,
//     including one taken earlier in the same cycle;
//   - a committing instruction (cm_valid, cm_reg, cm_handle) sets committed
//     wherever its register still points to it, in the live map and in the
//     checkpoints.
// Timing: all updates land at the clock edge; map_q is the registered map.
// restore takes precedence over, and must not coincide with, a decode update.
//
// Follows the document: one entry per architectural register holding the RB
// index of the latest producer or invalid, checkpoint and repair on
// speculation, 8 unresolved branches. Own choices: the committed bit (used
// for the eviction optimisation of rb_snd), the epoch bit in the pointer and
// the scrubbing of checkpoints on eviction.
module rb_rst
  import rb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LOOKUPS = 4,
  parameter int unsigned COMMITS = 4,
  parameter int unsigned CKPTS   = MAX_CKPTS,
  localparam int unsigned IDXW   = $clog2(ENTRIES),
  localparam int unsigned HW     = IDXW + 1,
  localparam int unsigned EW     = HW + 2,       // {valid, committed, handle}
  localparam int unsigned CW     = $clog2(CKPTS)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  output logic [NUM_AREGS-1:0][EW-1:0]     map_q,
  input  logic                             upd_en,
  input  logic [NUM_AREGS-1:0][EW-1:0]     map_next,
  input  logic                             ckpt_take [LOOKUPS],
  input  logic [CW-1:0]                    ckpt_id   [LOOKUPS],
  input  logic [NUM_AREGS-1:0][EW-1:0]     ckpt_map  [LOOKUPS],
  input  logic                             restore,
  input  logic [CW-1:0]                    restore_id,
  input  logic                             ev_valid  [LOOKUPS],
  input  logic [IDXW-1:0]                  ev_idx    [LOOKUPS],
  input  logic                             cm_valid  [COMMITS],
  input  areg_t                            cm_reg    [COMMITS],
  input  logic [HW-1:0]                    cm_handle [COMMITS]
);

  localparam int unsigned V_BIT = EW - 1;
  localparam int unsigned C_BIT = EW - 2;

  logic [NUM_AREGS-1:0][EW-1:0] ck_q [CKPTS];
  logic [NUM_AREGS-1:0][EW-1:0] ck_d [CKPTS];
  logic [NUM_AREGS-1:0][EW-1:0] map_d;

  function automatic logic [NUM_AREGS-1:0][EW-1:0] mark_commits(
      input logic [NUM_AREGS-1:0][EW-1:0] m,
      input logic                         v   [COMMITS],
      input areg_t                        r   [COMMITS],
      input logic [HW-1:0]                h   [COMMITS]);
    for (int c = 0; c < COMMITS; c++)
      if (v[c] && int'(r[c]) < NUM_AREGS && m[r[c]][V_BIT] && m[r[c]][HW-1:0] == h[c])
        m[r[c]][C_BIT] = 1'b1;
    return m;
  endfunction

  always_comb begin
    int start;
    map_d = restore ? ck_q[restore_id] : (upd_en ? map_next : map_q);
    map_d = mark_commits(map_d, cm_valid, cm_reg, cm_handle);
    for (int ck = 0; ck < CKPTS; ck++) begin
      ck_d[ck] = ck_q[ck];
      start    = 0;
      for (int k = 0; k < LOOKUPS; k++) begin
        if (ckpt_take[k] && int'(ckpt_id[k]) == ck) begin
          ck_d[ck] = ckpt_map[k];
          start    = k + 1;
        end
      end
      for (int k = 0; k < LOOKUPS; k++)
        if (k >= start && ev_valid[k])
          for (int r = 0; r < NUM_AREGS; r++)
            if (ck_d[ck][r][IDXW-1:0] == ev_idx[k])
              ck_d[ck][r][V_BIT] = 1'b0;
      ck_d[ck] = mark_commits(ck_d[ck], cm_valid, cm_reg, cm_handle);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_q <= '0;
      for (int ck = 0; ck < CKPTS; ck++) ck_q[ck] <= '0;
    end else begin
      map_q <= map_d;
      for (int ck = 0; ck < CKPTS; ck++) ck_q[ck] <= ck_d[ck];
    end
  end

  a_no_update_on_restore: assert property (@(posedge clk) disable iff (!rst_n)
    !(restore && upd_en));

endmodule
