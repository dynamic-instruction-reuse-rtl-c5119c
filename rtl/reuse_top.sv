// reuse_top: the three reuse buffer organisations, side by side.
//
// Dynamic instruction reuse keeps the outcomes of executed instructions in a
// reuse buffer indexed by the PC. At decode the buffer is asked whether an
// earlier outcome is still correct; if so the instruction skips the
// instruction window and execution and goes straight to the reorder buffer
// with its result. Three ways of establishing that an outcome is still
// correct are provided, each a complete buffer with its own ports:
//   sv_*  : scheme Sv,   compares operand values            (rb_sv)
//   sn_*  : scheme Sn,   valid bit, invalidated by register name (rb_sn)
//   snd_* : scheme Sn+d, register names plus dependence links through the
//           register source table, with checkpoint repair  (rb_snd, rb_rst)
// Every buffer has three port groups, matching the pipeline stages that use
// it: decode (lk_*, combinational reuse test plus reservation at the clock
// edge), execute (wr_*, result write into the reserved entry with the handle
// returned at decode) and commit (cm_*, invalidations). Scheme Sn+d also takes
// the commit handle and a checkpoint restore on a branch misprediction.
// The surrounding out-of-order core (fetch, instruction queue, decode and
// rename, instruction window, reorder buffer, register file, functional
// units) is the user's; these ports are where it connects.
//
// Defaults: 128 entries, fully associative with FIFO replacement (SV_WAYS
// makes the Sv buffer set associative), 4 reuse tests, 4 result writes and
// 4 commits per cycle, 8 RST checkpoints.
// The three schemes and their entry contents, the ports per cycle, the entry
// counts and the checkpoint count follow the document; the handle, the
// port-level protocol and the store-ordering inputs are this design's own.
// rst_n is an asynchronous reset for the flops and also the disable condition
// of the clocked assertions in rb_snd and rb_rst, which lint reports as a
// signal used both synchronously and asynchronously; the assertions do not
// produce logic, so the warning stands.
module reuse_top
  import rb_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LOOKUPS = 4,
  parameter int unsigned WRITES  = 4,
  parameter int unsigned COMMITS = 4,
  parameter int unsigned CKPTS   = MAX_CKPTS,
  parameter int unsigned SV_WAYS = ENTRIES,   // Sv associativity
  localparam int unsigned HW     = $clog2(ENTRIES) + 1,
  localparam int unsigned CW     = $clog2(CKPTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // ---- scheme Sv
  input  lookup_req_t   sv_lk_req      [LOOKUPS],
  output logic          sv_lk_hit      [LOOKUPS],
  output logic          sv_lk_addr_hit [LOOKUPS],
  output word_t         sv_lk_result   [LOOKUPS],
  output word_t         sv_lk_address  [LOOKUPS],
  output logic          sv_lk_alloc    [LOOKUPS],
  output logic [HW-1:0] sv_lk_handle   [LOOKUPS],
  input  write_req_t    sv_wr_req      [WRITES],
  input  logic [HW-1:0] sv_wr_handle   [WRITES],
  input  commit_req_t   sv_cm_req      [COMMITS],
  // ---- scheme Sn
  input  lookup_req_t   sn_lk_req      [LOOKUPS],
  output logic          sn_lk_hit      [LOOKUPS],
  output logic          sn_lk_addr_hit [LOOKUPS],
  output word_t         sn_lk_result   [LOOKUPS],
  output word_t         sn_lk_address  [LOOKUPS],
  output logic          sn_lk_alloc    [LOOKUPS],
  output logic [HW-1:0] sn_lk_handle   [LOOKUPS],
  input  write_req_t    sn_wr_req      [WRITES],
  input  logic [HW-1:0] sn_wr_handle   [WRITES],
  input  commit_req_t   sn_cm_req      [COMMITS],
  // ---- scheme Sn+d
  input  lookup_req_t   snd_lk_req      [LOOKUPS],
  output logic          snd_lk_hit      [LOOKUPS],
  output logic          snd_lk_addr_hit [LOOKUPS],
  output word_t         snd_lk_result   [LOOKUPS],
  output word_t         snd_lk_address  [LOOKUPS],
  output logic          snd_lk_alloc    [LOOKUPS],
  output logic [HW-1:0] snd_lk_handle   [LOOKUPS],
  input  write_req_t    snd_wr_req      [WRITES],
  input  logic [HW-1:0] snd_wr_handle   [WRITES],
  input  commit_req_t   snd_cm_req      [COMMITS],
  input  logic [HW-1:0] snd_cm_handle   [COMMITS],
  input  logic          snd_restore,
  input  logic [CW-1:0] snd_restore_id,
  output logic [LOOKUPS-1:0] snd_ev_converted
);

  rb_sv #(.ENTRIES(ENTRIES), .LOOKUPS(LOOKUPS), .WRITES(WRITES), .COMMITS(COMMITS),
          .WAYS(SV_WAYS)) u_sv (
    .clk, .rst_n,
    .lk_req (sv_lk_req), .lk_hit (sv_lk_hit), .lk_addr_hit (sv_lk_addr_hit),
    .lk_result (sv_lk_result), .lk_address (sv_lk_address),
    .lk_alloc (sv_lk_alloc), .lk_handle (sv_lk_handle),
    .wr_req (sv_wr_req), .wr_handle (sv_wr_handle), .cm_req (sv_cm_req)
  );

  rb_sn #(.ENTRIES(ENTRIES), .LOOKUPS(LOOKUPS), .WRITES(WRITES), .COMMITS(COMMITS)) u_sn (
    .clk, .rst_n,
    .lk_req (sn_lk_req), .lk_hit (sn_lk_hit), .lk_addr_hit (sn_lk_addr_hit),
    .lk_result (sn_lk_result), .lk_address (sn_lk_address),
    .lk_alloc (sn_lk_alloc), .lk_handle (sn_lk_handle),
    .wr_req (sn_wr_req), .wr_handle (sn_wr_handle), .cm_req (sn_cm_req)
  );

  rb_snd #(.ENTRIES(ENTRIES), .LOOKUPS(LOOKUPS), .WRITES(WRITES), .COMMITS(COMMITS),
           .CKPTS(CKPTS)) u_snd (
    .clk, .rst_n,
    .lk_req (snd_lk_req), .lk_hit (snd_lk_hit), .lk_addr_hit (snd_lk_addr_hit),
    .lk_result (snd_lk_result), .lk_address (snd_lk_address),
    .lk_alloc (snd_lk_alloc), .lk_handle (snd_lk_handle),
    .wr_req (snd_wr_req), .wr_handle (snd_wr_handle),
    .cm_req (snd_cm_req), .cm_handle (snd_cm_handle),
    .restore (snd_restore), .restore_id (snd_restore_id),
    .ev_converted (snd_ev_converted)
  );

endmodule
