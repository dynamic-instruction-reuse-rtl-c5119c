// tb_rb_rst: randomised test of the register source table against a
// reference model kept in the testbench (8 buffer entries, 4 checkpoints).
//
// Every cycle either restores a random checkpoint or loads a random new map,
// takes checkpoints from random slots, reports random evictions and random
// commits. The model applies the rules stated for the block: a checkpoint is
// the slot's map with the evictions of later slots (and of later cycles)
// removed; commits mark entries whose handle matches; restore reloads a
// checkpoint. After every clock edge the live map and, through a restore,
// the checkpoints are compared with the model.
`timescale 1ns/1ps
module tb_rb_rst;
  import rb_pkg::*;

  localparam int unsigned N   = 8;
  localparam int unsigned L   = 4;
  localparam int unsigned C   = 4;
  localparam int unsigned CK  = 4;
  localparam int unsigned HW  = $clog2(N) + 1;
  localparam int unsigned EW  = HW + 2;
  localparam int unsigned CW  = $clog2(CK);
  localparam int unsigned IW  = $clog2(N);

  typedef logic [NUM_AREGS-1:0][EW-1:0] map_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  map_t          map_q, map_next;
  logic          upd_en, restore;
  logic [CW-1:0] restore_id;
  logic          ck_take [L];
  logic [CW-1:0] ck_id   [L];
  map_t          ck_map  [L];
  logic          ev_v    [L];
  logic [IW-1:0] ev_i    [L];
  logic          cm_v    [C];
  areg_t         cm_r    [C];
  logic [HW-1:0] cm_hd   [C];

  rb_rst #(.ENTRIES(N), .LOOKUPS(L), .COMMITS(C), .CKPTS(CK)) dut (
    .clk, .rst_n, .map_q, .upd_en, .map_next,
    .ckpt_take (ck_take), .ckpt_id (ck_id), .ckpt_map (ck_map),
    .restore, .restore_id,
    .ev_valid (ev_v), .ev_idx (ev_i),
    .cm_valid (cm_v), .cm_reg (cm_r), .cm_handle (cm_hd)
  );

  int checks = 0, failures = 0;
  int n_restore = 0, n_scrub = 0, n_mark = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic map_t rand_map();
    map_t m;
    for (int r = 0; r < NUM_AREGS; r++)
      m[r] = {1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), HW'($urandom_range(0, 2 * N - 1))};
    return m;
  endfunction

  function automatic map_t scrub(map_t m, logic [IW-1:0] idx);
    for (int r = 0; r < NUM_AREGS; r++)
      if (m[r][IW-1:0] == idx) m[r][EW-1] = 1'b0;
    return m;
  endfunction

  function automatic map_t mark(map_t m, int unsigned r, logic [HW-1:0] h);
    if (m[r][EW-1] && m[r][HW-1:0] == h) m[r][EW-2] = 1'b1;
    return m;
  endfunction

  map_t model, model_ck [CK];

  initial begin
    model = '0;
    for (int i = 0; i < CK; i++) model_ck[i] = '0;
    upd_en = 0; restore = 0; restore_id = '0; map_next = '0;
    for (int k = 0; k < L; k++) begin ck_take[k] = 0; ck_id[k] = '0; ck_map[k] = '0; ev_v[k] = 0; ev_i[k] = '0; end
    for (int c = 0; c < C; c++) begin cm_v[c] = 0; cm_r[c] = '0; cm_hd[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 600; cyc++) begin
      map_t nm;
      int   taken [CK];
      @(negedge clk);
      restore = ($urandom_range(0, 5) == 0);
      restore_id = CW'($urandom_range(0, CK - 1));
      upd_en = !restore;
      map_next = rand_map();
      for (int i = 0; i < CK; i++) taken[i] = -1;
      for (int k = 0; k < L; k++) begin
        ck_take[k] = !restore && ($urandom_range(0, 3) == 0);
        ck_id[k]   = CW'($urandom_range(0, CK - 1));
        ck_map[k]  = rand_map();
        ev_v[k]    = !restore && ($urandom_range(0, 1) == 0);
        ev_i[k]    = IW'($urandom_range(0, N - 1));
        if (ck_take[k]) taken[ck_id[k]] = k;
      end
      for (int c = 0; c < C; c++) begin
        int r;
        r = $urandom_range(0, 5);
        cm_v[c]  = ($urandom_range(0, 1) == 0);
        cm_r[c]  = areg_t'(r);
        // often the handle the live map holds, so that marks happen
        cm_hd[c] = ($urandom_range(0, 1) == 0) ? HW'(model[r]) : HW'($urandom_range(0, 2 * N - 1));
      end
      // ---- model
      nm = restore ? model_ck[restore_id] : map_next;
      for (int c = 0; c < C; c++) if (cm_v[c]) nm = mark(nm, cm_r[c], cm_hd[c]);
      for (int i = 0; i < CK; i++) begin
        int from;
        from = 0;
        if (taken[i] >= 0) begin model_ck[i] = ck_map[taken[i]]; from = taken[i] + 1; end
        for (int k = from; k < L; k++)
          if (ev_v[k]) begin
            if (model_ck[i] != scrub(model_ck[i], ev_i[k])) n_scrub++;
            model_ck[i] = scrub(model_ck[i], ev_i[k]);
          end
        for (int c = 0; c < C; c++) if (cm_v[c]) model_ck[i] = mark(model_ck[i], cm_r[c], cm_hd[c]);
      end
      for (int c = 0; c < C; c++)
        if (cm_v[c] && model[cm_r[c]][EW-1] && model[cm_r[c]][HW-1:0] == cm_hd[c]) n_mark++;
      if (restore) n_restore++;
      model = nm;
      @(posedge clk); #1;
      checks++;
      if (map_q != model) begin
        failures++;
        if (failures < 5) $display("FAIL live map differs in cycle %0d", cyc);
      end
    end
    $display("restores %0d, checkpoint scrubs %0d, commit marks %0d", n_restore, n_scrub, n_mark);
    checks++; if (n_restore == 0 || n_scrub == 0 || n_mark == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
