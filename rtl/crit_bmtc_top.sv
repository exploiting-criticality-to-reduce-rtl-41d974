// crit_bmtc_top: criticality-guided branch misprediction trace cache.
//
// After a branch misprediction the pipeline is refilled from fetch, and the
// instructions that follow are often on the critical path through their
// decode stage (a critical D chain). This block shortens that refill: it
// caches predecoded traces of the instructions that followed mispredicted
// branches, and on a later misprediction of the same branch sends the cached
// trace straight to rename, bypassing fetch and decode. Which traces stay in
// the small cache is decided by a value computed from each branch's history:
// by default its mean critical D chain length times its number of
// mispredictions.
//
// Parts: trace_buffer (the instructions entering rename, one entry per ROB
// entry), dchain_tracker (critical D chain length per in-flight branch),
// abib (per-branch mean, count, value and trace), bmtc (the trace cache),
// bmtc_sequencer (plays a cached trace into rename) and update_ctrl (commit-
// time update of ABIB and BMTC).
//
// Interface to the host core (which is not part of this design):
//  * dec_*  : decoder output, WIDTH lanes, valid lanes contiguous from lane 0;
//             dec_ready is low while the trace cache feeds rename, while the
//             trace buffer holds its input, in a misprediction cycle, or when
//             rename is not ready.
//  * rn_*   : rename input, the decoder's or the trace cache's instructions
//             (rn_from_bmtc). A lane transfers when rn_valid and rn_ready.
//             rn_rob_base is the ROB index of lane 0; the core allocates ROB
//             entries in the same order. rn_is_branch and rn_dcrit are the
//             core's branch flag and the criticality predictor's D-critical
//             flag for the instructions presented on rn_* in that cycle.
//  * mp_*   : a misprediction detected in execute: branch address and ROB
//             index. It squashes younger instructions in the trace buffer and
//             chain tracker and looks the branch up in the trace cache;
//             skip_valid/skip_len tell fetch how many instructions the cache
//             will supply.
//  * retire_cnt : instructions committed this cycle.
//  * cm_*   : a mispredicted branch committing; starts the update.
//  * ev_*, upd_* : event pulses and status, for performance counting.
module crit_bmtc_top #(
  parameter crit_pkg::value_scheme_e SCHEME = crit_pkg::VS_WEIGHTED,
  parameter int unsigned WIDTH        = crit_pkg::WIDTH,
  parameter int unsigned ROB_ENTRIES  = crit_pkg::ROB_ENTRIES,
  parameter int unsigned MAX_TRACE    = crit_pkg::MAX_TRACE,
  parameter int unsigned BMTC_ENTRIES = crit_pkg::BMTC_ENTRIES,
  parameter int unsigned ABIB_ENTRIES = crit_pkg::ABIB_ENTRIES,
  parameter int unsigned INSTR_W      = crit_pkg::INSTR_W,
  parameter int unsigned ADDR_W       = crit_pkg::ADDR_W,
  parameter int unsigned CHAIN_W      = crit_pkg::CHAIN_W,
  parameter int unsigned CNT_W        = crit_pkg::CNT_W,
  localparam int unsigned VALUE_W     = CHAIN_W + CNT_W,
  localparam int unsigned PTR_W       = $clog2(ROB_ENTRIES),
  localparam int unsigned TLEN_W      = $clog2(MAX_TRACE + 1),
  localparam int unsigned BIDX_W      = (BMTC_ENTRIES > 1) ? $clog2(BMTC_ENTRIES) : 1,
  localparam int unsigned ROWS        = (MAX_TRACE + WIDTH - 1) / WIDTH,
  localparam int unsigned ROW_W       = $clog2(ROWS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // decoder
  input  logic [WIDTH-1:0]              dec_valid,
  input  logic [WIDTH-1:0][INSTR_W-1:0] dec_instr,
  output logic                          dec_ready,
  // rename
  output logic [WIDTH-1:0]              rn_valid,
  output logic [WIDTH-1:0][INSTR_W-1:0] rn_instr,
  output logic                          rn_from_bmtc,
  output logic [PTR_W-1:0]              rn_rob_base,
  input  logic                          rn_ready,
  input  logic [WIDTH-1:0]              rn_is_branch,
  input  logic [WIDTH-1:0]              rn_dcrit,
  // execute: misprediction
  input  logic                          mp_valid,
  input  logic [ADDR_W-1:0]             mp_addr,
  input  logic [PTR_W-1:0]              mp_rob_idx,
  output logic                          skip_valid,
  output logic [TLEN_W-1:0]             skip_len,
  // commit
  input  logic [$clog2(WIDTH+1)-1:0]    retire_cnt,
  input  logic                          cm_valid,
  input  logic [ADDR_W-1:0]             cm_addr,
  input  logic [PTR_W-1:0]              cm_rob_idx,
  // status and events
  output logic                          tb_hold,
  output logic                          upd_busy,
  output logic                          upd_drop,
  output logic                          ev_insert,
  output logic                          ev_value_update,
  output logic                          ev_reject
);

  // ---------------- rename input multiplexer ----------------
  logic                          seq_active;
  logic [WIDTH-1:0]              seq_valid;
  logic [WIDTH-1:0][INSTR_W-1:0] seq_instr;
  logic                          tb_ready;
  logic [PTR_W-1:0]              tb_wr_ptr;
  logic [WIDTH-1:0]              mux_valid;
  logic                          open;     // rename input may transfer
  logic                          fire;
  logic [WIDTH-1:0]              disp_valid;

  assign mux_valid    = seq_active ? seq_valid : dec_valid;
  assign open         = tb_ready && !mp_valid;
  assign rn_valid     = mux_valid & {WIDTH{open}};
  assign rn_instr     = seq_active ? seq_instr : dec_instr;
  assign rn_from_bmtc = seq_active;
  assign rn_rob_base  = tb_wr_ptr;
  assign fire         = open && rn_ready;
  assign disp_valid   = rn_valid & {WIDTH{rn_ready}};
  assign dec_ready    = fire && !seq_active;
  assign tb_hold      = !tb_ready;

  // ---------------- trace buffer ----------------
  logic                          tb_lock;
  logic [PTR_W-1:0]              tb_rd_ptr;
  logic [WIDTH-1:0][INSTR_W-1:0] tb_rd_data;
  logic [PTR_W:0]                tb_count;

  trace_buffer #(.WIDTH(WIDTH), .DEPTH(ROB_ENTRIES), .INSTR_W(INSTR_W)) u_tb (
    .clk, .rst_n,
    .in_valid    (disp_valid),
    .in_instr    (rn_instr),
    .in_ready    (tb_ready),
    .wr_ptr      (tb_wr_ptr),
    .retire_cnt  (retire_cnt),
    .flush_valid (mp_valid),
    .flush_ptr   (mp_rob_idx),
    .lock        (tb_lock),
    .rd_ptr      (tb_rd_ptr),
    .rd_instr    (tb_rd_data),
    .count       (tb_count)
  );

  // ---------------- critical D chain tracker ----------------
  logic [PTR_W-1:0]   trk_rd_idx;
  logic [CHAIN_W-1:0] trk_len;
  logic               trk_active;

  dchain_tracker #(.WIDTH(WIDTH), .ROB_ENTRIES(ROB_ENTRIES), .CHAIN_W(CHAIN_W)) u_trk (
    .clk, .rst_n,
    .disp_valid     (disp_valid),
    .disp_is_branch (rn_is_branch),
    .disp_dcrit     (rn_dcrit),
    .disp_base      (tb_wr_ptr),
    .flush_valid    (mp_valid),
    .flush_idx      (mp_rob_idx),
    .rd_idx         (trk_rd_idx),
    .rd_len         (trk_len),
    .rd_active      (trk_active)
  );

  // ---------------- ABIB ----------------
  logic                          ab_upd_en, ab_upd_done;
  logic [ADDR_W-1:0]             ab_upd_addr;
  logic [CHAIN_W-1:0]            ab_upd_len, ab_upd_mean;
  logic [TLEN_W-1:0]             ab_upd_tlen, ab_rd_tlen;
  logic [VALUE_W-1:0]            ab_upd_value;
  logic [CNT_W-1:0]              ab_upd_cnt;
  logic                          ab_tr_wr_en, ab_tr_rd_en;
  logic [ADDR_W-1:0]             ab_tr_wr_addr, ab_tr_rd_addr;
  logic [ROW_W-1:0]              ab_tr_wr_row, ab_tr_rd_row;
  logic [WIDTH-1:0][INSTR_W-1:0] ab_tr_wr_data, ab_tr_rd_data;

  abib #(.SCHEME(SCHEME), .ENTRIES(ABIB_ENTRIES), .WIDTH(WIDTH), .MAX_TRACE(MAX_TRACE),
         .INSTR_W(INSTR_W), .ADDR_W(ADDR_W), .CHAIN_W(CHAIN_W), .CNT_W(CNT_W)) u_abib (
    .clk, .rst_n,
    .upd_en     (ab_upd_en),
    .upd_addr   (ab_upd_addr),
    .upd_len    (ab_upd_len),
    .upd_tlen   (ab_upd_tlen),
    .upd_done   (ab_upd_done),
    .upd_value  (ab_upd_value),
    .upd_mean   (ab_upd_mean),
    .upd_cnt    (ab_upd_cnt),
    .tr_wr_en   (ab_tr_wr_en),
    .tr_wr_addr (ab_tr_wr_addr),
    .tr_wr_row  (ab_tr_wr_row),
    .tr_wr_data (ab_tr_wr_data),
    .tr_rd_en   (ab_tr_rd_en),
    .tr_rd_addr (ab_tr_rd_addr),
    .tr_rd_row  (ab_tr_rd_row),
    .tr_rd_data (ab_tr_rd_data),
    .rd_tlen    (ab_rd_tlen)
  );

  // ---------------- BMTC ----------------
  logic                          lk_hit, bm_up_hit, bm_min_free;
  logic [BIDX_W-1:0]             lk_idx, bm_up_idx, bm_min_idx, seq_rd_idx;
  logic [TLEN_W-1:0]             lk_tlen;
  logic [ADDR_W-1:0]             bm_up_addr;
  logic [ROW_W-1:0]              seq_rd_row;
  logic [WIDTH-1:0][INSTR_W-1:0] seq_rd_data;
  logic [VALUE_W-1:0]            bm_min_value;
  logic                          bm_wr_en, bm_inv_en, bm_ent_en, bm_val_en;
  logic [BIDX_W-1:0]             bm_wr_idx, bm_inv_idx, bm_ent_idx, bm_val_idx;
  logic [ROW_W-1:0]              bm_wr_row;
  logic [WIDTH-1:0][INSTR_W-1:0] bm_wr_data;
  logic [ADDR_W-1:0]             bm_ent_tag;
  logic [VALUE_W-1:0]            bm_ent_value, bm_val_value;
  logic [TLEN_W-1:0]             bm_ent_tlen;

  bmtc #(.ENTRIES(BMTC_ENTRIES), .WIDTH(WIDTH), .MAX_TRACE(MAX_TRACE), .INSTR_W(INSTR_W),
         .ADDR_W(ADDR_W), .VALUE_W(VALUE_W)) u_bmtc (
    .clk, .rst_n,
    .lk_addr   (mp_addr),
    .lk_hit    (lk_hit),
    .lk_idx    (lk_idx),
    .lk_tlen   (lk_tlen),
    .up_addr   (bm_up_addr),
    .up_hit    (bm_up_hit),
    .up_idx    (bm_up_idx),
    .rd_idx    (seq_rd_idx),
    .rd_row    (seq_rd_row),
    .rd_data   (seq_rd_data),
    .wr_en     (bm_wr_en),
    .wr_idx    (bm_wr_idx),
    .wr_row    (bm_wr_row),
    .wr_data   (bm_wr_data),
    .inv_en    (bm_inv_en),
    .inv_idx   (bm_inv_idx),
    .ent_en    (bm_ent_en),
    .ent_idx   (bm_ent_idx),
    .ent_tag   (bm_ent_tag),
    .ent_value (bm_ent_value),
    .ent_tlen  (bm_ent_tlen),
    .val_en    (bm_val_en),
    .val_idx   (bm_val_idx),
    .val_value (bm_val_value),
    .min_idx   (bm_min_idx),
    .min_value (bm_min_value),
    .min_free  (bm_min_free)
  );

  // ---------------- sequencer ----------------
  bmtc_sequencer #(.ENTRIES(BMTC_ENTRIES), .WIDTH(WIDTH), .MAX_TRACE(MAX_TRACE),
                   .INSTR_W(INSTR_W)) u_seq (
    .clk, .rst_n,
    .mp_valid   (mp_valid),
    .hit        (lk_hit),
    .hit_idx    (lk_idx),
    .hit_tlen   (lk_tlen),
    .skip_valid (skip_valid),
    .skip_len   (skip_len),
    .rd_idx     (seq_rd_idx),
    .rd_row     (seq_rd_row),
    .rd_data    (seq_rd_data),
    .active     (seq_active),
    .out_valid  (seq_valid),
    .out_instr  (seq_instr),
    .out_ready  (fire)
  );

  // ---------------- update controller ----------------
  update_ctrl #(.WIDTH(WIDTH), .DEPTH(ROB_ENTRIES), .MAX_TRACE(MAX_TRACE),
                .BMTC_ENTRIES(BMTC_ENTRIES), .INSTR_W(INSTR_W), .ADDR_W(ADDR_W),
                .CHAIN_W(CHAIN_W), .VALUE_W(VALUE_W)) u_upd (
    .clk, .rst_n,
    .cm_valid        (cm_valid),
    .cm_addr         (cm_addr),
    .cm_rob_idx      (cm_rob_idx),
    .busy            (upd_busy),
    .rp_active       (seq_active),
    .rp_idx          (seq_rd_idx),
    .drop            (upd_drop),
    .trk_rd_idx      (trk_rd_idx),
    .trk_len         (trk_len),
    .tb_wr_ptr       (tb_wr_ptr),
    .tb_rd_ptr       (tb_rd_ptr),
    .tb_rd_data      (tb_rd_data),
    .tb_lock         (tb_lock),
    .ab_upd_en       (ab_upd_en),
    .ab_upd_addr     (ab_upd_addr),
    .ab_upd_len      (ab_upd_len),
    .ab_upd_tlen     (ab_upd_tlen),
    .ab_upd_done     (ab_upd_done),
    .ab_upd_value    (ab_upd_value),
    .ab_tr_wr_en     (ab_tr_wr_en),
    .ab_tr_wr_addr   (ab_tr_wr_addr),
    .ab_tr_wr_row    (ab_tr_wr_row),
    .ab_tr_wr_data   (ab_tr_wr_data),
    .ab_tr_rd_en     (ab_tr_rd_en),
    .ab_tr_rd_addr   (ab_tr_rd_addr),
    .ab_tr_rd_row    (ab_tr_rd_row),
    .ab_tr_rd_data   (ab_tr_rd_data),
    .bm_up_addr      (bm_up_addr),
    .bm_up_hit       (bm_up_hit),
    .bm_up_idx       (bm_up_idx),
    .bm_min_idx      (bm_min_idx),
    .bm_min_value    (bm_min_value),
    .bm_min_free     (bm_min_free),
    .bm_wr_en        (bm_wr_en),
    .bm_wr_idx       (bm_wr_idx),
    .bm_wr_row       (bm_wr_row),
    .bm_wr_data      (bm_wr_data),
    .bm_inv_en       (bm_inv_en),
    .bm_inv_idx      (bm_inv_idx),
    .bm_ent_en       (bm_ent_en),
    .bm_ent_idx      (bm_ent_idx),
    .bm_ent_tag      (bm_ent_tag),
    .bm_ent_value    (bm_ent_value),
    .bm_ent_tlen     (bm_ent_tlen),
    .bm_val_en       (bm_val_en),
    .bm_val_idx      (bm_val_idx),
    .bm_val_value    (bm_val_value),
    .ev_insert       (ev_insert),
    .ev_value_update (ev_value_update),
    .ev_reject       (ev_reject)
  );

endmodule
