// update_ctrl: records a mispredicted branch when it commits.
//
// When a mispredicted branch reaches the head of the reorder buffer
// (cm_valid), the controller
//  1. reads the branch's critical D chain length from the chain tracker and
//     starts the ABIB record update (new mean, count and value) with it;
//  2. COPY: copies the trace that follows the branch, at most MAX_TRACE
//     instructions, WIDTH per cycle, from the trace buffer into the branch's
//     ABIB trace store, holding the trace buffer's input meanwhile (lock);
//  3. DECIDE: if the branch is already in the trace cache, replaces its value
//     with the new one. Otherwise it compares the new value with the weakest
//     cache entry and, when the new value is larger or an entry is empty,
//     evicts that entry;
//  4. FILL: copies the trace from the ABIB into the evicted entry, one row per
//     cycle, then (ENTRY) writes its tag, value and length and makes it valid.
// An entry that the sequencer is replaying is not evicted: DECIDE waits until
// the replay has finished (rp_active/rp_idx).
// This is the update method that compares each new value against the weakest
// value in the cache, so the cache always holds the largest values seen.
// Traces enter the cache from the ABIB. The update is slow next to a lookup,
// which costs only accuracy of the values; a commit arriving while busy is
// dropped (drop pulses), this design's choice.
// Timing: COPY takes ceil(tlen/WIDTH) cycles, FILL the same plus one, DECIDE
// and ENTRY one cycle each.
module update_ctrl #(
  parameter int unsigned WIDTH       = crit_pkg::WIDTH,
  parameter int unsigned DEPTH       = crit_pkg::ROB_ENTRIES,
  parameter int unsigned MAX_TRACE   = crit_pkg::MAX_TRACE,
  parameter int unsigned BMTC_ENTRIES = crit_pkg::BMTC_ENTRIES,
  parameter int unsigned INSTR_W     = crit_pkg::INSTR_W,
  parameter int unsigned ADDR_W      = crit_pkg::ADDR_W,
  parameter int unsigned CHAIN_W     = crit_pkg::CHAIN_W,
  parameter int unsigned VALUE_W     = crit_pkg::VALUE_W,
  localparam int unsigned PTR_W      = $clog2(DEPTH),
  localparam int unsigned IDX_W      = (BMTC_ENTRIES > 1) ? $clog2(BMTC_ENTRIES) : 1,
  localparam int unsigned ROWS       = (MAX_TRACE + WIDTH - 1) / WIDTH,
  localparam int unsigned ROW_W      = $clog2(ROWS),
  localparam int unsigned TLEN_W     = $clog2(MAX_TRACE + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // commit of a mispredicted branch
  input  logic                          cm_valid,
  input  logic [ADDR_W-1:0]             cm_addr,
  input  logic [PTR_W-1:0]              cm_rob_idx,
  output logic                          busy,
  output logic                          drop,
  // chain tracker
  output logic [PTR_W-1:0]              trk_rd_idx,
  input  logic [CHAIN_W-1:0]            trk_len,
  // trace buffer
  input  logic [PTR_W-1:0]              tb_wr_ptr,
  output logic [PTR_W-1:0]              tb_rd_ptr,
  input  logic [WIDTH-1:0][INSTR_W-1:0] tb_rd_data,
  output logic                          tb_lock,
  // ABIB
  output logic                          ab_upd_en,
  output logic [ADDR_W-1:0]             ab_upd_addr,
  output logic [CHAIN_W-1:0]            ab_upd_len,
  output logic [TLEN_W-1:0]             ab_upd_tlen,
  input  logic                          ab_upd_done,
  input  logic [VALUE_W-1:0]            ab_upd_value,
  output logic                          ab_tr_wr_en,
  output logic [ADDR_W-1:0]             ab_tr_wr_addr,
  output logic [ROW_W-1:0]              ab_tr_wr_row,
  output logic [WIDTH-1:0][INSTR_W-1:0] ab_tr_wr_data,
  output logic                          ab_tr_rd_en,
  output logic [ADDR_W-1:0]             ab_tr_rd_addr,
  output logic [ROW_W-1:0]              ab_tr_rd_row,
  input  logic [WIDTH-1:0][INSTR_W-1:0] ab_tr_rd_data,
  // replay in progress (an entry being replayed is not evicted)
  input  logic                          rp_active,
  input  logic [IDX_W-1:0]              rp_idx,
  // BMTC
  output logic [ADDR_W-1:0]             bm_up_addr,
  input  logic                          bm_up_hit,
  input  logic [IDX_W-1:0]              bm_up_idx,
  input  logic [IDX_W-1:0]              bm_min_idx,
  input  logic [VALUE_W-1:0]            bm_min_value,
  input  logic                          bm_min_free,
  output logic                          bm_wr_en,
  output logic [IDX_W-1:0]              bm_wr_idx,
  output logic [ROW_W-1:0]              bm_wr_row,
  output logic [WIDTH-1:0][INSTR_W-1:0] bm_wr_data,
  output logic                          bm_inv_en,
  output logic [IDX_W-1:0]              bm_inv_idx,
  output logic                          bm_ent_en,
  output logic [IDX_W-1:0]              bm_ent_idx,
  output logic [ADDR_W-1:0]             bm_ent_tag,
  output logic [VALUE_W-1:0]            bm_ent_value,
  output logic [TLEN_W-1:0]             bm_ent_tlen,
  output logic                          bm_val_en,
  output logic [IDX_W-1:0]              bm_val_idx,
  output logic [VALUE_W-1:0]            bm_val_value,
  // events
  output logic                          ev_insert,
  output logic                          ev_value_update,
  output logic                          ev_reject
);

  typedef enum logic [2:0] {S_IDLE, S_COPY, S_WAIT, S_DECIDE, S_FILL, S_ENTRY} state_e;

  state_e             state_q;
  logic [ADDR_W-1:0]  addr_q;
  logic [PTR_W-1:0]   ptr_q;
  logic [TLEN_W-1:0]  tlen_q;
  logic [ROW_W-1:0]   row_q, last_row_q;
  logic [IDX_W-1:0]   tgt_q;
  logic [VALUE_W-1:0] value_q;
  logic               value_ok_q;

  logic [PTR_W-1:0]   avail;
  logic [TLEN_W-1:0]  tlen_new;
  logic               accept;

  // Instructions after the committing branch that are in the trace buffer.
  assign avail    = tb_wr_ptr - cm_rob_idx - 1'b1;
  assign tlen_new = (int'(avail) > int'(MAX_TRACE)) ? TLEN_W'(MAX_TRACE) : TLEN_W'(avail);
  assign accept   = cm_valid && (state_q == S_IDLE);

  assign busy       = (state_q != S_IDLE);
  assign drop       = cm_valid && (state_q != S_IDLE);
  assign trk_rd_idx = cm_rob_idx;

  assign ab_upd_en   = accept;
  assign ab_upd_addr = cm_addr;
  assign ab_upd_len  = trk_len;
  assign ab_upd_tlen = tlen_new;

  // COPY: trace buffer -> ABIB trace store
  assign tb_lock       = (state_q == S_COPY);
  assign tb_rd_ptr     = ptr_q + PTR_W'(int'(row_q) * WIDTH);
  assign ab_tr_wr_en   = (state_q == S_COPY);
  assign ab_tr_wr_addr = addr_q;
  assign ab_tr_wr_row  = row_q;
  assign ab_tr_wr_data = tb_rd_data;

  // DECIDE
  logic do_val, do_insert, wins, victim_busy;
  assign bm_up_addr  = addr_q;
  assign wins        = !bm_up_hit && (tlen_q != '0) && (bm_min_free || value_q > bm_min_value);
  assign victim_busy = rp_active && (rp_idx == bm_min_idx);
  assign do_val      = (state_q == S_DECIDE) && bm_up_hit;
  assign do_insert   = (state_q == S_DECIDE) && wins && !victim_busy;
  assign bm_val_en    = do_val;
  assign bm_val_idx   = bm_up_idx;
  assign bm_val_value = value_q;
  assign bm_inv_en    = do_insert;
  assign bm_inv_idx   = bm_min_idx;

  // FILL: ABIB trace store -> BMTC; read of row r issued one cycle before its write
  assign ab_tr_rd_en   = do_insert || (state_q == S_FILL);
  assign ab_tr_rd_addr = addr_q;
  assign ab_tr_rd_row  = do_insert ? '0 : row_q + 1'b1;
  assign bm_wr_en      = (state_q == S_FILL);
  assign bm_wr_idx     = tgt_q;
  assign bm_wr_row     = row_q;
  assign bm_wr_data    = ab_tr_rd_data;

  assign bm_ent_en    = (state_q == S_ENTRY);
  assign bm_ent_idx   = tgt_q;
  assign bm_ent_tag   = addr_q;
  assign bm_ent_value = value_q;
  assign bm_ent_tlen  = tlen_q;

  assign ev_insert       = (state_q == S_ENTRY);
  assign ev_value_update = do_val;
  assign ev_reject       = (state_q == S_DECIDE) && !bm_up_hit && !wins;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      ptr_q      <= '0;
      tlen_q     <= '0;
      row_q      <= '0;
      last_row_q <= '0;
      tgt_q      <= '0;
      value_q    <= '0;
      value_ok_q <= 1'b0;
    end else begin
      if (ab_upd_done) begin
        value_q    <= ab_upd_value;
        value_ok_q <= 1'b1;
      end
      unique case (state_q)
        S_IDLE: if (accept) begin
          addr_q     <= cm_addr;
          ptr_q      <= cm_rob_idx + 1'b1;
          tlen_q     <= tlen_new;
          row_q      <= '0;
          last_row_q <= ROW_W'((int'(tlen_new) + WIDTH - 1) / WIDTH - 1);
          value_ok_q <= 1'b0;
          state_q    <= (tlen_new == '0) ? S_WAIT : S_COPY;
        end
        S_COPY: begin
          row_q <= row_q + 1'b1;
          if (row_q == last_row_q) state_q <= S_WAIT;
        end
        S_WAIT: if (value_ok_q || ab_upd_done) state_q <= S_DECIDE;
        S_DECIDE: begin
          row_q <= '0;
          if (do_insert) begin
            tgt_q   <= bm_min_idx;
            state_q <= S_FILL;
          end else if (!(wins && victim_busy)) begin
            state_q <= S_IDLE;
          end
        end
        S_FILL: begin
          row_q <= row_q + 1'b1;
          if (row_q == last_row_q) state_q <= S_ENTRY;
        end
        S_ENTRY: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
