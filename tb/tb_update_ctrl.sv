// tb_update_ctrl: the commit-time update path with a real ABIB and trace
// cache around the controller and a stand-in trace buffer. A stream of
// mispredicted-branch commits (random chain and trace lengths, eight
// branches, a 3-entry cache) is checked against a model of the replacement
// rule: after every update the cache must hold exactly the model's branches,
// values, lengths and traces. Also checks the lock duration of the copy
// phase, that an entry being replayed is not evicted until the replay ends,
// that each policy outcome (insert, value update, reject, drop while
// busy) occurs, and that the weakest entry is the one evicted.
module tb_update_ctrl;
  localparam int W = 4, D = 16, MT = 10, BE = 3, IW = 16, AW = 32, CW = 9, NW = 16, VW = CW + NW;
  localparam int ROWS = 3, AE = 16, NB = 8;
  int checks = 0, failures = 0;
  int n_insert = 0, n_valupd = 0, n_reject = 0, n_drop = 0, n_wait = 0;

  logic clk = 0, rst_n = 0;
  // controller ports
  logic cm_valid, busy, drop, tb_lock;
  logic [AW-1:0] cm_addr;
  logic [3:0] cm_rob_idx, trk_rd_idx, tb_wr_ptr, tb_rd_ptr;
  logic [CW-1:0] trk_len;
  logic [W-1:0][IW-1:0] tb_rd_data;
  logic ab_upd_en, ab_upd_done, ab_tr_wr_en, ab_tr_rd_en;
  logic [AW-1:0] ab_upd_addr, ab_tr_wr_addr, ab_tr_rd_addr;
  logic [CW-1:0] ab_upd_len, ab_mean;
  logic [3:0] ab_upd_tlen, ab_rd_tlen;
  logic [VW-1:0] ab_upd_value;
  logic [NW-1:0] ab_cnt;
  logic [1:0] ab_tr_wr_row, ab_tr_rd_row;
  logic [W-1:0][IW-1:0] ab_tr_wr_data, ab_tr_rd_data;
  logic [AW-1:0] bm_up_addr, bm_ent_tag;
  logic bm_up_hit, bm_min_free, bm_wr_en, bm_inv_en, bm_ent_en, bm_val_en;
  logic [1:0] bm_up_idx, bm_min_idx, bm_wr_idx, bm_inv_idx, bm_ent_idx, bm_val_idx;
  logic [VW-1:0] bm_min_value, bm_ent_value, bm_val_value;
  logic [1:0] bm_wr_row;
  logic [W-1:0][IW-1:0] bm_wr_data;
  logic [3:0] bm_ent_tlen;
  logic ev_insert, ev_value_update, ev_reject;
  logic rp_active;
  logic [1:0] rp_idx;
  // cache read-out ports used by the checker
  logic [AW-1:0] lk_addr;
  logic lk_hit;
  logic [1:0] lk_idx, rd_idx, rd_row;
  logic [3:0] lk_tlen;
  logic [W-1:0][IW-1:0] rd_data;

  update_ctrl #(.WIDTH(W), .DEPTH(D), .MAX_TRACE(MT), .BMTC_ENTRIES(BE), .INSTR_W(IW),
                .ADDR_W(AW), .CHAIN_W(CW), .VALUE_W(VW)) dut (.*);

  abib #(.ENTRIES(AE), .WIDTH(W), .MAX_TRACE(MT), .INSTR_W(IW), .ADDR_W(AW), .CHAIN_W(CW),
         .CNT_W(NW)) u_abib (
    .clk, .rst_n, .upd_en(ab_upd_en), .upd_addr(ab_upd_addr), .upd_len(ab_upd_len),
    .upd_tlen(ab_upd_tlen), .upd_done(ab_upd_done), .upd_value(ab_upd_value),
    .upd_mean(ab_mean), .upd_cnt(ab_cnt), .tr_wr_en(ab_tr_wr_en), .tr_wr_addr(ab_tr_wr_addr),
    .tr_wr_row(ab_tr_wr_row), .tr_wr_data(ab_tr_wr_data), .tr_rd_en(ab_tr_rd_en),
    .tr_rd_addr(ab_tr_rd_addr), .tr_rd_row(ab_tr_rd_row), .tr_rd_data(ab_tr_rd_data),
    .rd_tlen(ab_rd_tlen));

  bmtc #(.ENTRIES(BE), .WIDTH(W), .MAX_TRACE(MT), .INSTR_W(IW), .ADDR_W(AW), .VALUE_W(VW)) u_bmtc (
    .clk, .rst_n, .lk_addr, .lk_hit, .lk_idx, .lk_tlen, .up_addr(bm_up_addr), .up_hit(bm_up_hit),
    .up_idx(bm_up_idx), .rd_idx, .rd_row, .rd_data, .wr_en(bm_wr_en), .wr_idx(bm_wr_idx),
    .wr_row(bm_wr_row), .wr_data(bm_wr_data), .inv_en(bm_inv_en), .inv_idx(bm_inv_idx),
    .ent_en(bm_ent_en), .ent_idx(bm_ent_idx), .ent_tag(bm_ent_tag), .ent_value(bm_ent_value),
    .ent_tlen(bm_ent_tlen), .val_en(bm_val_en), .val_idx(bm_val_idx), .val_value(bm_val_value),
    .min_idx(bm_min_idx), .min_value(bm_min_value), .min_free(bm_min_free));

  always #5 clk = ~clk;

  // stand-in trace buffer: content of position p in epoch ep
  int epoch = 0;
  function automatic logic [IW-1:0] tb_word(int ep, int p); return IW'(ep * 32 + (p % D)); endfunction
  always_comb for (int k = 0; k < W; k++) tb_rd_data[k] = tb_word(epoch, int'(tb_rd_ptr) + k);

  // model
  int m_mean [NB], m_cnt [NB];
  bit c_v [BE]; int c_b [BE]; int c_val [BE]; int c_len [BE]; int c_ep [BE]; int c_ptr [BE];

  function automatic int addr_of(int b); return 'h800 + 8 * b; endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic commit(input int b, input int len, input int rob, input int wptr);
    int tlen, v, nm, nc, slot, mi, mv, lock_cycles, avail, hold_cyc;
    bit hold_v; logic [AW-1:0] hold_tag;
    bit in_c;
    avail = (wptr - rob - 1 + 2 * D) % D;
    tlen = (avail > MT) ? MT : avail;
    nc = m_cnt[b] + 1;
    nm = (m_mean[b] * m_cnt[b] + len) / nc;
    m_mean[b] = nm; m_cnt[b] = nc; v = nm * nc;
    epoch++;
    @(negedge clk);
    cm_valid = 1; cm_addr = AW'(addr_of(b)); cm_rob_idx = 4'(rob); tb_wr_ptr = 4'(wptr); trk_len = CW'(len);
    #1 check(trk_rd_idx == 4'(rob), "chain length read at the branch's ROB entry");
    @(negedge clk);
    cm_valid = 0;
    lock_cycles = 0;
    // sometimes a replay of one entry is in progress for a while
    rp_active = ($urandom_range(0, 2) == 0); rp_idx = 2'($urandom_range(0, BE - 1));
    hold_v = u_bmtc.valid_q[rp_idx]; hold_tag = u_bmtc.tag_q[rp_idx]; hold_cyc = 0;
    // a second commit while busy is dropped
    if ($urandom_range(0, 3) == 0) begin
      cm_valid = 1; cm_addr = AW'(addr_of(0)); #1;
      check(drop, "commit while busy dropped");
      if (drop) n_drop++;
      if (tb_lock) lock_cycles++;
      @(negedge clk); cm_valid = 0;
    end
    while (busy || rp_active) begin
      if (tb_lock) lock_cycles++;
      if (rp_active) begin
        check(u_bmtc.valid_q[rp_idx] == hold_v && (!hold_v || u_bmtc.tag_q[rp_idx] == hold_tag),
              "entry under replay not evicted");
        hold_cyc++;
        if (hold_cyc == 40) begin
          if (busy) n_wait++;
          rp_active = 0;
        end
      end
      @(negedge clk);
    end
    check(lock_cycles == (tlen + W - 1) / W, $sformatf("copy phase %0d cycles for %0d instructions", lock_cycles, tlen));
    // model of the replacement rule
    slot = -1; in_c = 0;
    for (int i = 0; i < BE; i++) if (c_v[i] && c_b[i] == b) begin in_c = 1; slot = i; end
    if (in_c) begin c_val[slot] = v; n_valupd++; end
    else begin
      bit fr; fr = 0; mi = 0; mv = c_val[0];
      for (int i = 0; i < BE; i++) if (!fr && !c_v[i]) begin fr = 1; mi = i; mv = 0; end
      if (!fr) for (int i = 1; i < BE; i++) if (c_val[i] < mv) begin mi = i; mv = c_val[i]; end
      if (tlen > 0 && (fr || v > mv)) begin
        c_v[mi] = 1; c_b[mi] = b; c_val[mi] = v; c_len[mi] = tlen; c_ep[mi] = epoch; c_ptr[mi] = rob + 1;
        n_insert++;
      end else n_reject++;
    end
    // compare cache contents
    for (int bb = 0; bb < NB; bb++) begin
      int s; s = -1;
      for (int i = 0; i < BE; i++) if (c_v[i] && c_b[i] == bb) s = i;
      lk_addr = AW'(addr_of(bb)); #1;
      check(lk_hit == (s >= 0), $sformatf("branch %0d cached", bb));
      if (s >= 0 && lk_hit) begin
        check(int'(lk_idx) == s && int'(lk_tlen) == c_len[s], "slot and length");
        check(int'(u_bmtc.value_q[s]) == c_val[s], "value");
        for (int r = 0; r * W < c_len[s]; r++) begin
          rd_idx = 2'(s); rd_row = 2'(r); #1;
          for (int k = 0; k < W; k++)
            if (r * W + k < c_len[s]) check(rd_data[k] == tb_word(c_ep[s], c_ptr[s] + r * W + k), "cached trace");
        end
      end
    end
  endtask

  initial begin
    rp_active = 0; rp_idx = 0;
    cm_valid = 0; cm_addr = 0; cm_rob_idx = 0; tb_wr_ptr = 0; trk_len = 0; lk_addr = 0; rd_idx = 0; rd_row = 0;
    for (int b = 0; b < NB; b++) begin m_mean[b] = 0; m_cnt[b] = 0; end
    for (int i = 0; i < BE; i++) begin c_v[i] = 0; c_b[i] = 0; c_val[i] = 0; c_len[i] = 0; c_ep[i] = 0; c_ptr[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    commit(1, 50, 3, 3);     // nothing after the branch yet: updates ABIB only
    commit(1, 50, 3, 10);    // 6 instructions
    commit(2, 20, 14, 8);    // wraps: 9 instructions
    commit(3, 10, 0, 15);    // 14 available, capped at MAX_TRACE
    commit(4, 5, 5, 9);      // cache full, value 5 beats 20? no: rejected
    commit(4, 400, 5, 9);
    for (int i = 0; i < 300; i++)
      commit($urandom_range(1, NB - 1), $urandom_range(0, 300), $urandom_range(0, D - 1), $urandom_range(0, D - 1));
    check(n_insert > 0 && n_valupd > 0 && n_reject > 0 && n_drop > 0 && n_wait > 0, "all outcomes occurred");
    $display("insert %0d value-update %0d reject %0d drop %0d wait-for-replay %0d", n_insert, n_valupd, n_reject, n_drop, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
