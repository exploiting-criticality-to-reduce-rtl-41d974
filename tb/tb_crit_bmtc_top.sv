// tb_crit_bmtc_top: end-to-end run of the trace cache at its default size
// (4-wide, 128-entry ROB/trace buffer, 100-instruction traces, 5 entries,
// weighted values). The testbench plays a core: for each episode it
// dispatches a branch of one of eight addresses, a run of wrong-path
// instructions, reports the misprediction, dispatches the correct path (from
// the trace cache when it hits, then from the decoder), commits the branch
// and retires the rest. The correct path after branch b is the fixed sequence
// C(b,0), C(b,1), ...; the criticality predictor marks the first chain_e of
// them D-critical, chain_e random per episode.
// A model of the ABIB records and of the replacement rule predicts, for every
// misprediction, whether the cache hits and with how many instructions; every
// replayed instruction is compared with C(b,i), and the replay must take
// ceil(len/4) accepted cycles. Each mechanism (hit and replay, miss, insert,
// value update, reject, dropped commit, input held for a full buffer and for a
// trace copy, flush) is counted and must occur.
module tb_crit_bmtc_top;
  import crit_pkg::*;
  localparam int W = 4, D = 128, MT = 100, BE = 5, NB = 8;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_insert = 0, n_valupd = 0, n_reject = 0, n_drop = 0;
  int n_hold_full = 0, n_hold_lock = 0, n_flush = 0;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] dec_valid, rn_valid, rn_is_branch, rn_dcrit;
  logic [W-1:0][63:0] dec_instr, rn_instr;
  logic dec_ready, rn_from_bmtc, rn_ready, mp_valid, skip_valid, cm_valid;
  logic [6:0] rn_rob_base, mp_rob_idx, cm_rob_idx, skip_len;
  logic [31:0] mp_addr, cm_addr;
  logic [2:0] retire_cnt;
  logic tb_hold, upd_busy, upd_drop, ev_insert, ev_value_update, ev_reject;

  crit_bmtc_top dut (.*);

  always #5 clk = ~clk;

  localparam logic [7:0] K_BR = 8'hB1, K_OK = 8'hC0, K_WRONG = 8'hEE;
  function automatic logic [63:0] ins(logic [7:0] kind, int b, int i);
    return {kind, 8'h00, 8'(b), 24'h0, 16'(i)};
  endfunction

  // predictor and decode flags, from the instruction presented to rename
  int chain_e = 0;
  always_comb
    for (int k = 0; k < W; k++) begin
      rn_is_branch[k] = (rn_instr[k][63:56] == K_BR);
      rn_dcrit[k]     = (rn_instr[k][63:56] == K_OK) ? (int'(rn_instr[k][15:0]) < chain_e)
                                                     : rn_instr[k][0];
    end

  function automatic int addr_of(int b); return 'h1000 + 8 * b; endfunction

  // model
  int m_mean [NB], m_cnt [NB];
  bit c_v [BE]; int c_b [BE]; int c_val [BE]; int c_len [BE];
  int occ = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(negedge clk) if (rst_n && tb_hold && dec_valid != '0) begin
    if (upd_busy) n_hold_lock++; else n_hold_full++;
  end

  // offer n decoder instructions; returns 0 if give_up and the buffer holds input
  task automatic offer(input logic [W-1:0][63:0] g, input int n, input bit give_up, output bit sent);
    @(negedge clk);
    dec_valid = W'((1 << n) - 1); dec_instr = g;
    sent = 0;
    for (int c = 0; c < 2000; c++) begin
      #1;
      if (dec_ready) begin @(posedge clk); occ += n; sent = 1; break; end
      if (give_up && tb_hold) break;
      @(negedge clk);
    end
    #1 dec_valid = '0;
  endtask

  task automatic episode(input int b);
    int rob_b, n_wrong, n_after, exp_len, got, rows, start, tlen, chain, nm, nc, v, slot;
    bit hit, sent;
    logic [W-1:0][63:0] g;
    chain_e = $urandom_range(0, MT + 20);
    n_wrong = ($urandom_range(0, 5) == 0) ? D : $urandom_range(0, 12);
    n_after = $urandom_range(0, D - 2 * W - 1);
    // branch, alone in lane 0
    @(negedge clk);
    rob_b = int'(rn_rob_base);
    g = '0; g[0] = ins(K_BR, b, 0);
    offer(g, 1, 0, sent);
    // wrong path until done or the buffer holds
    for (int i = 0; i < n_wrong; i += W) begin
      for (int k = 0; k < W; k++) g[k] = ins(K_WRONG, b, i + k) | 64'($urandom_range(0, 1));
      offer(g, W, 1, sent);
      if (!sent) break;
    end
    // misprediction, once the previous update has finished
    while (upd_busy) @(negedge clk);
    hit = 0; exp_len = 0;
    for (int i = 0; i < BE; i++) if (c_v[i] && c_b[i] == b) begin hit = 1; exp_len = c_len[i]; end
    @(negedge clk);
    mp_valid = 1; mp_addr = 32'(addr_of(b)); mp_rob_idx = 7'(rob_b); #1;
    check(skip_valid == hit && (!hit || int'(skip_len) == exp_len), $sformatf("lookup of branch %0d", b));
    check(rn_valid == '0, "no rename transfer in a misprediction cycle");
    @(posedge clk); n_flush++;
    occ = 1;
    @(negedge clk); mp_valid = 0;
    // replay from the trace cache
    got = 0; rows = 0;
    if (hit) begin
      n_hit++;
      for (int c = 0; c < 200 && rn_from_bmtc; c++) begin
        rn_ready = ($urandom_range(0, 5) != 0); #1;
        check(dec_ready == 0, "decoder held during replay");
        for (int k = 0; k < W; k++) begin
          check(rn_valid[k] == (got + k < exp_len), "replay lane mask");
          if (rn_valid[k]) check(rn_instr[k] == ins(K_OK, b, got + k), "replayed instruction");
        end
        @(posedge clk);
        if (rn_ready) begin got += W; rows++; end
        @(negedge clk);
      end
      rn_ready = 1;
      check(rows == (exp_len + W - 1) / W, "replay length in cycles");
      occ += exp_len;
    end else n_miss++;
    // rest of the correct path from the decoder
    if (n_after < exp_len) n_after = exp_len;
    start = exp_len;
    for (int i = start; i < n_after; i += W) begin
      int n;
      n = (n_after - i < W) ? n_after - i : W;
      for (int k = 0; k < W; k++) g[k] = ins(K_OK, b, i + k);
      offer(g, n, 0, sent);
    end
    // commit the branch
    @(negedge clk);
    cm_valid = 1; cm_addr = 32'(addr_of(b)); cm_rob_idx = 7'(rob_b); retire_cnt = 1;
    @(posedge clk); occ--;
    @(negedge clk); cm_valid = 0; retire_cnt = 0;
    if ($urandom_range(0, 4) == 0) begin
      cm_valid = 1; #1;
      check(upd_drop, "second commit while updating is dropped");
      if (upd_drop) n_drop++;
      @(negedge clk); cm_valid = 0;
    end
    // decode goes on past the trace; it waits while the trace is copied out
    if ($urandom_range(0, 1) == 0) begin
      for (int k = 0; k < W; k++) g[k] = ins(K_OK, b, n_after + k);
      offer(g, W, 0, sent);
    end
    // model of the update
    tlen  = (n_after > MT) ? MT : n_after;
    chain = (chain_e < n_after) ? chain_e : n_after;
    nc = m_cnt[b] + 1;
    nm = (m_mean[b] * m_cnt[b] + chain) / nc;
    m_mean[b] = nm; m_cnt[b] = nc; v = nm * nc;
    slot = -1;
    for (int i = 0; i < BE; i++) if (c_v[i] && c_b[i] == b) slot = i;
    if (slot >= 0) begin c_val[slot] = v; n_valupd++; end
    else begin
      bit fr; int mi, mv;
      fr = 0; mi = 0; mv = c_val[0];
      for (int i = 0; i < BE; i++) if (!fr && !c_v[i]) begin fr = 1; mi = i; mv = 0; end
      if (!fr) for (int i = 1; i < BE; i++) if (c_val[i] < mv) begin mi = i; mv = c_val[i]; end
      if (tlen > 0 && (fr || v > mv)) begin
        c_v[mi] = 1; c_b[mi] = b; c_val[mi] = v; c_len[mi] = tlen; n_insert++;
      end else n_reject++;
    end
    // retire the rest while the update runs
    while (occ > 0) begin
      int r;
      r = (occ < W) ? occ : W;
      @(negedge clk); retire_cnt = 3'(r);
      @(posedge clk); occ -= r;
      @(negedge clk); retire_cnt = 0;
    end
  endtask

  int ev_ins_seen = 0, ev_val_seen = 0, ev_rej_seen = 0;
  always @(posedge clk) begin
    if (ev_insert) ev_ins_seen++;
    if (ev_value_update) ev_val_seen++;
    if (ev_reject) ev_rej_seen++;
  end

  initial begin
    dec_valid = 0; dec_instr = '0; rn_ready = 1; mp_valid = 0; mp_addr = 0; mp_rob_idx = 0;
    cm_valid = 0; cm_addr = 0; cm_rob_idx = 0; retire_cnt = 0;
    for (int b = 0; b < NB; b++) begin m_mean[b] = 0; m_cnt[b] = 0; end
    for (int i = 0; i < BE; i++) begin c_v[i] = 0; c_b[i] = 0; c_val[i] = 0; c_len[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < 300; e++) episode($urandom_range(0, NB - 1));
    while (upd_busy) @(negedge clk);
    repeat (2) @(negedge clk);
    check(ev_ins_seen == n_insert && ev_val_seen == n_valupd && ev_rej_seen == n_reject,
          $sformatf("update outcomes %0d/%0d %0d/%0d %0d/%0d", ev_ins_seen, n_insert,
                    ev_val_seen, n_valupd, ev_rej_seen, n_reject));
    $display("hit %0d miss %0d insert %0d value-update %0d reject %0d drop %0d hold-full %0d hold-copy %0d flush %0d",
             n_hit, n_miss, n_insert, n_valupd, n_reject, n_drop, n_hold_full, n_hold_lock, n_flush);
    check(n_hit > 0, "trace cache hit and replay occurred");
    check(n_miss > 0, "miss occurred");
    check(n_insert > 0, "insertion/eviction occurred");
    check(n_valupd > 0, "value update of a cached branch occurred");
    check(n_reject > 0, "rejected trace occurred");
    check(n_drop > 0, "dropped commit occurred");
    check(n_hold_full > 0, "input held for a full trace buffer");
    check(n_hold_lock > 0, "input held during a trace copy");
    check(n_flush > 0, "flush occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
