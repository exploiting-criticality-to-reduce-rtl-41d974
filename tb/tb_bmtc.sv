// tb_bmtc: random entry writes, invalidations, value updates and trace row
// writes on a 5-entry cache, against a model; every cycle checks both
// lookup ports (hit, index, length), a trace row read and the weakest entry.
module tb_bmtc;
  localparam int E = 5, W = 4, MT = 10, IW = 16, AW = 32, VW = 25, ROWS = 3;
  int checks = 0, failures = 0;
  int hits = 0, evict_full = 0;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] lk_addr, up_addr, ent_tag;
  logic lk_hit, up_hit, wr_en, inv_en, ent_en, val_en, min_free;
  logic [2:0] lk_idx, up_idx, rd_idx, wr_idx, inv_idx, ent_idx, val_idx, min_idx;
  logic [3:0] lk_tlen, ent_tlen;
  logic [1:0] rd_row, wr_row;
  logic [W-1:0][IW-1:0] rd_data, wr_data;
  logic [VW-1:0] ent_value, val_value, min_value;

  bmtc #(.ENTRIES(E), .WIDTH(W), .MAX_TRACE(MT), .INSTR_W(IW), .ADDR_W(AW), .VALUE_W(VW)) dut (.*);

  always #5 clk = ~clk;

  bit m_v [E]; int m_tag [E]; int m_val [E]; int m_len [E];
  logic [W-1:0][IW-1:0] m_tr [E][ROWS];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int tag_of(int i); return 'h100 + 8 * i; endfunction

  initial begin
    wr_en = 0; inv_en = 0; ent_en = 0; val_en = 0; lk_addr = 0; up_addr = 0;
    rd_idx = 0; rd_row = 0; wr_idx = 0; wr_row = 0; wr_data = '0; inv_idx = 0;
    ent_idx = 0; ent_tag = 0; ent_value = 0; ent_tlen = 0; val_idx = 0; val_value = 0;
    for (int i = 0; i < E; i++) begin m_v[i] = 0; m_tag[i] = 0; m_val[i] = 0; m_len[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // give every trace row a known content first
    for (int i = 0; i < E; i++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        wr_en = 1; wr_idx = 3'(i); wr_row = 2'(r);
        for (int k = 0; k < W; k++) wr_data[k] = IW'(i * 64 + r * 4 + k);
        m_tr[i][r] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int ri, mi, mv; bit mf;
      @(negedge clk);
      // lookups and reads (combinational)
      lk_addr = AW'(tag_of($urandom_range(0, 9)));
      up_addr = AW'(tag_of($urandom_range(0, 9)));
      rd_idx = 3'($urandom_range(0, E - 1)); rd_row = 2'($urandom_range(0, ROWS - 1));
      #1;
      begin
        bit h; int hi; h = 0; hi = 0;
        for (int i = 0; i < E; i++) if (!h && m_v[i] && m_tag[i] == int'(lk_addr)) begin h = 1; hi = i; end
        check(lk_hit == h && (!h || (int'(lk_idx) == hi && int'(lk_tlen) == m_len[hi])), "lookup port");
        if (h) hits++;
        h = 0; hi = 0;
        for (int i = 0; i < E; i++) if (!h && m_v[i] && m_tag[i] == int'(up_addr)) begin h = 1; hi = i; end
        check(up_hit == h && (!h || int'(up_idx) == hi), "update lookup port");
      end
      if (m_v[rd_idx]) check(rd_data == m_tr[rd_idx][rd_row], "trace read");
      mf = 0; mi = 0; mv = m_val[0];
      for (int i = 0; i < E; i++) if (!mf && !m_v[i]) begin mf = 1; mi = i; mv = 0; end
      if (!mf) for (int i = 1; i < E; i++) if (m_val[i] < mv) begin mi = i; mv = m_val[i]; end
      check(min_free == mf && int'(min_idx) == mi && int'(min_value) == mv, "weakest entry");
      if (!mf) evict_full++;
      // one random write operation
      ri = $urandom_range(0, E - 1);
      case ($urandom_range(0, 3))
        0: begin
          int tg; bit dup; tg = tag_of($urandom_range(0, 9)); dup = 0;
          for (int i = 0; i < E; i++) if (m_v[i] && m_tag[i] == tg && i != ri) dup = 1;
          if (!dup) begin
            ent_en = 1; ent_idx = 3'(ri); ent_tag = AW'(tg); ent_value = VW'($urandom_range(0, 1000));
            ent_tlen = 4'($urandom_range(1, MT));
            m_v[ri] = 1; m_tag[ri] = tg; m_val[ri] = int'(ent_value); m_len[ri] = int'(ent_tlen);
          end
        end
        1: if ($urandom_range(0, 3) == 0) begin inv_en = 1; inv_idx = 3'(ri); m_v[ri] = 0; end
        2: begin val_en = 1; val_idx = 3'(ri); val_value = VW'($urandom_range(0, 1000)); m_val[ri] = int'(val_value); end
        default: begin
          wr_en = 1; wr_idx = 3'(ri); wr_row = 2'($urandom_range(0, ROWS - 1));
          for (int k = 0; k < W; k++) wr_data[k] = IW'($urandom);
          m_tr[ri][wr_row] = wr_data;
        end
      endcase
      @(posedge clk); #1;
      wr_en = 0; inv_en = 0; ent_en = 0; val_en = 0;
    end
    check(hits > 0 && evict_full > 0, "hits and full-cache minimum seen");
    $display("hits %0d full %0d", hits, evict_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
