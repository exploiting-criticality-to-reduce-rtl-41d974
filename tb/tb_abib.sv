// tb_abib: record updates of several branches (including two that alias to
// the same direct-mapped entry) checked against a running mean/count model,
// with the update latency, and trace-store writes read back row by row.
module tb_abib;
  localparam int W = 4, E = 8, MT = 10, IW = 16, AW = 32, CW = 9, NW = 16, VW = CW + NW;
  localparam int ROWS = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic upd_en, upd_done, tr_wr_en, tr_rd_en;
  logic [AW-1:0] upd_addr, tr_wr_addr, tr_rd_addr;
  logic [CW-1:0] upd_len, upd_mean;
  logic [3:0] upd_tlen, rd_tlen;
  logic [VW-1:0] upd_value;
  logic [NW-1:0] upd_cnt;
  logic [1:0] tr_wr_row, tr_rd_row;
  logic [W-1:0][IW-1:0] tr_wr_data, tr_rd_data;

  abib #(.ENTRIES(E), .WIDTH(W), .MAX_TRACE(MT), .INSTR_W(IW), .ADDR_W(AW),
         .CHAIN_W(CW), .CNT_W(NW)) dut (.*);

  always #5 clk = ~clk;

  // model, keyed by address
  int m_sum [int];   // used only for the exact small-count case
  int m_mean [int], m_cnt [int];
  int m_tag [E];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic update(input int addr, input int len, input int tlen);
    int idx, mean, cnt, ncnt, nmean, lat;
    idx = (addr >> 3) % E;
    if (m_tag[idx] == addr && m_cnt.exists(addr)) begin mean = m_mean[addr]; cnt = m_cnt[addr]; end
    else begin mean = 0; cnt = 0; end
    ncnt = cnt + 1;
    nmean = (mean * cnt + len) / ncnt;
    @(negedge clk);
    upd_en = 1; upd_addr = AW'(addr); upd_len = CW'(len); upd_tlen = 4'(tlen);
    @(negedge clk);
    upd_en = 0;
    lat = 1;
    while (!upd_done && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 1, "update latency 1 cycle after request");
    check(int'(upd_mean) == nmean && int'(upd_cnt) == ncnt && int'(upd_value) == nmean * ncnt,
          $sformatf("record of %0h: mean %0d/%0d cnt %0d/%0d", addr, upd_mean, nmean, upd_cnt, ncnt));
    m_tag[idx] = addr; m_mean[addr] = nmean; m_cnt[addr] = ncnt;
    @(negedge clk);
  endtask

  initial begin
    upd_en = 0; tr_wr_en = 0; tr_rd_en = 0; upd_addr = 0; upd_len = 0; upd_tlen = 0;
    tr_wr_addr = 0; tr_rd_addr = 0; tr_wr_row = 0; tr_rd_row = 0; tr_wr_data = '0;
    for (int i = 0; i < E; i++) m_tag[i] = -1;
    repeat (2) @(posedge clk); rst_n = 1;
    update('h1000, 40, 10);
    update('h1000, 20, 10);   // mean 30, count 2
    update('h1000, 60, 10);   // mean 40, count 3
    update('h2008, 100, 5);
    update('h1040, 7, 3);     // aliases with 0x1000: replaces it
    update('h1000, 12, 10);   // record was lost: starts over
    for (int i = 0; i < 200; i++)
      update((int'($urandom_range(2, 7)) + 8 * int'($urandom_range(0, 1))) << 3 | 'h4000, $urandom_range(0, 511), $urandom_range(0, 10));

    // trace store: write rows of two branches, read them back
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        tr_wr_en = 1; tr_wr_addr = (b == 0) ? 'h2008 : 'h4010; tr_wr_row = 2'(r);
        for (int k = 0; k < W; k++) tr_wr_data[k] = IW'(b * 256 + r * 16 + k);
      end
    @(negedge clk); tr_wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < ROWS; r++) begin
        tr_rd_en = 1; tr_rd_addr = (b == 0) ? 'h2008 : 'h4010; tr_rd_row = 2'(r);
        @(negedge clk);
        for (int k = 0; k < W; k++)
          check(tr_rd_data[k] == IW'(b * 256 + r * 16 + k), "trace row read back");
      end
    tr_rd_addr = 'h2008; #1;
    check(rd_tlen == 4'd5, "stored trace length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
