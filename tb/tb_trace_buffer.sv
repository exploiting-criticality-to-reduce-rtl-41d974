// tb_trace_buffer: random writes, retires, flushes and locks against a model
// of a 16-entry circular buffer; checks write pointer, occupancy, the
// full/lock hold on input and the data read back at every position.
module tb_trace_buffer;
  localparam int W = 4, D = 16, IW = 16;
  int checks = 0, failures = 0;
  int holds_full = 0, holds_lock = 0;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] iv;
  logic [W-1:0][IW-1:0] ii, rd;
  logic ready, fv, lock;
  logic [3:0] wp, fp, rp;
  logic [2:0] rc;
  logic [4:0] cnt;

  trace_buffer #(.WIDTH(W), .DEPTH(D), .INSTR_W(IW)) dut (
    .clk, .rst_n, .in_valid(iv), .in_instr(ii), .in_ready(ready), .wr_ptr(wp),
    .retire_cnt(rc), .flush_valid(fv), .flush_ptr(fp), .lock(lock),
    .rd_ptr(rp), .rd_instr(rd), .count(cnt));

  always #5 clk = ~clk;

  logic [IW-1:0] mem [D];
  int m_wp = 0, m_head = 0, m_cnt = 0;
  int seq = 1;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    iv = 0; ii = '0; fv = 0; fp = 0; lock = 0; rp = 0; rc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int n, r, live;
      bit exp_ready;
      @(negedge clk);
      n = $urandom_range(0, W);
      iv = 4'((1 << n) - 1);
      for (int k = 0; k < W; k++) ii[k] = IW'(seq + k);
      lock = ($urandom_range(0, 9) == 0);
      fv = ($urandom_range(0, 24) == 0) && (m_cnt > 0);
      live = m_cnt;
      fp = 4'(m_head + $urandom_range(0, (live > 0) ? live - 1 : 0));
      r = $urandom_range(0, (m_cnt < W) ? m_cnt : W);
      if (fv && r > int'(4'(fp - 4'(m_head))) + 1) r = int'(4'(fp - 4'(m_head))) + 1;
      rc = 3'(r);
      #1;
      exp_ready = !lock && (m_cnt <= D - W);
      check(ready == exp_ready, "in_ready");
      check(int'(wp) == m_wp && int'(cnt) == m_cnt, "pointer/count");
      if (!ready && n > 0) begin if (lock) holds_lock++; else holds_full++; end
      @(posedge clk);
      // model update
      if (fv) begin
        m_cnt = int'(4'(fp - 4'(m_head))) + 1 - r;
        m_wp  = (int'(fp) + 1) % D;
      end else begin
        if (exp_ready && n > 0) begin
          for (int k = 0; k < n; k++) mem[(m_wp + k) % D] = IW'(seq + k);
          m_wp = (m_wp + n) % D;
          m_cnt += n;
        end
        m_cnt -= r;
      end
      m_head = (m_head + r) % D;
      seq += W;
      // read back every live position
      #1;
      iv = 0; fv = 0; rc = 0; lock = 0;
      for (int p = 0; p < m_cnt; p += W) begin
        rp = 4'(m_head + p); #1;
        for (int k = 0; k < W; k++)
          if (p + k < m_cnt) check(rd[k] == mem[(m_head + p + k) % D], "read data");
      end
    end
    check(holds_full > 0, "full hold occurred");
    check(holds_lock > 0, "lock hold occurred");
    $display("holds: full %0d lock %0d", holds_full, holds_lock);
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
