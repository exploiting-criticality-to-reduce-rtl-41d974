// tb_bmtc_sequencer: replays of cached traces of several lengths with random
// rename back-pressure; checks each delivered instruction and lane mask, the
// number of cycles a replay takes (ceil(len/WIDTH) accepted rows), misses,
// zero-length entries and a restart by a second misprediction.
module tb_bmtc_sequencer;
  localparam int E = 5, W = 4, MT = 10, IW = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic mp_valid, hit, skip_valid, active, out_ready;
  logic [2:0] hit_idx, rd_idx;
  logic [3:0] hit_tlen, skip_len;
  logic [1:0] rd_row;
  logic [W-1:0][IW-1:0] rd_data, out_instr;
  logic [W-1:0] out_valid;

  bmtc_sequencer #(.ENTRIES(E), .WIDTH(W), .MAX_TRACE(MT), .INSTR_W(IW)) dut (.*);

  always #5 clk = ~clk;
  // trace store stand-in: instruction i of entry e is e*256 + i
  always_comb for (int k = 0; k < W; k++) rd_data[k] = IW'(int'(rd_idx) * 256 + int'(rd_row) * W + k);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic replay(input int e, input int len, input bit h, input int stop_after);
    int got, rows, cyc;
    @(negedge clk);
    mp_valid = 1; hit = h; hit_idx = 3'(e); hit_tlen = 4'(len); #1;
    check(skip_valid == (h && len > 0) && (!skip_valid || int'(skip_len) == len), "skip to fetch");
    @(negedge clk);
    mp_valid = 0;
    got = 0; rows = 0; cyc = 0;
    while (active && cyc < 100) begin
      if (stop_after >= 0 && rows == stop_after) return;
      out_ready = ($urandom_range(0, 2) != 0); #1;
      for (int k = 0; k < W; k++) begin
        check(out_valid[k] == (got + k < len), "lane mask");
        if (out_valid[k]) check(out_instr[k] == IW'(e * 256 + got + k), "instruction order");
      end
      @(negedge clk);
      if (out_ready) begin got += W; rows++; end
      cyc++;
    end
    check(!(h && len > 0) || rows == (len + W - 1) / W, "rows to replay");
    check((h && len > 0) || cyc == 0, "miss leaves decoder selected");
  endtask

  initial begin
    mp_valid = 0; hit = 0; hit_idx = 0; hit_tlen = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    replay(2, 10, 1, -1);
    replay(0, 4, 1, -1);
    replay(4, 1, 1, -1);
    replay(3, 7, 0, -1);
    replay(1, 0, 1, -1);
    replay(1, 9, 1, 1);     // interrupted after one row by the next misprediction
    replay(3, 6, 1, -1);
    replay(0, 8, 1, 0);     // interrupted, then a miss stops it
    replay(0, 8, 0, -1);
    for (int i = 0; i < 200; i++) replay($urandom_range(0, E - 1), $urandom_range(0, MT), $urandom_range(0, 3) != 0, -1);
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
