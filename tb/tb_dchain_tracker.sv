// tb_dchain_tracker: directed chains (branch followed by k critical
// instructions then a non-critical one, saturation, flush restart) and a
// random dispatch stream checked against a per-instruction reference model.
module tb_dchain_tracker;
  localparam int W = 4, R = 16, CW = 5;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] dv, db, dc;
  logic [3:0]   base, fidx, ridx;
  logic         fv;
  logic [CW-1:0] len;
  logic          act;

  dchain_tracker #(.WIDTH(W), .ROB_ENTRIES(R), .CHAIN_W(CW)) dut (
    .clk, .rst_n, .disp_valid(dv), .disp_is_branch(db), .disp_dcrit(dc), .disp_base(base),
    .flush_valid(fv), .flush_idx(fidx), .rd_idx(ridx), .rd_len(len), .rd_active(act));

  always #5 clk = ~clk;

  // reference
  int  mcnt [R];
  bit  mact [R];

  task automatic model_step();
    if (fv) begin
      for (int e = 0; e < R; e++) mact[e] = (e == fidx);
      mcnt[fidx] = 0;
      return;
    end
    for (int k = 0; k < W; k++) begin
      if (!dv[k]) continue;
      // the instruction first extends or ends older chains ...
      for (int e = 0; e < R; e++) begin
        if (e == int'(4'(base + k)) && db[k]) continue;
        if (mact[e]) begin
          if (dc[k]) begin if (mcnt[e] < 31) mcnt[e]++; end
          else mact[e] = 0;
        end
      end
      // ... and a branch starts its own
      if (db[k]) begin mcnt[int'(4'(base + k))] = 0; mact[int'(4'(base + k))] = 1; end
    end
  endtask

  task automatic cyc();
    @(posedge clk); model_step(); #1;
    dv = 0; db = 0; dc = 0; fv = 0;
  endtask

  task automatic expect_len(input int idx, input int exp_len, input string what);
    ridx = 4'(idx); #1;
    checks++;
    if (int'(len) != exp_len) begin
      failures++; $display("FAIL %s: entry %0d len %0d expected %0d", what, idx, len, exp_len);
    end
  endtask

  initial begin
    dv = 0; db = 0; dc = 0; fv = 0; fidx = 0; base = 0; ridx = 0;
    for (int e = 0; e < R; e++) begin mcnt[e] = 0; mact[e] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // branch at entry 0, then 3 critical in the same group
    base = 0; dv = 4'hF; db = 4'b0001; dc = 4'b1110; cyc();
    expect_len(0, 3, "same-cycle chain");
    // 2 more critical, then a non-critical, then critical again (not counted)
    base = 4; dv = 4'hF; db = 0; dc = 4'b1011; cyc();
    expect_len(0, 5, "chain ends at first non-critical");
    // a second branch at entry 8 with 6 critical instructions
    base = 8; dv = 4'hF; db = 4'b0001; dc = 4'hE; cyc();
    base = 12; dv = 4'b0111; db = 0; dc = 4'b0111; cyc();
    expect_len(8, 6, "second chain");
    expect_len(0, 5, "first chain frozen");
    // misprediction of branch 8: restart its chain
    fv = 1; fidx = 8; cyc();
    expect_len(8, 0, "flush restart");
    base = 9; dv = 4'hF; dc = 4'hF; cyc();
    base = 13; dv = 4'hF; dc = 4'hF; cyc();
    expect_len(8, 8, "after flush");
    // saturation at 31
    for (int i = 0; i < 8; i++) begin base = 4'(base + 4); dv = 4'hF; dc = 4'hF; cyc(); end
    expect_len(8, 31, "saturation");

    // random stream
    for (int t = 0; t < 3000; t++) begin
      int n;
      n = $urandom_range(0, W);
      dv = 4'((1 << n) - 1);
      db = 4'($urandom) & 4'($urandom);
      dc = ~(4'($urandom) & 4'($urandom) & 4'($urandom));
      fv = ($urandom_range(0, 30) == 0);
      fidx = 4'($urandom);
      cyc();
      base = fv ? 4'(fidx + 1) : 4'(base + n);
      for (int e = 0; e < R; e += 5) expect_len(e, mcnt[e], "random");
    end
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
