// tb_value_compute: checks the mean/count update and the three value schemes
// against an integer model on random and corner-case records (empty record,
// saturated count, maximum lengths).
module tb_value_compute;
  localparam int CW = 9, NW = 16, VW = CW + NW;
  int checks = 0, failures = 0;

  logic          old_valid;
  logic [CW-1:0] old_mean, new_len;
  logic [NW-1:0] old_cnt;
  logic [CW-1:0] m0, m1, m2;
  logic [NW-1:0] c0, c1, c2;
  logic [VW-1:0] v0, v1, v2;

  value_compute #(.SCHEME(crit_pkg::VS_MEAN))     u_mean (old_valid, old_mean, old_cnt, new_len, m0, c0, v0);
  value_compute #(.SCHEME(crit_pkg::VS_TOTALS))   u_tot  (old_valid, old_mean, old_cnt, new_len, m1, c1, v1);
  value_compute #(.SCHEME(crit_pkg::VS_WEIGHTED)) u_wgt  (old_valid, old_mean, old_cnt, new_len, m2, c2, v2);

  task automatic check_one();
    longint mean, cnt, ncnt, nmean;
    mean = old_valid ? longint'(old_mean) : 0;
    cnt  = old_valid ? longint'(old_cnt)  : 0;
    ncnt = (cnt == 65535) ? 65535 : cnt + 1;
    nmean = (mean * (ncnt - 1) + longint'(new_len)) / ncnt;
    #1;
    checks++;
    if (m0 != CW'(nmean) || m1 != CW'(nmean) || m2 != CW'(nmean) ||
        c0 != NW'(ncnt) || c2 != NW'(ncnt) ||
        v0 != VW'(nmean) || v1 != VW'(ncnt) || v2 != VW'(nmean * ncnt)) begin
      failures++;
      $display("FAIL valid=%0d mean=%0d cnt=%0d len=%0d -> mean %0d/%0d cnt %0d/%0d vals %0d %0d %0d",
               old_valid, old_mean, old_cnt, new_len, m2, nmean, c2, ncnt, v0, v1, v2);
    end
  endtask

  initial begin
    // first misprediction of a branch: mean = length, count = 1
    old_valid = 0; old_mean = 123; old_cnt = 77; new_len = 40; check_one();
    // mean of 10 and 30 is 20
    old_valid = 1; old_mean = 10; old_cnt = 1; new_len = 30; check_one();
    // saturated count
    old_valid = 1; old_mean = 500; old_cnt = '1; new_len = 0; check_one();
    old_valid = 1; old_mean = '1; old_cnt = 1000; new_len = '1; check_one();
    for (int i = 0; i < 2000; i++) begin
      old_valid = ($urandom_range(0, 7) != 0);
      old_mean  = CW'($urandom);
      old_cnt   = (i % 3 == 0) ? NW'($urandom_range(0, 40)) : NW'($urandom);
      new_len   = CW'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
