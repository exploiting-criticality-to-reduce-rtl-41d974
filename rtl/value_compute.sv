// value_compute: new ABIB record and replacement value of a mispredicted branch.
//
// The ABIB keeps, per branch, the running mean of its critical D chain length
// and the number of times it was mispredicted. When the branch is mispredicted
// again with chain length new_len, the record becomes
//   cnt'  = cnt + 1                         (saturating at its maximum)
//   mean' = (mean * (cnt' - 1) + new_len) / cnt'
// computed with one multiplier, one adder and one divider, truncating, so the
// mean is an approximation as with any finite counters. Once the count is
// saturated the same formula keeps weighting the newest length by 1/cnt'.
// A branch with no record (old_valid low) starts from mean 0, count 0.
//
// The replacement value used by the trace cache is chosen by SCHEME:
//   VS_MEAN     mean'           (mean chain length only)
//   VS_TOTALS   cnt'            (number of mispredictions only)
//   VS_WEIGHTED mean' * cnt'    (mean weighted by the number of mispredictions)
// VS_WEIGHTED is the default: it is the scheme that gave the best results.
// Purely combinational; the caller registers the results.
module value_compute
#(
  parameter crit_pkg::value_scheme_e SCHEME = crit_pkg::VS_WEIGHTED,
  parameter int unsigned   CHAIN_W = crit_pkg::CHAIN_W,
  parameter int unsigned   CNT_W   = crit_pkg::CNT_W,
  localparam int unsigned  VALUE_W = CHAIN_W + CNT_W
) (
  input  logic               old_valid,
  input  logic [CHAIN_W-1:0] old_mean,
  input  logic [CNT_W-1:0]   old_cnt,
  input  logic [CHAIN_W-1:0] new_len,
  output logic [CHAIN_W-1:0] new_mean,
  output logic [CNT_W-1:0]   new_cnt,
  output logic [VALUE_W-1:0] value
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CHAIN_W-1:0] mean_in;
  logic [CNT_W-1:0]   cnt_in, weight;
  logic [VALUE_W:0]   sum;
  logic [VALUE_W:0]   quot;

  always_comb begin
    mean_in = old_valid ? old_mean : '0;
    cnt_in  = old_valid ? old_cnt  : '0;
    new_cnt = (cnt_in == CNT_MAX) ? CNT_MAX : cnt_in + 1'b1;
    weight  = new_cnt - 1'b1;
    sum     = (VALUE_W+1)'(mean_in) * (VALUE_W+1)'(weight) + (VALUE_W+1)'(new_len);
    quot    = sum / (VALUE_W+1)'(new_cnt);
    new_mean = CHAIN_W'(quot);
    unique case (SCHEME)
      crit_pkg::VS_MEAN:   value = VALUE_W'(new_mean);
      crit_pkg::VS_TOTALS: value = VALUE_W'(new_cnt);
      default:   value = VALUE_W'(new_mean) * VALUE_W'(new_cnt);
    endcase
  end

endmodule
