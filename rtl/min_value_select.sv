// min_value_select: finds the weakest entry of the trace cache.
//
// Given the valid bits and replacement values of the N entries, returns the
// entry a new trace should replace: the lowest-numbered empty entry if there
// is one (has_free high, min_value 0), otherwise the entry with the smallest
// value, the lowest-numbered one on a tie. A larger value means a trace that
// is worth more, so the smallest value is the weakest. Combinational linear
// scan, which is small for the few entries the trace cache has.
module min_value_select #(
  parameter int unsigned N       = crit_pkg::BMTC_ENTRIES,
  parameter int unsigned VALUE_W = crit_pkg::VALUE_W,
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]              valid,
  input  logic [N-1:0][VALUE_W-1:0] value,
  output logic [IDX_W-1:0]          min_idx,
  output logic [VALUE_W-1:0]        min_value,
  output logic                      has_free
);

  always_comb begin
    has_free  = 1'b0;
    min_idx   = '0;
    min_value = '1;
    for (int i = 0; i < N; i++) begin
      if (!has_free) begin
        if (!valid[i]) begin
          has_free  = 1'b1;
          min_idx   = IDX_W'(i);
          min_value = '0;
        end else if (value[i] < min_value || i == 0) begin
          min_idx   = IDX_W'(i);
          min_value = value[i];
        end
      end
    end
  end

endmodule
