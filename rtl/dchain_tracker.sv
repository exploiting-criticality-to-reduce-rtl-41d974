// dchain_tracker: length of the critical D (decode) chain after each branch.
//
// One saturating counter and one "active" bit per reorder-buffer entry. When a
// branch is dispatched into ROB entry i, counter i is cleared and made active.
// Every later instruction that the criticality predictor marks D-critical
// increments all active counters; the first instruction that is not
// D-critical ends the chain of every active counter (clears its active bit),
// so each counter holds the number of consecutive D-critical instructions
// after its branch. This is the counting rule of the design; keeping the
// counters in a table indexed by ROB entry is one counter per ROB entry, the
// maximum the rule allows.
//
// Dispatch: up to WIDTH instructions per cycle, valid lanes contiguous from
// lane 0, occupying ROB entries disp_base, disp_base+1, ... in lane order.
// Lanes are applied in order within the cycle.
// Misprediction (flush_valid): the wrong-path instructions counted for the
// mispredicted branch are discarded: its counter restarts at 0 and stays
// active for the correct path, and every other chain is ended (this design's
// choice for chains that span a redirect).
// Read: rd_len is the counter of entry rd_idx, combinationally; updates take
// effect at the next clock edge.
module dchain_tracker #(
  parameter int unsigned WIDTH       = crit_pkg::WIDTH,
  parameter int unsigned ROB_ENTRIES = crit_pkg::ROB_ENTRIES,
  parameter int unsigned CHAIN_W     = crit_pkg::CHAIN_W,
  localparam int unsigned IDX_W      = $clog2(ROB_ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic [WIDTH-1:0]   disp_valid,
  input  logic [WIDTH-1:0]   disp_is_branch,
  input  logic [WIDTH-1:0]   disp_dcrit,
  input  logic [IDX_W-1:0]   disp_base,
  // misprediction of the branch in ROB entry flush_idx
  input  logic               flush_valid,
  input  logic [IDX_W-1:0]   flush_idx,
  // chain length read (at commit)
  input  logic [IDX_W-1:0]   rd_idx,
  output logic [CHAIN_W-1:0] rd_len,
  output logic               rd_active
);

  localparam logic [CHAIN_W-1:0] CHAIN_MAX = '1;

  logic [CHAIN_W-1:0] cnt_q [ROB_ENTRIES];
  logic [CHAIN_W-1:0] cnt_d [ROB_ENTRIES];
  logic               act_q [ROB_ENTRIES];
  logic               act_d [ROB_ENTRIES];

  always_comb begin
    for (int e = 0; e < ROB_ENTRIES; e++) begin
      cnt_d[e] = cnt_q[e];
      act_d[e] = act_q[e];
      if (flush_valid) begin
        act_d[e] = (IDX_W'(e) == flush_idx);
        if (IDX_W'(e) == flush_idx) cnt_d[e] = '0;
      end else begin
        for (int k = 0; k < WIDTH; k++) begin
          if (disp_valid[k]) begin
            if (disp_is_branch[k] && (disp_base + IDX_W'(k) == IDX_W'(e))) begin
              cnt_d[e] = '0;
              act_d[e] = 1'b1;
            end else if (act_d[e]) begin
              if (disp_dcrit[k]) begin
                if (cnt_d[e] != CHAIN_MAX) cnt_d[e] = cnt_d[e] + 1'b1;
              end else begin
                act_d[e] = 1'b0;
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ROB_ENTRIES; e++) begin
        cnt_q[e] <= '0;
        act_q[e] <= 1'b0;
      end
    end else begin
      for (int e = 0; e < ROB_ENTRIES; e++) begin
        cnt_q[e] <= cnt_d[e];
        act_q[e] <= act_d[e];
      end
    end
  end

  assign rd_len    = cnt_q[rd_idx];
  assign rd_active = act_q[rd_idx];

endmodule
