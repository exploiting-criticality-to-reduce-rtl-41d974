// bmtc: Branch Misprediction Trace Cache.
//
// A small fully-associative cache of traces of predecoded instructions, each
// entry tagged with the address of the mispredicted branch the trace follows
// and carrying a replacement value computed from the branch's ABIB record.
// On a misprediction that hits, the trace is sent to rename in place of the
// decoder's output, removing the front-end latency for those instructions.
//
// Ports, all synchronous to clk:
//  * lk_*  : lookup by branch address (the misprediction from execute);
//            hit, entry index and trace length, combinational.
//  * up_*  : a second lookup by branch address, for the update controller.
//  * rd_*  : trace read, two indices: entry rd_idx and row rd_row (instruction
//            index / WIDTH); rd_data holds WIDTH instructions, combinational.
//  * wr_*  : trace write, one row of WIDTH instructions per cycle.
//  * inv_* : clears an entry's valid bit (before it is refilled).
//  * ent_* : writes an entry's tag, value and trace length and sets valid.
//  * val_* : replaces an entry's value (branch already cached).
//  * min_* : the weakest entry (Min Value Computation): first empty entry,
//            else the smallest value.
// A trace has at most MAX_TRACE instructions. Entry count and trace length
// are the evaluated configuration (5 entries, 100 instructions of 8 bytes);
// the row organisation and port set are this design's choice.
module bmtc #(
  parameter int unsigned ENTRIES   = crit_pkg::BMTC_ENTRIES,
  parameter int unsigned WIDTH     = crit_pkg::WIDTH,
  parameter int unsigned MAX_TRACE = crit_pkg::MAX_TRACE,
  parameter int unsigned INSTR_W   = crit_pkg::INSTR_W,
  parameter int unsigned ADDR_W    = crit_pkg::ADDR_W,
  parameter int unsigned VALUE_W   = crit_pkg::VALUE_W,
  localparam int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned ROWS     = (MAX_TRACE + WIDTH - 1) / WIDTH,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned TLEN_W   = $clog2(MAX_TRACE + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // lookup from execute
  input  logic [ADDR_W-1:0]             lk_addr,
  output logic                          lk_hit,
  output logic [IDX_W-1:0]              lk_idx,
  output logic [TLEN_W-1:0]             lk_tlen,
  // lookup for the update controller
  input  logic [ADDR_W-1:0]             up_addr,
  output logic                          up_hit,
  output logic [IDX_W-1:0]              up_idx,
  // trace read (to rename)
  input  logic [IDX_W-1:0]              rd_idx,
  input  logic [ROW_W-1:0]              rd_row,
  output logic [WIDTH-1:0][INSTR_W-1:0] rd_data,
  // trace write
  input  logic                          wr_en,
  input  logic [IDX_W-1:0]              wr_idx,
  input  logic [ROW_W-1:0]              wr_row,
  input  logic [WIDTH-1:0][INSTR_W-1:0] wr_data,
  // entry management
  input  logic                          inv_en,
  input  logic [IDX_W-1:0]              inv_idx,
  input  logic                          ent_en,
  input  logic [IDX_W-1:0]              ent_idx,
  input  logic [ADDR_W-1:0]             ent_tag,
  input  logic [VALUE_W-1:0]            ent_value,
  input  logic [TLEN_W-1:0]             ent_tlen,
  input  logic                          val_en,
  input  logic [IDX_W-1:0]              val_idx,
  input  logic [VALUE_W-1:0]            val_value,
  // weakest entry
  output logic [IDX_W-1:0]              min_idx,
  output logic [VALUE_W-1:0]            min_value,
  output logic                          min_free
);

  logic [ENTRIES-1:0]              valid_q;
  logic [ADDR_W-1:0]               tag_q   [ENTRIES];
  logic [ENTRIES-1:0][VALUE_W-1:0] value_q;
  logic [TLEN_W-1:0]               tlen_q  [ENTRIES];
  logic [WIDTH-1:0][INSTR_W-1:0]   trace_q [ENTRIES][ROWS];

  always_comb begin
    lk_hit = 1'b0; lk_idx = '0;
    up_hit = 1'b0; up_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && tag_q[i] == lk_addr && !lk_hit) begin
        lk_hit = 1'b1; lk_idx = IDX_W'(i);
      end
      if (valid_q[i] && tag_q[i] == up_addr && !up_hit) begin
        up_hit = 1'b1; up_idx = IDX_W'(i);
      end
    end
  end
  assign lk_tlen = tlen_q[lk_idx];
  assign rd_data = trace_q[rd_idx][rd_row];

  min_value_select #(.N(ENTRIES), .VALUE_W(VALUE_W)) u_min (
    .valid     (valid_q),
    .value     (value_q),
    .min_idx   (min_idx),
    .min_value (min_value),
    .has_free  (min_free)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      value_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag_q[i]  <= '0;
        tlen_q[i] <= '0;
      end
    end else begin
      if (inv_en) valid_q[inv_idx] <= 1'b0;
      if (ent_en) begin
        valid_q[ent_idx] <= 1'b1;
        tag_q[ent_idx]   <= ent_tag;
        value_q[ent_idx] <= ent_value;
        tlen_q[ent_idx]  <= ent_tlen;
      end
      if (val_en) value_q[val_idx] <= val_value;
    end
  end

  always_ff @(posedge clk)
    if (wr_en) trace_q[wr_idx][wr_row] <= wr_data;

endmodule
