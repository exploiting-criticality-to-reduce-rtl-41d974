// bmtc_sequencer: feeds a cached trace to rename after a misprediction.
//
// When execute reports a mispredicted branch (mp_valid) and the trace cache
// holds a trace for its address (hit), the sequencer takes over the rename
// input: from the next cycle it steps the row index through the cached trace
// and presents WIDTH instructions per cycle (fewer in the last row) on
// out_valid/out_instr, while active is high the rename input is switched
// from the decoder to the trace cache. A row advances only when out_ready is
// high (rename and trace buffer accept it). After the last row active drops
// and the decoder feeds rename again. A new misprediction while active
// restarts the sequencer on the new branch's trace, or stops it on a miss.
// Fetch is told the trace length (skip_valid/skip_len) so that it can
// continue after the cached instructions; how fetch uses it is outside this
// design.
module bmtc_sequencer #(
  parameter int unsigned ENTRIES   = crit_pkg::BMTC_ENTRIES,
  parameter int unsigned WIDTH     = crit_pkg::WIDTH,
  parameter int unsigned MAX_TRACE = crit_pkg::MAX_TRACE,
  parameter int unsigned INSTR_W   = crit_pkg::INSTR_W,
  localparam int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned ROWS     = (MAX_TRACE + WIDTH - 1) / WIDTH,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned TLEN_W   = $clog2(MAX_TRACE + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // misprediction from execute, with the trace cache lookup result
  input  logic                          mp_valid,
  input  logic                          hit,
  input  logic [IDX_W-1:0]              hit_idx,
  input  logic [TLEN_W-1:0]             hit_tlen,
  output logic                          skip_valid,
  output logic [TLEN_W-1:0]             skip_len,
  // trace cache read port
  output logic [IDX_W-1:0]              rd_idx,
  output logic [ROW_W-1:0]              rd_row,
  input  logic [WIDTH-1:0][INSTR_W-1:0] rd_data,
  // rename side
  output logic                          active,
  output logic [WIDTH-1:0]              out_valid,
  output logic [WIDTH-1:0][INSTR_W-1:0] out_instr,
  input  logic                          out_ready
);

  logic              active_q;
  logic [IDX_W-1:0]  idx_q;
  logic [ROW_W-1:0]  row_q;
  logic [TLEN_W-1:0] left_q;   // instructions still to send

  assign skip_valid = mp_valid && hit && (hit_tlen != '0);
  assign skip_len   = hit_tlen;
  assign active     = active_q;
  assign rd_idx     = idx_q;
  assign rd_row     = row_q;
  assign out_instr  = rd_data;

  always_comb
    for (int k = 0; k < WIDTH; k++)
      out_valid[k] = active_q && (TLEN_W'(k) < left_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      idx_q    <= '0;
      row_q    <= '0;
      left_q   <= '0;
    end else if (mp_valid) begin
      active_q <= skip_valid;
      idx_q    <= hit_idx;
      row_q    <= '0;
      left_q   <= hit_tlen;
    end else if (active_q && out_ready) begin
      row_q <= row_q + 1'b1;
      if (left_q <= TLEN_W'(WIDTH)) begin
        left_q   <= '0;
        active_q <= 1'b0;
      end else begin
        left_q <= left_q - TLEN_W'(WIDTH);
      end
    end
  end

endmodule
