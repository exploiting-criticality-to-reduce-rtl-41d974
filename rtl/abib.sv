// abib: Auxiliary Branch Information Buffer.
//
// A cache-like table of per-branch information, read and written by branch
// address: the running mean of the critical D chain length after the branch,
// the number of times the branch was mispredicted, and the trace of
// predecoded instructions that followed it. It is the source of the traces
// that enter the trace cache (BMTC) when an entry is replaced.
//
// Organisation (this design's choice; the structure may have any size,
// associativity and replacement): ENTRIES records, direct-mapped on address
// bits [PC_LSB +: log2(ENTRIES)], each tagged with the full branch address. A
// record whose tag differs is replaced on the next update and starts from
// mean 0, count 0.
//
// Record update (upd_en, one request at a time): cycle 0 the request is
// registered and the record read; cycle 1 value_compute forms the new mean,
// count and replacement value from the old record and upd_len, the record is
// written back with trace length upd_tlen, and upd_done pulses with
// upd_value. A new request may start in the cycle after upd_done.
//
// Trace store: TRACE_ROWS rows of WIDTH instructions per record. tr_wr_*
// writes one row; tr_rd_* reads one row, data valid in the next cycle
// (synchronous, SRAM-like). rd_tlen gives the stored trace length of the
// record addressed by tr_rd_addr.
module abib
#(
  parameter crit_pkg::value_scheme_e SCHEME = crit_pkg::VS_WEIGHTED,
  parameter int unsigned   ENTRIES   = crit_pkg::ABIB_ENTRIES,
  parameter int unsigned   WIDTH     = crit_pkg::WIDTH,
  parameter int unsigned   MAX_TRACE = crit_pkg::MAX_TRACE,
  parameter int unsigned   INSTR_W   = crit_pkg::INSTR_W,
  parameter int unsigned   ADDR_W    = crit_pkg::ADDR_W,
  parameter int unsigned   CHAIN_W   = crit_pkg::CHAIN_W,
  parameter int unsigned   CNT_W     = crit_pkg::CNT_W,
  parameter int unsigned   PC_LSB    = 3,
  localparam int unsigned  VALUE_W   = CHAIN_W + CNT_W,
  localparam int unsigned  IDX_W     = $clog2(ENTRIES),
  localparam int unsigned  ROWS      = (MAX_TRACE + WIDTH - 1) / WIDTH,
  localparam int unsigned  ROW_W     = $clog2(ROWS),
  localparam int unsigned  TLEN_W    = $clog2(MAX_TRACE + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // record update
  input  logic                          upd_en,
  input  logic [ADDR_W-1:0]             upd_addr,
  input  logic [CHAIN_W-1:0]            upd_len,
  input  logic [TLEN_W-1:0]             upd_tlen,
  output logic                          upd_done,
  output logic [VALUE_W-1:0]            upd_value,
  output logic [CHAIN_W-1:0]            upd_mean,
  output logic [CNT_W-1:0]              upd_cnt,
  // trace store
  input  logic                          tr_wr_en,
  input  logic [ADDR_W-1:0]             tr_wr_addr,
  input  logic [ROW_W-1:0]              tr_wr_row,
  input  logic [WIDTH-1:0][INSTR_W-1:0] tr_wr_data,
  input  logic                          tr_rd_en,
  input  logic [ADDR_W-1:0]             tr_rd_addr,
  input  logic [ROW_W-1:0]              tr_rd_row,
  output logic [WIDTH-1:0][INSTR_W-1:0] tr_rd_data,
  output logic [TLEN_W-1:0]             rd_tlen
);

  typedef struct packed {
    logic               valid;
    logic [ADDR_W-1:0]  tag;
    logic [CHAIN_W-1:0] mean;
    logic [CNT_W-1:0]   cnt;
    logic [TLEN_W-1:0]  tlen;
  } rec_t;

  rec_t                          rec_q [ENTRIES];
  logic [WIDTH*INSTR_W-1:0]      trace_mem [ENTRIES*ROWS];

  function automatic logic [IDX_W-1:0] idx_of(input logic [ADDR_W-1:0] a);
    return a[PC_LSB +: IDX_W];
  endfunction

  // ---- record read-modify-write ----
  logic                stage_q;
  logic [ADDR_W-1:0]   s_addr_q;
  logic [CHAIN_W-1:0]  s_len_q;
  logic [TLEN_W-1:0]   s_tlen_q;
  rec_t                s_rec_q;
  logic                old_hit;
  logic [CHAIN_W-1:0]  nmean;
  logic [CNT_W-1:0]    ncnt;
  logic [VALUE_W-1:0]  nvalue;

  assign old_hit = s_rec_q.valid && (s_rec_q.tag == s_addr_q);

  value_compute #(.SCHEME(SCHEME), .CHAIN_W(CHAIN_W), .CNT_W(CNT_W)) u_value (
    .old_valid (old_hit),
    .old_mean  (s_rec_q.mean),
    .old_cnt   (s_rec_q.cnt),
    .new_len   (s_len_q),
    .new_mean  (nmean),
    .new_cnt   (ncnt),
    .value     (nvalue)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q  <= 1'b0;
      s_addr_q <= '0;
      s_len_q  <= '0;
      s_tlen_q <= '0;
      s_rec_q  <= '0;
      for (int i = 0; i < ENTRIES; i++) rec_q[i] <= '0;
    end else begin
      stage_q <= upd_en && !stage_q;
      if (upd_en && !stage_q) begin
        s_addr_q <= upd_addr;
        s_len_q  <= upd_len;
        s_tlen_q <= upd_tlen;
        s_rec_q  <= rec_q[idx_of(upd_addr)];
      end
      if (stage_q)
        rec_q[idx_of(s_addr_q)] <= '{valid: 1'b1, tag: s_addr_q, mean: nmean,
                                     cnt: ncnt, tlen: s_tlen_q};
    end
  end

  assign upd_done  = stage_q;
  assign upd_value = nvalue;
  assign upd_mean  = nmean;
  assign upd_cnt   = ncnt;

  // ---- trace store ----
  always_ff @(posedge clk) begin
    if (tr_wr_en)
      trace_mem[int'(idx_of(tr_wr_addr)) * ROWS + int'(tr_wr_row)] <= tr_wr_data;
    if (tr_rd_en)
      tr_rd_data <= trace_mem[int'(idx_of(tr_rd_addr)) * ROWS + int'(tr_rd_row)];
  end

  assign rd_tlen = rec_q[idx_of(tr_rd_addr)].tlen;

endmodule
