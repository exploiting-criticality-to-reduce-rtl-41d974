// trace_buffer: circular buffer of decoded instructions feeding the trace cache.
//
// It holds the instructions that enter rename, in program order, one entry per
// reorder-buffer entry (DEPTH = ROB entries), so that the buffer position of
// an instruction equals its ROB index; the position saved for a branch is
// therefore its ROB index. When a mispredicted branch reaches the head of the
// ROB, the update controller reads the trace that follows it through the read
// port.
//
// Input: up to WIDTH instructions per cycle, valid lanes contiguous from lane
// 0, written at wr_ptr, wr_ptr+1, ... in_ready is low when fewer than WIDTH
// entries are free or while lock is high (a trace is being copied out); the
// sender then holds its instructions. Following the design, the buffer takes
// no input while full or while its data is being copied; holding the sender
// instead of dropping instructions, so that positions stay ROB indices, is
// this design's choice.
// retire_cnt frees the oldest entries (instructions committing).
// flush_valid: a misprediction of the branch at position flush_ptr discards
// every younger entry; writing resumes at flush_ptr+1. Flush wins over input
// in the same cycle.
// Read: rd_instr[k] = entry rd_ptr+k, combinationally.
module trace_buffer #(
  parameter int unsigned WIDTH   = crit_pkg::WIDTH,
  parameter int unsigned DEPTH   = crit_pkg::ROB_ENTRIES,
  parameter int unsigned INSTR_W = crit_pkg::INSTR_W,
  localparam int unsigned IDX_W  = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [WIDTH-1:0]           in_valid,
  input  logic [WIDTH-1:0][INSTR_W-1:0] in_instr,
  output logic                       in_ready,
  output logic [IDX_W-1:0]           wr_ptr,
  input  logic [$clog2(WIDTH+1)-1:0] retire_cnt,
  input  logic                       flush_valid,
  input  logic [IDX_W-1:0]           flush_ptr,
  input  logic                       lock,
  input  logic [IDX_W-1:0]           rd_ptr,
  output logic [WIDTH-1:0][INSTR_W-1:0] rd_instr,
  output logic [IDX_W:0]             count
);

  logic [INSTR_W-1:0] mem [DEPTH];
  logic [IDX_W-1:0]   wr_q, head_q;
  logic [IDX_W:0]     count_q;
  logic [$clog2(WIDTH+1)-1:0] n_in;
  logic               do_write;

  always_comb begin
    n_in = '0;
    for (int k = 0; k < WIDTH; k++)
      if (in_valid[k]) n_in = n_in + 1'b1;
  end

  assign in_ready = !lock && (count_q <= (IDX_W+1)'(DEPTH - WIDTH));
  assign do_write = in_ready && !flush_valid && (in_valid != '0);
  assign wr_ptr   = wr_q;
  assign count    = count_q;

  always_ff @(posedge clk) begin
    if (do_write)
      for (int k = 0; k < WIDTH; k++)
        if (in_valid[k]) mem[wr_q + IDX_W'(k)] <= in_instr[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q    <= '0;
      head_q  <= '0;
      count_q <= '0;
    end else begin
      head_q <= head_q + IDX_W'(retire_cnt);
      if (flush_valid) begin
        wr_q    <= flush_ptr + 1'b1;
        count_q <= {1'b0, flush_ptr - head_q} + 1'b1 - (IDX_W+1)'(retire_cnt);
      end else begin
        wr_q    <= wr_q + (do_write ? IDX_W'(n_in) : '0);
        count_q <= count_q + (do_write ? (IDX_W+1)'(n_in) : '0) - (IDX_W+1)'(retire_cnt);
      end
    end
  end

  always_comb
    for (int k = 0; k < WIDTH; k++)
      rd_instr[k] = mem[rd_ptr + IDX_W'(k)];

endmodule
