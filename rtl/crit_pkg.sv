// crit_pkg: shared sizes and types of the branch-misprediction trace cache.
//
// The numbers follow the evaluated configuration: a 4-wide core with a
// 128-entry reorder buffer, traces of at most 100 predecoded instructions of
// 8 bytes each, and a 5-entry trace cache. Widths of the chain-length and
// misprediction counters are this design's own choice, sized from the largest
// values reported for the benchmarks (chains below 500, up to about 30,000
// mispredictions of one branch).
package crit_pkg;

  // Front-end / dispatch width (4-way superscalar core).
  localparam int unsigned WIDTH = 4;
  // Reorder-buffer entries; the trace buffer has the same number of entries.
  localparam int unsigned ROB_ENTRIES = 128;
  // Longest trace kept, in instructions.
  localparam int unsigned MAX_TRACE = 100;
  // Entries of the trace cache.
  localparam int unsigned BMTC_ENTRIES = 5;
  // Entries of the (finite, direct-mapped) auxiliary branch information buffer.
  localparam int unsigned ABIB_ENTRIES = 64;

  // A predecoded instruction: 8 bytes.
  localparam int unsigned INSTR_W = 64;
  // Branch address width.
  localparam int unsigned ADDR_W = 32;
  // Critical D chain length counter (saturating).
  localparam int unsigned CHAIN_W = 9;
  // Misprediction count per branch (saturating).
  localparam int unsigned CNT_W = 16;
  // Replacement value: wide enough for mean * count.
  localparam int unsigned VALUE_W = CHAIN_W + CNT_W;

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [CHAIN_W-1:0] chain_t;
  typedef logic [CNT_W-1:0]   cnt_t;
  typedef logic [VALUE_W-1:0] value_t;

  // How the replacement value of a branch is formed from its ABIB record.
  typedef enum logic [1:0] {
    VS_MEAN     = 2'd0,  // mean critical D chain length
    VS_TOTALS   = 2'd1,  // number of mispredictions of the branch
    VS_WEIGHTED = 2'd2   // mean chain length times number of mispredictions
  } value_scheme_e;

endpackage
