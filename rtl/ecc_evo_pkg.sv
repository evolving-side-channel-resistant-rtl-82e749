// Shared types and constants of the reconfigurable evolved-circuit ECC core.
//
// The evolved circuits are gate arrays of N levels by M gates. Each gate is one
// of the eight primitive types below, encoded in a 3-bit GATE_ID. The numeric
// order of the codes follows the order in which the gate table lists the
// gates; the table gives no binary codes, so the code values are this
// design's choice. The chromosome length formula M*(3 + (N-1)*(2*ceil(log2 M)+3))
// reproduces the published chromosome lengths (1020, 1680, 2400, 3960 bits for
// the 10x10, 10x16, 20x10 and 20x16 configurations, rows x levels).
// Configuration words are 32 bits wide, the width of the Kintex-7 ICAP port;
// the word width is this design's choice.
package ecc_evo_pkg;

  // Gate types of the evolved circuits (3-bit GATE_ID).
  typedef enum logic [2:0] {
    G_NOT  = 3'd0,
    G_AND  = 3'd1,
    G_OR   = 3'd2,
    G_XOR  = 3'd3,
    G_NAND = 3'd4,
    G_NOR  = 3'd5,
    G_XNOR = 3'd6,
    G_WIRE = 3'd7
  } gate_e;

  localparam int unsigned GATE_ID_W = 3;

  // Point operations, one reconfigurable partition each.
  typedef enum logic [1:0] {
    OP_PA = 2'd0,   // point addition
    OP_PD = 2'd1,   // point doubling
    OP_PM = 2'd2    // point (scalar) multiplication
  } op_e;

  localparam int unsigned NUM_OPS      = 3;
  localparam int unsigned NUM_VERSIONS = 4;   // V1..V4 per operation
  localparam int unsigned VER_W        = 2;
  localparam int unsigned WORD_W       = 32;  // configuration word width

  // Bits needed to index one of M gate outputs of the previous level.
  function automatic int unsigned idx_width(int unsigned m);
    return (m <= 1) ? 1 : $clog2(m);
  endfunction

  // Bits of one chromosome row: level-0 GATE_ID plus (IP1_ID, IP2_ID, GATE_ID)
  // for each of the levels 1..N-1.
  function automatic int unsigned row_bits(int unsigned m, int unsigned n);
    return GATE_ID_W + (n - 1) * (2 * idx_width(m) + GATE_ID_W);
  endfunction

  function automatic int unsigned chrom_len(int unsigned m, int unsigned n);
    return m * row_bits(m, n);
  endfunction

  function automatic int unsigned words_per_bitstream(int unsigned m, int unsigned n);
    return (chrom_len(m, n) + WORD_W - 1) / WORD_W;
  endfunction

  // One configuration word written into a partition.
  typedef struct packed {
    logic              we;
    logic [7:0]        widx;   // word index within the bitstream
    logic [WORD_W-1:0] wdata;
  } cfg_wr_t;

endpackage
