// Evolved combinational circuit: a gate array of N levels by M gates whose
// structure is given entirely by a binary chromosome.
//
// Level 0 is the input interface: gate r takes the external input pair
// in_bits[2r] (first input) and in_bits[2r+1] (second input). Every gate of
// levels 1..N-1 takes its two inputs from any two outputs of the previous
// level, chosen by the index fields IP1_ID and IP2_ID. The outputs of the M
// gates of level N-1 are the circuit outputs. There is no clock and no storage:
// out is a pure function of in_bits and chrom.
//
// Chromosome layout (the field order per row follows the chromosome drawing,
// the bit placement is this design's choice): row r occupies
// chrom[r*ROW +: ROW]. Inside a row, bits [2:0] are the GATE_ID of the level-0
// gate; level l (1..N-1) then follows at offset 3 + (l-1)*(2*IW+3) as IP1_ID
// (IW bits), IP2_ID (IW bits) and GATE_ID (3 bits), lowest bits first.
// IW = ceil(log2 M). An index value of M or above selects no gate and reads as
// constant 0, a choice of this design.
//
// Defaults M = 10, N = 10 are the 10x10 configuration of the published
// evolved point-addition circuit (1020-bit chromosome).
module evo_circuit
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,   // gates per level (rows)
  parameter int unsigned N = 10,   // levels
  localparam int unsigned IW  = idx_width(M),
  localparam int unsigned ROW = row_bits(M, N),
  localparam int unsigned L   = chrom_len(M, N)
) (
  input  logic [2*M-1:0] in_bits,
  input  logic [L-1:0]   chrom,
  output logic [M-1:0]   out
);

  // Output of every gate, level by level.
  logic [M-1:0] lvl [N];

  for (genvar r = 0; r < M; r++) begin : g_level0
    evo_gate u_gate (
      .gate_id (chrom[r*ROW +: GATE_ID_W]),
      .a       (in_bits[2*r]),
      .b       (in_bits[2*r+1]),
      .y       (lvl[0][r])
    );
  end

  for (genvar l = 1; l < N; l++) begin : g_level
    for (genvar r = 0; r < M; r++) begin : g_row
      localparam int unsigned BASE = r*ROW + GATE_ID_W + (l-1)*(2*IW + GATE_ID_W);
      logic [IW-1:0] ip1, ip2;
      logic          a, b;
      assign ip1 = chrom[BASE +: IW];
      assign ip2 = chrom[BASE + IW +: IW];
      // Input selection from the previous level; out-of-range index reads 0.
      assign a = (32'(ip1) < M) ? lvl[l-1][ip1] : 1'b0;
      assign b = (32'(ip2) < M) ? lvl[l-1][ip2] : 1'b0;
      evo_gate u_gate (
        .gate_id (chrom[BASE + 2*IW +: GATE_ID_W]),
        .a       (a),
        .b       (b),
        .y       (lvl[l][r])
      );
    end
  end

  assign out = lvl[N-1];

endmodule
