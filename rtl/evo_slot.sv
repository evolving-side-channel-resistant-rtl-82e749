// One reconfigurable partition of the ECC core (point addition, point doubling
// or point multiplication).
//
// On the FPGA the evolved circuit of a partition is replaced at run time by
// dynamic partial reconfiguration. Here the configuration frames of the
// partition are modelled by a configuration register holding the chromosome;
// the circuit realised in the partition is an evo_circuit driven by that
// register. The register is written one 32-bit word per clock through cfg_wr
// (word w holds chromosome bits [32w+31:32w]; bits past the chromosome length
// are dropped). While decouple is high the partition is being rewritten and
// its outputs are forced to 0 so that no half-written circuit reaches the core
// logic. Reset clears the configuration (reset behaviour is this design's
// choice).
//
// Timing: a word written in cycle t takes effect on the outputs in cycle t+1;
// from in_bits to out the path is purely combinational.
module evo_slot
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,
  parameter int unsigned N = 10,
  localparam int unsigned L   = chrom_len(M, N),
  localparam int unsigned WPB = words_per_bitstream(M, N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_wr_t        cfg_wr,
  input  logic           decouple,
  input  logic [2*M-1:0] in_bits,
  output logic [M-1:0]   out
);

  logic [WPB*WORD_W-1:0] cfg_q;
  logic [M-1:0]          circ_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
    end else if (cfg_wr.we && (32'(cfg_wr.widx) < WPB)) begin
      cfg_q[cfg_wr.widx*WORD_W +: WORD_W] <= cfg_wr.wdata;
    end
  end

  evo_circuit #(.M(M), .N(N)) u_circuit (
    .in_bits (in_bits),
    .chrom   (cfg_q[L-1:0]),
    .out     (circ_out)
  );

  assign out = decouple ? '0 : circ_out;

endmodule
