// Configuration memory of the reconfiguration manager.
//
// Holds the bitstreams (chromosomes) of every functionally equivalent circuit
// the core may realise: NUM_VERSIONS versions (V1..V4) for each of the three
// point operations. Bitstream (op, ver) occupies WPB consecutive 32-bit words
// starting at word address (op*NUM_VERSIONS + ver)*WPB; word w of a bitstream
// holds chromosome bits [32w+31:32w].
//
// It is a simple dual-port RAM: a write port used by the host to load the
// bitstreams, and a read port used by the configuration engine. Reads are
// synchronous with one cycle of latency (rdata is valid the cycle after re).
// A write and a read of the same address in one cycle return the old word.
// The document names the memory and its contents; the organisation, the
// port set and the load path from a host are this design's choices. The
// array is not reset: it must be loaded before it is used.
module config_memory
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,
  parameter int unsigned N = 10,
  localparam int unsigned WPB   = words_per_bitstream(M, N),
  localparam int unsigned DEPTH = NUM_OPS * NUM_VERSIONS * WPB,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // host load port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  // configuration engine read port
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) begin
      mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rdata <= mem[raddr];
    end
  end

endmodule
