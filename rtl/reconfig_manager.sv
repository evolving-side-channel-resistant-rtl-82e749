// Reconfiguration manager: configuration memory, configuration engine and
// ICAP interface, connected in that order as in the document's block diagram.
//
// The host loads the bitstreams of all circuit versions through the memory's
// write port (mem_we/mem_waddr/mem_wdata; word address
// (op*4 + version)*WPB + word). The ECC core logic then requests a version for
// an operation (req_*); the engine reads that bitstream from the memory and
// the ICAP interface writes it into the partition, decoupling the partition
// meanwhile. done marks the end of a request; skipped says the partition
// already held that version and nothing was loaded.
//
// Timing: see config_engine (34 cycles per load at 10x10) plus one cycle for
// the last word to reach the partition, which decouple covers.
module reconfig_manager
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,
  parameter int unsigned N = 10,
  localparam int unsigned WPB   = words_per_bitstream(M, N),
  localparam int unsigned DEPTH = NUM_OPS * NUM_VERSIONS * WPB,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host load port of the configuration memory
  input  logic               mem_we,
  input  logic [AW-1:0]      mem_waddr,
  input  logic [WORD_W-1:0]  mem_wdata,
  // request from the core logic
  input  logic               req_valid,
  output logic               req_ready,
  input  op_e                req_op,
  input  logic [VER_W-1:0]   req_ver,
  output logic               done,
  output logic               skipped,
  // towards the partitions
  output cfg_wr_t            slot_wr  [NUM_OPS],
  output logic [NUM_OPS-1:0] decouple,
  // status
  output logic [VER_W-1:0]   loaded_ver [NUM_OPS],
  output logic [NUM_OPS-1:0] loaded_valid,
  output logic               cfg_error
);

  logic              mem_re;
  logic [AW-1:0]     mem_raddr;
  logic [WORD_W-1:0] mem_rdata;
  logic              active;
  op_e               eng_op;
  cfg_wr_t           eng_word;

  config_memory #(.M(M), .N(N)) u_mem (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .re    (mem_re),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

  config_engine #(.M(M), .N(N)) u_engine (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (req_valid),
    .req_ready    (req_ready),
    .req_op       (req_op),
    .req_ver      (req_ver),
    .done         (done),
    .skipped      (skipped),
    .mem_re       (mem_re),
    .mem_raddr    (mem_raddr),
    .mem_rdata    (mem_rdata),
    .active       (active),
    .op           (eng_op),
    .word         (eng_word),
    .loaded_ver   (loaded_ver),
    .loaded_valid (loaded_valid)
  );

  icap_if #(.M(M), .N(N)) u_icap (
    .clk       (clk),
    .rst_n     (rst_n),
    .active    (active),
    .op        (eng_op),
    .word      (eng_word),
    .slot_wr   (slot_wr),
    .decouple  (decouple),
    .cfg_error (cfg_error)
  );

endmodule
