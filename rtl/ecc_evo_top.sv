// Reconfigurable ECC hardware core built from evolved combinational circuits.
//
// Three reconfigurable partitions hold the circuits for point addition (PA),
// point doubling (PD) and point multiplication (PM). Each is an N x M gate
// array whose structure is a chromosome produced offline by a genetic
// algorithm. A configuration memory stores four functionally equivalent
// versions (V1..V4) per operation; the reconfiguration manager swaps a
// partition to another version at run time on request of the ECC core logic,
// which runs the host's commands. Swapping between equivalent circuits is the
// side-channel countermeasure: the circuit that computes an operation changes
// while the function stays the same.
//
// Interface: the host first loads the bitstreams through mem_we/mem_waddr/
// mem_wdata (32-bit words, bitstream (op, ver) at word address
// (op*4 + ver)*WPB, WPB = 32 at the 10x10 default), then issues commands on
// cmd_* and receives results on rsp_*. cfg_error flags a malformed load;
// loaded_ver/loaded_valid tell which version each partition holds.
// Timing: 3 cycles per command when the partition already holds the version,
// 38 cycles when it has to be reloaded (defaults, EVAL_CYCLES = 1).
// The block structure follows the document; the FPGA's partial
// reconfiguration of fabric frames is modelled by a configuration register
// inside each partition.
module ecc_evo_top
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M           = 10,
  parameter int unsigned N           = 10,
  parameter int unsigned EVAL_CYCLES = 1,
  localparam int unsigned C     = M / 2,
  localparam int unsigned WPB   = words_per_bitstream(M, N),
  localparam int unsigned DEPTH = NUM_OPS * NUM_VERSIONS * WPB,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // bitstream load port
  input  logic               mem_we,
  input  logic [AW-1:0]      mem_waddr,
  input  logic [WORD_W-1:0]  mem_wdata,
  // commands
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  op_e                cmd_op,
  input  logic [VER_W-1:0]   cmd_ver,
  input  logic               rotate_en,
  input  logic [C-1:0]       cmd_a_x,
  input  logic [C-1:0]       cmd_a_y,
  input  logic [C-1:0]       cmd_b_x,
  input  logic [C-1:0]       cmd_b_y,
  // results
  output logic               rsp_valid,
  output op_e                rsp_op,
  output logic [VER_W-1:0]   rsp_ver,
  output logic [C-1:0]       rsp_x,
  output logic [C-1:0]       rsp_y,
  // status
  output logic [VER_W-1:0]   loaded_ver [NUM_OPS],
  output logic [NUM_OPS-1:0] loaded_valid,
  output logic               rcfg_done,      // a version request ended
  output logic               rcfg_skipped,   // ... without a load
  output logic               cfg_error
);

  logic               req_valid, req_ready, req_done, req_skipped;

  assign rcfg_done    = req_done;
  assign rcfg_skipped = req_done && req_skipped;
  op_e                req_op;
  logic [VER_W-1:0]   req_ver;
  cfg_wr_t            slot_wr  [NUM_OPS];
  logic [NUM_OPS-1:0] decouple;
  logic [2*M-1:0]     slot_in  [NUM_OPS];
  logic [M-1:0]       slot_out [NUM_OPS];

  ecc_core_logic #(.M(M), .EVAL_CYCLES(EVAL_CYCLES)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd_op    (cmd_op),
    .cmd_ver   (cmd_ver),
    .rotate_en (rotate_en),
    .cmd_a_x   (cmd_a_x),
    .cmd_a_y   (cmd_a_y),
    .cmd_b_x   (cmd_b_x),
    .cmd_b_y   (cmd_b_y),
    .rsp_valid (rsp_valid),
    .rsp_op    (rsp_op),
    .rsp_ver   (rsp_ver),
    .rsp_x     (rsp_x),
    .rsp_y     (rsp_y),
    .req_valid (req_valid),
    .req_ready (req_ready),
    .req_op    (req_op),
    .req_ver   (req_ver),
    .req_done  (req_done),
    .decouple  (decouple),
    .slot_in   (slot_in),
    .slot_out  (slot_out)
  );

  reconfig_manager #(.M(M), .N(N)) u_rm (
    .clk          (clk),
    .rst_n        (rst_n),
    .mem_we       (mem_we),
    .mem_waddr    (mem_waddr),
    .mem_wdata    (mem_wdata),
    .req_valid    (req_valid),
    .req_ready    (req_ready),
    .req_op       (req_op),
    .req_ver      (req_ver),
    .done         (req_done),
    .skipped      (req_skipped),
    .slot_wr      (slot_wr),
    .decouple     (decouple),
    .loaded_ver   (loaded_ver),
    .loaded_valid (loaded_valid),
    .cfg_error    (cfg_error)
  );

  // PA, PD and PM partitions (index = op_e value).
  for (genvar o = 0; o < NUM_OPS; o++) begin : g_slot
    evo_slot #(.M(M), .N(N)) u_slot (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_wr   (slot_wr[o]),
      .decouple (decouple[o]),
      .in_bits  (slot_in[o]),
      .out      (slot_out[o])
    );
  end

endmodule
