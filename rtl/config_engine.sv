// Configuration engine: the control unit of the reconfiguration manager.
//
// The ECC core logic asks for circuit version req_ver of operation req_op
// (valid/ready handshake; ready is high while the engine is idle). The engine
// keeps a record of which version each partition currently holds. If the
// requested version is already there, it answers in the same cycle with done
// and skipped high and loads nothing. Otherwise it reads the WPB words of that
// bitstream from the configuration memory, one address per cycle, and passes
// each word, with its index, to the ICAP interface the cycle after (the memory
// has one cycle of read latency; the word data is the memory's read data
// passed straight through). While it does so, active is high and op names
// the partition being rewritten.
//
// Timing of a load: request accepted in cycle 0, memory reads in cycles
// 1..WPB, words leave in cycles 2..WPB+1, done (skipped low) in cycle WPB+2;
// for the default 10x10 circuit that is 34 cycles. A skipped request takes one
// cycle. The document says only that the engine reads a configuration from
// the memory and passes it through the ICAP interface, and that it takes its
// choice of configuration from the core logic; the handshake, the
// already-loaded check and the timing are this design's choices.
module config_engine
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,
  parameter int unsigned N = 10,
  localparam int unsigned WPB   = words_per_bitstream(M, N),
  localparam int unsigned DEPTH = NUM_OPS * NUM_VERSIONS * WPB,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // request from the ECC core logic
  input  logic              req_valid,
  output logic              req_ready,
  input  op_e               req_op,
  input  logic [VER_W-1:0]  req_ver,
  output logic              done,
  output logic              skipped,
  // configuration memory read port
  output logic              mem_re,
  output logic [AW-1:0]     mem_raddr,
  input  logic [WORD_W-1:0] mem_rdata,
  // towards the ICAP interface
  output logic              active,
  output op_e               op,
  output cfg_wr_t           word,
  // version held by each partition
  output logic [VER_W-1:0]  loaded_ver   [NUM_OPS],
  output logic [NUM_OPS-1:0] loaded_valid
);

  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_FLUSH, S_DONE} state_e;

  state_e           state_q;
  op_e              op_q;
  logic [VER_W-1:0] ver_q;
  logic [7:0]       rd_idx_q;
  logic             pend_q;
  logic [7:0]       pend_idx_q;
  logic             hit;

  assign hit = loaded_valid[req_op] && (loaded_ver[req_op] == req_ver);

  assign req_ready = (state_q == S_IDLE);
  assign active    = (state_q != S_IDLE);
  assign op        = op_q;

  assign mem_re    = (state_q == S_STREAM);
  assign mem_raddr = AW'((32'(op_q) * NUM_VERSIONS + 32'(ver_q)) * WPB + 32'(rd_idx_q));

  assign word.we    = pend_q;
  assign word.widx  = pend_idx_q;
  assign word.wdata = mem_rdata;

  assign done    = (state_q == S_DONE) || (req_valid && req_ready && hit);
  assign skipped = (state_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      op_q         <= OP_PA;
      ver_q        <= '0;
      rd_idx_q     <= '0;
      pend_q       <= 1'b0;
      pend_idx_q   <= '0;
      loaded_valid <= '0;
      for (int o = 0; o < NUM_OPS; o++) loaded_ver[o] <= '0;
    end else begin
      pend_q     <= (state_q == S_STREAM);
      pend_idx_q <= rd_idx_q;
      unique case (state_q)
        S_IDLE: begin
          if (req_valid && !hit) begin
            op_q     <= req_op;
            ver_q    <= req_ver;
            rd_idx_q <= '0;
            state_q  <= S_STREAM;
            // The partition's old contents are being overwritten.
            loaded_valid[req_op] <= 1'b0;
          end
        end
        S_STREAM: begin
          rd_idx_q <= rd_idx_q + 8'd1;
          if (32'(rd_idx_q) == WPB - 1) state_q <= S_FLUSH;
        end
        S_FLUSH: state_q <= S_DONE;
        S_DONE: begin
          loaded_ver[op_q]   <= ver_q;
          loaded_valid[op_q] <= 1'b1;
          state_q            <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Configuration words are only produced during a load.
  a_no_word_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_IDLE) |-> !word.we);

endmodule
