// ICAP interface of the reconfiguration manager.
//
// Stands in for the path through the FPGA's internal configuration access
// port: it takes the word stream of the configuration engine and writes it,
// one registered stage later, into the configuration of the partition named
// by op. While a partition is being rewritten, and until its last word has
// landed, its decouple line is high so the core logic sees no half-configured
// circuit. It also counts the words of every load and raises the sticky error
// flag if a load ends with a word count other than WPB or with a word index
// outside the bitstream.
//
// Timing: a word presented in cycle t is written into the partition at the
// clock edge ending cycle t+1. decouple[o] is high from the first cycle of
// active with op == o through the cycle after active falls.
// The document only names the ICAP interface; the registered write stage, the
// decoupling and the word check are this design's choices.
module icap_if
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M = 10,
  parameter int unsigned N = 10,
  localparam int unsigned WPB = words_per_bitstream(M, N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               active,
  input  op_e                op,
  input  cfg_wr_t            word,
  output cfg_wr_t            slot_wr  [NUM_OPS],
  output logic [NUM_OPS-1:0] decouple,
  output logic               cfg_error
);

  logic    active_q;
  op_e     op_q;
  cfg_wr_t word_q;
  logic [8:0] count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      op_q      <= OP_PA;
      word_q    <= '0;
      count_q   <= '0;
      cfg_error <= 1'b0;
    end else begin
      active_q <= active;
      op_q     <= op;
      word_q   <= word;
      if (active && !active_q) begin
        count_q <= 9'(word.we);
      end else if (word.we) begin
        count_q <= count_q + 9'd1;
      end
      if (word.we && (32'(word.widx) >= WPB)) cfg_error <= 1'b1;
      // End of a load: every word of the bitstream must have been written.
      if (!active && active_q && (32'(count_q) != WPB)) cfg_error <= 1'b1;
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_OPS; o++) begin
      slot_wr[o]    = word_q;
      slot_wr[o].we = word_q.we && (op_q == op_e'(o));
      decouple[o]   = (active && (op == op_e'(o))) || (active_q && (op_q == op_e'(o)));
    end
  end

endmodule
