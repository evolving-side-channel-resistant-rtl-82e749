// ECC core logic: the control unit of the reconfigurable ECC core.
//
// A host issues point operations (point addition PA, point doubling PD, point
// multiplication PM) with a valid/ready handshake. For each command the FSM
//   1. picks the circuit version that will compute it: the command's own
//      version field, or, with rotate_en high, the next version in a
//      round-robin sequence kept per operation, so that consecutive operations
//      of the same kind run on different but equivalent circuits;
//   2. asks the reconfiguration manager for that version and waits (stalls)
//      until it is realised in the partition; if the partition already holds
//      it the manager answers at once;
//   3. waits until the partition is no longer decoupled, drives the operands
//      into it for EVAL_CYCLES cycles so the combinational circuit settles,
//      captures the result and returns it with rsp_valid for one cycle.
// Only the partition of the running operation sees the operands; the others
// get zeros.
//
// Operand packing (this design's choice, following the input labels of the
// published 10x10 circuit): with C = M/2 bits per coordinate, gate r of level
// 0 receives (a_x[r], a_y[r]) for r < C and (b_x[r-C], b_y[r-C]) for r >= C;
// output r is x[r] for r < C and y[r-C] for r >= C. PA uses a and b as the two
// points, PD uses a and drives b as zero, PM uses a as the base point and the
// scalar k = {b_y, b_x} (2C bits).
//
// Timing: a command accepted in cycle 0 whose version is already loaded
// returns rsp_valid in cycle 2 + EVAL_CYCLES. A command that needs a load
// returns in cycle WPB + 5 + EVAL_CYCLES (38 at the defaults). The document
// says only that this FSM controls the core and tells the configuration
// engine which configuration to use; the command interface, the version
// policy and the timing are this design's choices.
module ecc_core_logic
  import ecc_evo_pkg::*;
#(
  parameter int unsigned M           = 10,
  parameter int unsigned EVAL_CYCLES = 1,
  localparam int unsigned C          = M / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // host command
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  op_e                cmd_op,
  input  logic [VER_W-1:0]   cmd_ver,
  input  logic               rotate_en,
  input  logic [C-1:0]       cmd_a_x,
  input  logic [C-1:0]       cmd_a_y,
  input  logic [C-1:0]       cmd_b_x,
  input  logic [C-1:0]       cmd_b_y,
  // host response
  output logic               rsp_valid,
  output op_e                rsp_op,
  output logic [VER_W-1:0]   rsp_ver,
  output logic [C-1:0]       rsp_x,
  output logic [C-1:0]       rsp_y,
  // reconfiguration manager
  output logic               req_valid,
  input  logic               req_ready,
  output op_e                req_op,
  output logic [VER_W-1:0]   req_ver,
  input  logic               req_done,
  input  logic [NUM_OPS-1:0] decouple,
  // partitions
  output logic [2*M-1:0]     slot_in  [NUM_OPS],
  input  logic [M-1:0]       slot_out [NUM_OPS]
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_EVAL, S_RESP} state_e;

  state_e           state_q;
  op_e              op_q;
  logic [VER_W-1:0] ver_q;
  logic [C-1:0]     ax_q, ay_q, bx_q, by_q;
  logic [VER_W-1:0] next_ver_q [NUM_OPS];
  logic [7:0]       eval_cnt_q;
  logic [2*M-1:0]   operands;
  logic [M-1:0]     result;

  assign cmd_ready = (state_q == S_IDLE);
  assign req_valid = (state_q == S_REQ);
  assign req_op    = op_q;
  assign req_ver   = ver_q;
  assign rsp_valid = (state_q == S_RESP);

  // Operand bit pairs for level 0 of the evolved circuit.
  always_comb begin
    for (int r = 0; r < C; r++) begin
      operands[2*r]         = ax_q[r];
      operands[2*r+1]       = ay_q[r];
      operands[2*(C+r)]     = bx_q[r];
      operands[2*(C+r)+1]   = by_q[r];
    end
    for (int r = 2*C; r < M; r++) begin
      operands[2*r]   = 1'b0;
      operands[2*r+1] = 1'b0;
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_OPS; o++) begin
      slot_in[o] = (state_q == S_EVAL && op_q == op_e'(o)) ? operands : '0;
    end
  end

  assign result = slot_out[op_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      op_q       <= OP_PA;
      ver_q      <= '0;
      ax_q       <= '0;
      ay_q       <= '0;
      bx_q       <= '0;
      by_q       <= '0;
      eval_cnt_q <= '0;
      rsp_op     <= OP_PA;
      rsp_ver    <= '0;
      rsp_x      <= '0;
      rsp_y      <= '0;
      for (int o = 0; o < NUM_OPS; o++) next_ver_q[o] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (cmd_valid) begin
            op_q  <= cmd_op;
            ver_q <= rotate_en ? next_ver_q[cmd_op] : cmd_ver;
            if (rotate_en) next_ver_q[cmd_op] <= next_ver_q[cmd_op] + 1'b1;
            ax_q  <= cmd_a_x;
            ay_q  <= cmd_a_y;
            bx_q  <= (cmd_op == OP_PD) ? '0 : cmd_b_x;
            by_q  <= (cmd_op == OP_PD) ? '0 : cmd_b_y;
            state_q <= S_REQ;
          end
        end
        S_REQ: begin
          if (req_ready) begin
            eval_cnt_q <= '0;
            state_q    <= req_done ? S_EVAL : S_WAIT;
          end
        end
        S_WAIT: begin
          if (req_done) begin
            eval_cnt_q <= '0;
            state_q    <= S_EVAL;
          end
        end
        S_EVAL: begin
          // Hold the operands until the partition is coupled again and the
          // combinational circuit has had EVAL_CYCLES cycles to settle.
          if (!decouple[op_q]) begin
            if (32'(eval_cnt_q) == EVAL_CYCLES - 1) begin
              rsp_op  <= op_q;
              rsp_ver <= ver_q;
              for (int r = 0; r < C; r++) begin
                rsp_x[r] <= result[r];
                rsp_y[r] <= result[C+r];
              end
              state_q <= S_RESP;
            end else begin
              eval_cnt_q <= eval_cnt_q + 8'd1;
            end
          end
        end
        S_RESP:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A result is never taken from a partition that is being reconfigured.
  a_no_capture_while_decoupled: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RESP) |-> !$past(decouple[op_q]));

endmodule
