// Test of ecc_core_logic against behavioural models of its neighbours: a
// reconfiguration manager that takes LOADC cycles per load (decoupling the
// partition meanwhile and one cycle after) and answers at once for a version
// already held, and three partitions whose output is a keyed function of
// their inputs that differs per operation and version. Checks every result,
// the version used (fixed and round-robin), operand packing (PD drives the
// second operand as zero), that idle partitions see zero inputs, and the
// 3-cycle latency of a command that needs no load.
module tb_ecc_core_logic;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 10, C = 5, LOADC = 6;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, rotate_en = 0;
  op_e cmd_op = OP_PA;
  logic [VER_W-1:0] cmd_ver = '0;
  logic [C-1:0] cmd_a_x = '0, cmd_a_y = '0, cmd_b_x = '0, cmd_b_y = '0;
  logic rsp_valid;
  op_e rsp_op;
  logic [VER_W-1:0] rsp_ver;
  logic [C-1:0] rsp_x, rsp_y;
  logic req_valid, req_ready, req_done;
  op_e req_op;
  logic [VER_W-1:0] req_ver;
  logic [NUM_OPS-1:0] decouple;
  logic [2*M-1:0] slot_in [NUM_OPS];
  logic [M-1:0] slot_out [NUM_OPS];
  int checks = 0, failures = 0;

  ecc_core_logic dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_ver, .rotate_en,
                      .cmd_a_x, .cmd_a_y, .cmd_b_x, .cmd_b_y, .rsp_valid, .rsp_op, .rsp_ver,
                      .rsp_x, .rsp_y, .req_valid, .req_ready, .req_op, .req_ver, .req_done,
                      .decouple, .slot_in, .slot_out);

  always #5 clk = ~clk;

  // ---- manager model ----
  int          busy = 0;
  logic        tail = 0;
  op_e         ld_op = OP_PA;
  logic [1:0]  held [NUM_OPS] = '{default: 2'd0};
  logic [1:0]  ld_ver = '0;
  int          loads = 0;
  assign req_ready = (busy == 0);
  assign req_done  = (req_valid && req_ready && held[req_op] == req_ver) || (busy == 1);
  always_comb for (int o = 0; o < NUM_OPS; o++)
    decouple[o] = (busy != 0 || tail) && ld_op == op_e'(o);
  always @(posedge clk) begin
    tail <= (busy == 1);
    if (busy != 0) begin
      busy <= busy - 1;
      if (busy == 1) held[ld_op] <= ld_ver;
    end else if (req_valid && held[req_op] != req_ver) begin
      busy <= LOADC; ld_op <= req_op; ld_ver <= req_ver; loads <= loads + 1;
    end
  end

  // ---- partition models: output depends on operation and held version ----
  function automatic logic [M-1:0] slot_fn(int o, int v, logic [2*M-1:0] x);
    logic [M-1:0] k = M'(32'h2b5 * (o * 4 + v + 1));
    return (x[M-1:0] ^ {x[2*M-2:M], x[2*M-1]}) ^ k;
  endfunction
  always_comb for (int o = 0; o < NUM_OPS; o++)
    slot_out[o] = decouple[o] ? '0 : slot_fn(o, int'(held[o]), slot_in[o]);

  // Idle partitions see no operands.
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NUM_OPS; o++)
      if (o != int'(dut.op_q) && slot_in[o] != '0) begin
        failures++; $display("FAIL operands on idle partition %0d", o);
      end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic command(op_e o, int v, bit rot, int exp_ver);
    int ax = int'($urandom_range(0, 31)), ay = int'($urandom_range(0, 31));
    int bx = int'($urandom_range(0, 31)), by = int'($urandom_range(0, 31));
    int cyc = 0;
    bit need_load = held[o] != 2'(exp_ver);
    logic [127:0] inb;
    logic [M-1:0] e;
    @(negedge clk);
    cmd_valid = 1; cmd_op = o; cmd_ver = 2'(v); rotate_en = rot;
    cmd_a_x = 5'(ax); cmd_a_y = 5'(ay); cmd_b_x = 5'(bx); cmd_b_y = 5'(by);
    #1 chk(cmd_ready, "ready for command");
    @(negedge clk); cmd_valid = 0; cyc = 1;
    while (!rsp_valid && cyc < 100) begin @(negedge clk); cyc++; end
    inb = (o == OP_PD) ? pack_in(C, ax, ay, 0, 0) : pack_in(C, ax, ay, bx, by);
    e = slot_fn(int'(o), exp_ver, inb[2*M-1:0]);
    chk(rsp_valid, "response");
    chk(rsp_op == o && rsp_ver == 2'(exp_ver), "operation and version of response");
    chk({rsp_y, rsp_x} == e, "result");
    if (!need_load) chk(cyc == 3, $sformatf("latency %0d, expected 3", cyc));
    else chk(cyc > LOADC + 3, "stall while loading");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Fixed versions.
    command(OP_PA, 0, 0, 0);
    command(OP_PD, 0, 0, 0);
    command(OP_PM, 0, 0, 0);
    command(OP_PA, 2, 0, 2);
    command(OP_PA, 2, 0, 2);
    command(OP_PM, 1, 0, 1);
    // Round robin per operation: next version starts at 0 for each.
    for (int i = 0; i < 6; i++) command(OP_PD, 3, 1, i % 4);
    for (int i = 0; i < 5; i++) command(OP_PA, 0, 1, i % 4);
    for (int i = 0; i < 5; i++) command(OP_PM, 0, 1, i % 4);
    chk(loads >= 10, "loads requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
