// End-to-end test of the reconfigurable ECC core at its default size (10x10
// circuits, four versions of each of PA, PD and PM).
//
// The host loads twelve bitstreams: version V1 of point addition is the
// published evolved 10x10 circuit, the others are random chromosomes. It then
// issues point additions, doublings and scalar multiplications, with fixed
// versions and with round-robin version rotation. Every result is compared
// with the reference evaluator run on the chromosome of the version that the
// command must have used. The test also checks latency (3 cycles without a
// load, 39 with one) and counts the mechanisms of the design; each must occur
// at least once: bitstream load from the host, partial reconfiguration of a
// partition, a request answered without reconfiguration, a command stalled by
// reconfiguration, version rotation, and each of the three operations.
module tb_ecc_evo_top;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 10, N = 10, C = 5;
  localparam int WPB = words_per_bitstream(M, N);
  localparam int DEPTH = NUM_OPS * NUM_VERSIONS * WPB;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic mem_we = 0;
  logic [AW-1:0] mem_waddr = '0;
  logic [31:0] mem_wdata = '0;
  logic cmd_valid = 0, cmd_ready, rotate_en = 0;
  op_e cmd_op = OP_PA;
  logic [VER_W-1:0] cmd_ver = '0;
  logic [C-1:0] cmd_a_x = '0, cmd_a_y = '0, cmd_b_x = '0, cmd_b_y = '0;
  logic rsp_valid;
  op_e rsp_op;
  logic [VER_W-1:0] rsp_ver;
  logic [C-1:0] rsp_x, rsp_y;
  logic [VER_W-1:0] loaded_ver [NUM_OPS];
  logic [NUM_OPS-1:0] loaded_valid;
  logic rcfg_done, rcfg_skipped, cfg_error;

  ecc_evo_top dut (.clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .cmd_valid, .cmd_ready,
                   .cmd_op, .cmd_ver, .rotate_en, .cmd_a_x, .cmd_a_y, .cmd_b_x, .cmd_b_y,
                   .rsp_valid, .rsp_op, .rsp_ver, .rsp_x, .rsp_y, .loaded_ver, .loaded_valid,
                   .rcfg_done, .rcfg_skipped, .cfg_error);

  always #5 clk = ~clk;

  chrom_t bs [NUM_OPS][NUM_VERSIONS];
  int checks = 0, failures = 0;
  int n_hostload = 0, n_reconfig = 0, n_skip = 0, n_stall = 0, n_rotate = 0;
  int n_op [NUM_OPS] = '{0, 0, 0};
  int rot_next [NUM_OPS] = '{0, 0, 0};
  int last_ver [NUM_OPS] = '{-1, -1, -1};

  always @(posedge clk) if (rst_n && rcfg_done) begin
    if (rcfg_skipped) n_skip++; else n_reconfig++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic command(op_e o, int v, bit rot);
    int ax = int'($urandom_range(0, 31)), ay = int'($urandom_range(0, 31));
    int bx = int'($urandom_range(0, 31)), by = int'($urandom_range(0, 31));
    int exp_ver = rot ? rot_next[o] : v;
    bit need_load = !(loaded_valid[o] && loaded_ver[o] == 2'(exp_ver));
    int cyc = 0;
    logic [127:0] inb;
    logic [M-1:0] e;
    if (rot) rot_next[o] = (rot_next[o] + 1) % NUM_VERSIONS;
    @(negedge clk);
    cmd_valid = 1; cmd_op = o; cmd_ver = 2'(v); rotate_en = rot;
    cmd_a_x = 5'(ax); cmd_a_y = 5'(ay); cmd_b_x = 5'(bx); cmd_b_y = 5'(by);
    #1 chk(cmd_ready, "ready for command");
    @(negedge clk); cmd_valid = 0; cyc = 1;
    while (!rsp_valid && cyc < 200) begin @(negedge clk); cyc++; end
    // PD has one operand; PM takes the scalar k = {b_y, b_x}.
    inb = (o == OP_PD) ? pack_in(C, ax, ay, 0, 0) : pack_in(C, ax, ay, bx, by);
    e = ref_eval(bs[o][exp_ver], M, N, inb)[M-1:0];
    chk(rsp_valid && rsp_op == o && rsp_ver == 2'(exp_ver), "response op and version");
    chk({rsp_y, rsp_x} == e, $sformatf("result op %0d ver %0d: got %h expected %h", o, exp_ver, {rsp_y, rsp_x}, e));
    chk(cyc == (need_load ? WPB + 5 + 1 : 3), $sformatf("latency %0d (load %0b)", cyc, need_load));
    if (need_load) n_stall++;
    if (rot && last_ver[o] >= 0 && last_ver[o] != exp_ver) n_rotate++;
    last_ver[o] = exp_ver;
    n_op[o]++;
  endtask

  initial begin
    bs[OP_PA][0] = fig4_chrom();
    for (int o = 0; o < NUM_OPS; o++)
      for (int v = 0; v < NUM_VERSIONS; v++)
        if (!(o == 0 && v == 0)) bs[o][v] = rand_chrom(M, N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Host loads every bitstream into the configuration memory.
    for (int o = 0; o < NUM_OPS; o++)
      for (int v = 0; v < NUM_VERSIONS; v++)
        for (int w = 0; w < WPB; w++) begin
          @(negedge clk);
          mem_we = 1; mem_waddr = AW'((o * NUM_VERSIONS + v) * WPB + w); mem_wdata = bs[o][v][w*32 +: 32];
          n_hostload++;
        end
    @(negedge clk); mem_we = 0;
    // Fixed versions: first use of each loads it, repeats do not.
    for (int o = 0; o < NUM_OPS; o++) begin
      command(op_e'(o), 0, 0);
      command(op_e'(o), 0, 0);
    end
    command(OP_PA, 1, 0);
    command(OP_PM, 3, 0);
    // Round-robin version rotation.
    for (int i = 0; i < 8; i++) command(op_e'(i % 3), 0, 1);
    // Random mix.
    repeat (30) command(op_e'($urandom_range(0, 2)), int'($urandom_range(0, 3)), 1'($urandom_range(0, 1)));
    chk(!cfg_error, "no configuration error");
    chk(n_hostload == DEPTH, "host bitstream load");
    chk(n_reconfig > 0, "partial reconfiguration happened");
    chk(n_skip > 0, "request answered without reconfiguration");
    chk(n_stall > 0, "command stalled by reconfiguration");
    chk(n_rotate > 0, "version rotation happened");
    for (int o = 0; o < NUM_OPS; o++) chk(n_op[o] > 0, $sformatf("operation %0d used", o));
    $display("mechanisms: hostload=%0d reconfig=%0d skip=%0d stall=%0d rotate=%0d PA=%0d PD=%0d PM=%0d",
             n_hostload, n_reconfig, n_skip, n_stall, n_rotate, n_op[0], n_op[1], n_op[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
