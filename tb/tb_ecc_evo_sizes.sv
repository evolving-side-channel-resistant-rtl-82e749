// End-to-end runs of the whole core at the three larger published circuit
// sizes: 10x16 (4-bit points), 20x10 (6-bit) and 20x16 (8-bit), each with
// random chromosomes for all twelve versions. For each size the host loads
// the configuration memory, then PA, PD and PM commands run with fixed and
// rotating versions; results are compared with the reference evaluator and
// latencies with 3 cycles (no load) and WPB + 6 cycles (load).
module tb_ecc_evo_sizes;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 3; k++) begin : g_size
    localparam int M = (k == 0) ? 10 : 20;
    localparam int N = (k == 1) ? 10 : 16;
    localparam int C = M / 2;
    localparam int WPB = words_per_bitstream(M, N);
    localparam int DEPTH = NUM_OPS * NUM_VERSIONS * WPB;
    localparam int AW = $clog2(DEPTH);

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
    chrom_t bs [NUM_OPS][NUM_VERSIONS];
    int rot_next [NUM_OPS] = '{0, 0, 0};

    ecc_evo_top #(.M(M), .N(N)) dut (
      .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .cmd_valid, .cmd_ready,
      .cmd_op, .cmd_ver, .rotate_en, .cmd_a_x, .cmd_a_y, .cmd_b_x, .cmd_b_y,
      .rsp_valid, .rsp_op, .rsp_ver, .rsp_x, .rsp_y, .loaded_ver, .loaded_valid,
      .rcfg_done, .rcfg_skipped, .cfg_error);

    task automatic command(op_e o, int v, bit rot);
      int ax = int'($urandom_range(0, (1 << C) - 1)), ay = int'($urandom_range(0, (1 << C) - 1));
      int bx = int'($urandom_range(0, (1 << C) - 1)), by = int'($urandom_range(0, (1 << C) - 1));
      int exp_ver = rot ? rot_next[o] : v;
      bit need_load = !(loaded_valid[o] && loaded_ver[o] == 2'(exp_ver));
      int cyc;
      logic [127:0] inb;
      logic [M-1:0] e;
      if (rot) rot_next[o] = (rot_next[o] + 1) % NUM_VERSIONS;
      @(negedge clk);
      cmd_valid = 1; cmd_op = o; cmd_ver = 2'(v); rotate_en = rot;
      cmd_a_x = C'(ax); cmd_a_y = C'(ay); cmd_b_x = C'(bx); cmd_b_y = C'(by);
      @(negedge clk); cmd_valid = 0; cyc = 1;
      while (!rsp_valid && cyc < 400) begin @(negedge clk); cyc++; end
      inb = (o == OP_PD) ? pack_in(C, ax, ay, 0, 0) : pack_in(C, ax, ay, bx, by);
      e = ref_eval(bs[o][exp_ver], M, N, inb)[M-1:0];
      chk(rsp_valid && rsp_ver == 2'(exp_ver), $sformatf("%0dx%0d response version", M, N));
      chk({rsp_y, rsp_x} == e, $sformatf("%0dx%0d result op %0d", M, N, o));
      chk(cyc == (need_load ? WPB + 6 : 3), $sformatf("%0dx%0d latency %0d (load %0b)", M, N, cyc, need_load));
    endtask

    task automatic run();
      for (int o = 0; o < NUM_OPS; o++)
        for (int v = 0; v < NUM_VERSIONS; v++) bs[o][v] = rand_chrom(M, N);
      for (int o = 0; o < NUM_OPS; o++)
        for (int v = 0; v < NUM_VERSIONS; v++)
          for (int w = 0; w < WPB; w++) begin
            @(negedge clk);
            mem_we = 1; mem_waddr = AW'((o * NUM_VERSIONS + v) * WPB + w); mem_wdata = bs[o][v][w*32 +: 32];
          end
      @(negedge clk); mem_we = 0;
      for (int o = 0; o < NUM_OPS; o++) begin
        command(op_e'(o), 1, 0);
        command(op_e'(o), 1, 0);
      end
      repeat (12) command(op_e'($urandom_range(0, 2)), int'($urandom_range(0, 3)), 1'($urandom_range(0, 1)));
      chk(!cfg_error, $sformatf("%0dx%0d no configuration error", M, N));
    endtask
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    g_size[0].run();
    g_size[1].run();
    g_size[2].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
