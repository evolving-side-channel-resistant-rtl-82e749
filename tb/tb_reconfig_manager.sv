// Test of reconfig_manager: loads twelve random bitstreams through the host
// port, then requests versions for the three partitions. A model of each
// partition's configuration register is built from the words that leave the
// manager and compared with the bitstream that was asked for. Also checks the
// load latency, the skip of a version already held, decoupling and the error
// flag.
module tb_reconfig_manager;
  import ecc_evo_pkg::*;

  localparam int WPB = words_per_bitstream(10, 10);
  localparam int DEPTH = NUM_OPS * NUM_VERSIONS * WPB;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic mem_we = 0;
  logic [AW-1:0] mem_waddr = '0;
  logic [31:0] mem_wdata = '0;
  logic req_valid = 0, req_ready, done, skipped;
  op_e req_op = OP_PA;
  logic [VER_W-1:0] req_ver = '0;
  cfg_wr_t slot_wr [NUM_OPS];
  logic [NUM_OPS-1:0] decouple;
  logic [VER_W-1:0] loaded_ver [NUM_OPS];
  logic [NUM_OPS-1:0] loaded_valid;
  logic cfg_error;
  logic [31:0] bs [DEPTH];
  logic [31:0] image [NUM_OPS][WPB];
  int checks = 0, failures = 0;
  int loads = 0, skips = 0;

  reconfig_manager dut (.clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .req_valid, .req_ready,
                        .req_op, .req_ver, .done, .skipped, .slot_wr, .decouple, .loaded_ver,
                        .loaded_valid, .cfg_error);

  always #5 clk = ~clk;

  // Partition configuration registers rebuilt from the manager's writes.
  always @(posedge clk)
    for (int o = 0; o < NUM_OPS; o++)
      if (slot_wr[o].we) image[o][slot_wr[o].widx] <= slot_wr[o].wdata;

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

  task automatic request(op_e o, int v);
    int cyc = 0;
    bit held = loaded_valid[o] && loaded_ver[o] == VER_W'(v);
    @(negedge clk); req_valid = 1; req_op = o; req_ver = VER_W'(v); #1;
    if (held) begin
      chk(done && skipped, "skip of a version already held");
      skips++;
      @(negedge clk); req_valid = 0;
    end else begin
      @(negedge clk); req_valid = 0; cyc = 1;
      while (!done && cyc < 200) begin
        chk(decouple[o], "partition decoupled during load");
        @(negedge clk); cyc++;
      end
      chk(cyc == WPB + 2, $sformatf("load took %0d cycles", cyc));
      loads++;
    end
    @(negedge clk); @(negedge clk);
    chk(!decouple[o], "partition coupled after load");
    for (int w = 0; w < WPB; w++)
      chk(image[o][w] == bs[(int'(o) * NUM_VERSIONS + v) * WPB + w], "partition holds requested bitstream");
    chk(loaded_valid[o] && loaded_ver[o] == VER_W'(v), "version recorded");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      bs[a] = $urandom;
      @(negedge clk); mem_we = 1; mem_waddr = AW'(a); mem_wdata = bs[a];
    end
    @(negedge clk); mem_we = 0;
    for (int v = 0; v < NUM_VERSIONS; v++)
      for (int o = 0; o < NUM_OPS; o++) request(op_e'(o), v);
    request(OP_PA, 3);
    repeat (10) request(op_e'($urandom_range(0, 2)), int'($urandom_range(0, 3)));
    chk(!cfg_error, "no configuration error");
    chk(loads >= 12 && skips >= 1, "loads and skips both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
