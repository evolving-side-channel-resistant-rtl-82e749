// Test of config_engine with a behavioural one-cycle-latency memory in the
// testbench. For each request it checks the words handed to the ICAP side
// (every word of the right bitstream, in order, with its index), the cycle
// of done (WPB+2 cycles after the request), the recorded version, and that a
// repeated request for the version already held is answered at once with
// skipped and without any word.
module tb_config_engine;
  import ecc_evo_pkg::*;

  localparam int WPB = words_per_bitstream(10, 10);
  localparam int DEPTH = NUM_OPS * NUM_VERSIONS * WPB;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, done, skipped;
  op_e req_op = OP_PA;
  logic [VER_W-1:0] req_ver = '0;
  logic mem_re;
  logic [AW-1:0] mem_raddr;
  logic [31:0] mem_rdata;
  logic active;
  op_e op;
  cfg_wr_t word;
  logic [VER_W-1:0] loaded_ver [NUM_OPS];
  logic [NUM_OPS-1:0] loaded_valid;
  logic [31:0] mem [DEPTH];
  int checks = 0, failures = 0;

  config_engine dut (.clk, .rst_n, .req_valid, .req_ready, .req_op, .req_ver, .done, .skipped,
                     .mem_re, .mem_raddr, .mem_rdata, .active, .op, .word, .loaded_ver, .loaded_valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_raddr];

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

  task automatic request(op_e o, int v, bit expect_skip);
    int cyc = 0, nw = 0;
    bit got_done = 0;
    @(negedge clk);
    req_valid = 1; req_op = o; req_ver = VER_W'(v);
    #1;
    chk(req_ready, "ready when idle");
    if (expect_skip) begin
      chk(done && skipped, "immediate done on a version already held");
      @(negedge clk); req_valid = 0;
      chk(!active && !word.we, "no load on a skipped request");
      return;
    end
    chk(!done, "no done on a new version");
    @(negedge clk); req_valid = 0;
    cyc = 1;
    while (!got_done && cyc < 200) begin
      if (word.we) begin
        chk(word.widx == 8'(nw), "word index in order");
        chk(word.wdata == mem[(int'(o) * NUM_VERSIONS + v) * WPB + nw], "word contents");
        chk(active && op == o, "active and op during load");
        nw++;
      end
      if (done) begin
        got_done = 1;
        chk(!skipped, "done of a load is not skipped");
        chk(cyc == WPB + 2, $sformatf("done after %0d cycles, expected %0d", cyc, WPB + 2));
      end
      @(negedge clk); cyc++;
    end
    chk(got_done, "done seen");
    chk(nw == WPB, "all words passed");
    chk(loaded_valid[o] && loaded_ver[o] == VER_W'(v), "version recorded");
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(loaded_valid == '0, "nothing loaded after reset");
    for (int o = 0; o < NUM_OPS; o++) request(op_e'(o), o, 0);
    request(OP_PD, 1, 1);
    request(OP_PD, 3, 0);
    request(OP_PD, 3, 1);
    request(OP_PA, 2, 0);
    request(OP_PM, 2, 1);
    for (int i = 0; i < 8; i++) begin
      op_e o = op_e'(i % 3);
      int  v = int'($urandom_range(0, 3));
      request(o, v, loaded_ver[o] == VER_W'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
