// Test of config_memory: fills every word through the load port, reads every
// word back with the engine's port (one cycle of latency), checks that rdata
// holds while re is low and that a read of a word being written returns the
// old contents.
module tb_config_memory;
  import ecc_evo_pkg::*;

  localparam int DEPTH = NUM_OPS * NUM_VERSIONS * words_per_bitstream(10, 10);
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  config_memory dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_data(logic [31:0] e, string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL %s: rdata=%h expected=%h", what, rdata, e);
    end
  endtask

  initial begin
    if (DEPTH != 384) begin failures++; $display("FAIL depth %0d", DEPTH); end
    checks++;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = $urandom;
      @(negedge clk); we = 1; waddr = AW'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      expect_data(model[a], "read back");
      @(negedge clk);
      expect_data(model[a], "hold while re low");
    end
    // Read and write of the same word in one cycle.
    @(negedge clk); re = 1; raddr = AW'(7); we = 1; waddr = AW'(7); wdata = ~model[7];
    @(negedge clk); re = 0; we = 0;
    expect_data(model[7], "read during write returns old word");
    model[7] = ~model[7];
    @(negedge clk); re = 1; raddr = AW'(7);
    @(negedge clk); re = 0;
    expect_data(model[7], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
