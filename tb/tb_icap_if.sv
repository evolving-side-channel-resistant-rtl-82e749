// Test of icap_if: complete loads into each partition (every word must reach
// only the target partition one cycle later, decouple must cover the load and
// one cycle after it, no error), then a short load and an out-of-range word
// index, each of which must raise the sticky error flag.
module tb_icap_if;
  import ecc_evo_pkg::*;

  localparam int WPB = words_per_bitstream(10, 10);

  logic clk = 0, rst_n = 0;
  logic active = 0;
  op_e op = OP_PA;
  cfg_wr_t word = '0;
  cfg_wr_t slot_wr [NUM_OPS];
  logic [NUM_OPS-1:0] decouple;
  logic cfg_error;
  int checks = 0, failures = 0;

  icap_if dut (.clk, .rst_n, .active, .op, .word, .slot_wr, .decouple, .cfg_error);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Previous cycle's word, to compare with what reaches the partitions.
  cfg_wr_t prev_word;
  op_e     prev_op;

  task automatic load(op_e o, int nwords, int bad_idx);
    @(negedge clk); active = 1; op = o; word = '0; #1;
    chk(decouple == (3'b001 << o), "decouple at start of load");
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      word.we = 1; word.widx = 8'(i == bad_idx ? WPB + 3 : i); word.wdata = $urandom;
      for (int p = 0; p < NUM_OPS; p++) begin
        chk(slot_wr[p].we == (prev_word.we && p == int'(o)), "write enable only to target");
        if (prev_word.we && p == int'(o))
          chk(slot_wr[p].widx == prev_word.widx && slot_wr[p].wdata == prev_word.wdata, "word passed on");
      end
      chk(decouple == (3'b001 << o), "decouple during load");
    end
    @(negedge clk); word = '0;
    chk(slot_wr[o].we && slot_wr[o].wdata == prev_word.wdata, "last word passed on");
    @(negedge clk); active = 0; #1;
    chk(decouple == (3'b001 << o), "decouple one cycle after load");
    @(negedge clk);
    chk(decouple == 3'b000, "coupled after load");
  endtask

  always @(posedge clk) begin
    prev_word <= word;
    prev_op   <= op;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < NUM_OPS; o++) begin
      load(op_e'(o), WPB, -1);
      chk(!cfg_error, "no error after complete load");
    end
    load(OP_PD, WPB - 2, -1);
    chk(cfg_error, "error after short load");
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(!cfg_error, "error cleared by reset");
    load(OP_PM, WPB, 5);
    chk(cfg_error, "error after out-of-range word index");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
