// Test of evo_slot: loads random chromosomes word by word through the
// configuration write port and checks the partition's outputs against the
// reference evaluator; checks that decouple forces the outputs to zero, that
// a single rewritten word changes the circuit, and that reset clears it.
module tb_evo_slot;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 10, N = 10;
  localparam int WPB = words_per_bitstream(M, N);

  logic clk = 0, rst_n = 0;
  cfg_wr_t cfg_wr = '0;
  logic decouple = 0;
  logic [2*M-1:0] in_bits = '0;
  logic [M-1:0] out;
  int checks = 0, failures = 0;

  evo_slot dut (.clk, .rst_n, .cfg_wr, .decouple, .in_bits, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(chrom_t c);
    for (int w = 0; w < WPB; w++) begin
      @(negedge clk);
      cfg_wr.we = 1; cfg_wr.widx = 8'(w); cfg_wr.wdata = c[w*32 +: 32];
    end
    @(negedge clk); cfg_wr = '0;
  endtask

  task automatic compare(chrom_t c, int n);
    repeat (n) begin
      logic [127:0] inb = '0;
      inb[2*M-1:0] = (2*M)'({$urandom, $urandom});
      in_bits = inb[2*M-1:0];
      #1;
      chk(out == ref_eval(c, M, N, inb)[M-1:0], "output of loaded circuit");
    end
  endtask

  initial begin
    chrom_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c = fig4_chrom();
    load(c);
    compare(c, 50);
    repeat (10) begin
      c = rand_chrom(M, N);
      load(c);
      compare(c, 30);
      decouple = 1;
      in_bits = '1; #1;
      chk(out == '0, "outputs forced to zero while decoupled");
      decouple = 0;
    end
    // Rewrite one word only.
    c[5*32 +: 32] = c[5*32 +: 32] ^ 32'h00ff_ff00;
    @(negedge clk); cfg_wr.we = 1; cfg_wr.widx = 8'd5; cfg_wr.wdata = c[5*32 +: 32];
    @(negedge clk); cfg_wr = '0;
    compare(c, 30);
    // Reset clears the configuration.
    rst_n = 0; #1; rst_n = 1;
    compare('0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
