// The four evolved-circuit configurations (rows x levels): 10x10 for 3-bit
// points, 10x16 for 4-bit, 20x10 for 6-bit and 20x16 for 8-bit. For each,
// checks that the chromosome length equals the published one (1020, 1680,
// 2400 and 3960 bits) and that the circuit matches the reference evaluator
// for random chromosomes and inputs.
module tb_evo_configs;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One configuration under test.
  for (genvar k = 0; k < 4; k++) begin : g_cfg
    localparam int M    = (k < 2) ? 10 : 20;
    localparam int N    = (k % 2 == 0) ? 10 : 16;
    localparam int L    = chrom_len(M, N);
    localparam int LPUB = (k == 0) ? 1020 : (k == 1) ? 1680 : (k == 2) ? 2400 : 3960;
    logic [2*M-1:0] in_bits;
    logic [L-1:0]   chrom;
    logic [M-1:0]   out;
    evo_circuit #(.M(M), .N(N)) dut (.in_bits(in_bits), .chrom(chrom), .out(out));

    task automatic run();
      chrom_t c;
      logic [127:0] inb;
      chk(L == LPUB, $sformatf("%0dx%0d chromosome length %0d, published %0d", M, N, L, LPUB));
      repeat (20) begin
        c = rand_chrom(M, N);
        chrom = c[L-1:0];
        repeat (20) begin
          inb = '0;
          inb[2*M-1:0] = (2*M)'({$urandom, $urandom});
          in_bits = inb[2*M-1:0];
          #1;
          chk(out == ref_eval(c, M, N, inb)[M-1:0], $sformatf("%0dx%0d output", M, N));
        end
      end
    endtask
  end

  initial begin
    g_cfg[0].run();
    g_cfg[1].run();
    g_cfg[2].run();
    g_cfg[3].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
