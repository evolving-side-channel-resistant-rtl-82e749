// Test of evo_circuit at the 10x10 configuration.
// 1. The published point-addition netlist, as a chromosome, against output
//    values worked out for it by an independent evaluation of the printed
//    netlist (golden vectors) and against the reference evaluator.
// 2. Random chromosomes (indices in range) and random inputs against the
//    reference evaluator.
// 3. Random chromosomes with unconstrained index fields (out-of-range indices
//    read 0) against the reference evaluator.
module tb_evo_circuit;
  import ecc_evo_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 10;
  localparam int N = 10;
  localparam int L = chrom_len(M, N);
  localparam int C = M / 2;

  logic [2*M-1:0] in_bits;
  logic [L-1:0]   chrom;
  logic [M-1:0]   out;
  int checks = 0, failures = 0;

  evo_circuit #(.M(M), .N(N)) dut (.in_bits(in_bits), .chrom(chrom), .out(out));

  task automatic check(chrom_t c, logic [127:0] inb, logic [M-1:0] expect_out, string what);
    chrom   = c[L-1:0];
    in_bits = inb[2*M-1:0];
    #1;
    checks++;
    if (out !== expect_out) begin
      failures++;
      $display("FAIL %s: in=%h out=%h expected=%h", what, in_bits, out, expect_out);
    end
  endtask

  // Golden vectors of the printed circuit: operands (x1,y1,x2,y2) and result
  // (x3,y3), 5-bit coordinates.
  int gv [5][6] = '{'{0,0,0,0, 10,9}, '{2,3,20,0, 0,13}, '{8,9,0,0, 10,13},
                    '{10,15,0,0, 10,21}, '{23,30,15,24, 0,13}};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom_t c;
    logic [127:0] inb;
    if (L != 1020) begin
      failures++;
      $display("FAIL chromosome length %0d, expected 1020", L);
    end
    checks++;
    c = fig4_chrom();
    foreach (gv[i]) begin
      logic [M-1:0] e;
      e = M'(gv[i][4]) | (M'(gv[i][5]) << C);
      check(c, pack_in(C, gv[i][0], gv[i][1], gv[i][2], gv[i][3]), e, "fig4 golden");
    end
    repeat (100) begin
      inb = '0;
      inb[2*M-1:0] = (2*M)'({$urandom, $urandom});
      check(c, inb, ref_eval(c, M, N, inb)[M-1:0], "fig4 random");
    end
    repeat (40) begin
      c = rand_chrom(M, N);
      repeat (25) begin
        inb = '0;
        inb[2*M-1:0] = (2*M)'({$urandom, $urandom});
        check(c, inb, ref_eval(c, M, N, inb)[M-1:0], "random chromosome");
      end
    end
    repeat (20) begin
      c = '0;
      for (int k = 0; k < L; k += 32) c[k +: 32] = $urandom;
      repeat (10) begin
        inb = '0;
        inb[2*M-1:0] = (2*M)'({$urandom, $urandom});
        check(c, inb, ref_eval(c, M, N, inb)[M-1:0], "unconstrained chromosome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
