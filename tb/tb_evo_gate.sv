// Exhaustive test of evo_gate: every gate type against every input pair,
// compared with the truth table of each type written out here.
module tb_evo_gate;
  import ecc_evo_pkg::*;

  logic [2:0] gate_id;
  logic       a, b, y;
  int checks = 0, failures = 0;

  evo_gate dut (.gate_id(gate_id), .a(a), .b(b), .y(y));

  // Truth tables, index {a,b}: 00 01 10 11 (bit 0 = a=0,b=0).
  localparam logic [3:0] TT [8] = '{
    4'b0011,  // NOT  : 1,1,0,0 for ab=00,01,10,11
    4'b1000,  // AND
    4'b1110,  // OR
    4'b0110,  // XOR
    4'b0111,  // NAND
    4'b0001,  // NOR
    4'b1001,  // XNOR
    4'b1100   // WIRE
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int ab = 0; ab < 4; ab++) begin
        gate_id = 3'(g);
        a = ab[1];
        b = ab[0];
        #1;
        checks++;
        if (y !== TT[g][ab]) begin
          failures++;
          $display("FAIL gate %0d a=%0b b=%0b y=%0b", g, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
