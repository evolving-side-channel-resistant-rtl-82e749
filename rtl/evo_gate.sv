// One gate of an evolved combinational circuit.
//
// The 3-bit GATE_ID selects one of the eight primitive functions NOT, AND, OR,
// XOR, NAND, NOR, XNOR and WIRE (a plain connection). Two-input gates use both
// inputs; the one-input gates NOT and WIRE use input a (IP1) and ignore b.
// The gate set is the document's; which input a one-input gate uses and the
// binary code of each type are this design's choices (see ecc_evo_pkg).
// Purely combinational, no clock.
module evo_gate
  import ecc_evo_pkg::*;
(
  input  logic [GATE_ID_W-1:0] gate_id,
  input  logic                 a,
  input  logic                 b,
  output logic                 y
);

  always_comb begin
    unique case (gate_e'(gate_id))
      G_NOT:   y = ~a;
      G_AND:   y = a & b;
      G_OR:    y = a | b;
      G_XOR:   y = a ^ b;
      G_NAND:  y = ~(a & b);
      G_NOR:   y = ~(a | b);
      G_XNOR:  y = ~(a ^ b);
      G_WIRE:  y = a;
      default: y = a;
    endcase
  end

endmodule
