// logic_cell: one cell of the evolvable cell matrix.
//
// The cell is a single gate whose type is selected at run time by a 3-bit
// gate code: NOT, AND, OR, XOR, NAND, NOR, XNOR or a 2:1 multiplexer. The
// codes and gate set are those of the cell library; a NOT looks only at
// operand a, the two-input gates at a and b, and the multiplexer passes
// d0 = a when its select s is 0 and d1 = b when s is 1 (which operand is the
// select is this design's choice). Purely combinational: y settles one gate
// delay after any input.
module logic_cell
  import evo_pkg::*;
(
  input  gate_e gate,
  input  logic  a,
  input  logic  b,
  input  logic  s,
  output logic  y
);

  always_comb begin
    unique case (gate)
      G_NOT:   y = ~a;
      G_AND:   y = a & b;
      G_OR:    y = a | b;
      G_XOR:   y = a ^ b;
      G_NAND:  y = ~(a & b);
      G_NOR:   y = ~(a | b);
      G_XNOR:  y = ~(a ^ b);
      G_MUX:   y = s ? b : a;
      default: y = 1'b0;
    endcase
  end

endmodule
