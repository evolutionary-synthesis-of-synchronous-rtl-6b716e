// evo_pkg: types and constants shared by the evolvable control-logic blocks.
//
// The gate codes, gate-equivalent costs and delays are those of the gate
// library used to price evolved circuits (NOT, AND, OR, XOR, NAND, NOR, XNOR
// and a 2:1 multiplexer, all with the minimum number of inputs). A cell gene
// names one gate and up to three operand signal numbers; the numbering of
// signals (inputs, their complements, then the outputs of each row of cells)
// follows the chromosome encoding of the cell matrix. Delays are kept in
// units of 0.1 ps so that they stay integers. The field order of a gene and
// the operand-to-pin order of the multiplexer are this design's choices.
package evo_pkg;

  // Gate codes of the cell library.
  typedef enum logic [2:0] {
    G_NOT  = 3'd0,
    G_AND  = 3'd1,
    G_OR   = 3'd2,
    G_XOR  = 3'd3,
    G_NAND = 3'd4,
    G_NOR  = 3'd5,
    G_XNOR = 3'd6,
    G_MUX  = 3'd7
  } gate_e;

  // Width of a signal number; 20 signals are used by the 4-input,
  // 3-row, 4-cell-per-row matrix.
  localparam int unsigned SIG_W = 5;
  typedef logic [SIG_W-1:0] sig_t;

  // One cell gene: the gate and its operands. NOT uses op0 only, the
  // two-input gates op0 and op1, the multiplexer op0 (D0), op1 (D1) and
  // op2 (select S0). The output signal number is implied by the cell's place.
  typedef struct packed {
    gate_e gate;
    sig_t  op0;
    sig_t  op1;
    sig_t  op2;
  } cell_gene_t;

  localparam int unsigned GENE_W = $bits(cell_gene_t);

  // Area in gate equivalents, indexed by gate code.
  localparam int unsigned GATE_EQUIV [8] = '{1, 2, 2, 3, 1, 1, 3, 3};
  // Propagation delay in units of 0.1 ps (0.0625 ns = 625), by gate code.
  localparam int unsigned GATE_DELAY [8] = '{625, 2090, 2160, 2120, 1300, 1560, 2110, 2120};

  function automatic cell_gene_t mk_gene(gate_e g, int unsigned a, int unsigned b,
                                         int unsigned s);
    cell_gene_t r;
    r.gate = g;
    r.op0  = sig_t'(a);
    r.op1  = sig_t'(b);
    r.op2  = sig_t'(s);
    return r;
  endfunction

  // Sizes of the default cell matrix: 4 inputs, 3 rows of 4 cells.
  localparam int unsigned M_IN    = 4;
  localparam int unsigned M_ROWS  = 3;
  localparam int unsigned M_CELLS = 4;
  typedef cell_gene_t [M_ROWS*M_CELLS-1:0] chrom_t;

  // Example chromosome of the encoded 4-input, 4-output circuit, listed row
  // by row (cell outputs 8..11, 12..15, 16..19). Unused operands are 0.
  localparam chrom_t CHROM_EXAMPLE = {
    // row 2: outputs 16..19
    mk_gene(G_AND,  11, 15,  0), mk_gene(G_MUX, 15, 14, 15),
    mk_gene(G_XOR,  11, 12,  0), mk_gene(G_MUX, 13, 14, 11),
    // row 1: outputs 12..15
    mk_gene(G_NAND, 10, 11,  0), mk_gene(G_NAND, 9,  8,  0),
    mk_gene(G_AND,   8, 10,  0), mk_gene(G_NOR, 10,  9,  0),
    // row 0: outputs 8..11
    mk_gene(G_MUX,   5,  7,  7), mk_gene(G_XOR,  1,  6,  0),
    mk_gene(G_OR,    4,  3,  0), mk_gene(G_AND,  0,  2,  0)
  };

  // Chromosome that makes the matrix the control logic of the shiftreg
  // machine under state assignment [4,0,3,7,5,1,2,6]. Matrix inputs are
  // {c2, c1, c0, I} (signal 0 = I, 1..3 = c0..c2), outputs {n2, n1, n0, O}.
  //   O = c2 XNOR c1, n2 = ~c0, n1 = c1 ^ c0, n0 = I XOR (c1 ^ c0).
  // Rows 1 and 2 forward signals with AND(x, x).
  localparam chrom_t CHROM_SHIFTREG = {
    mk_gene(G_AND, 15, 15, 0), mk_gene(G_AND, 14, 14, 0),
    mk_gene(G_AND, 13, 13, 0), mk_gene(G_AND, 12, 12, 0),
    mk_gene(G_AND, 10, 10, 0), mk_gene(G_AND,  8,  8, 0),
    mk_gene(G_XOR,  11, 8, 0), mk_gene(G_AND,  9,  9, 0),
    mk_gene(G_AND,  0,  0, 0), mk_gene(G_AND,  5,  5, 0),
    mk_gene(G_XNOR, 3,  2, 0), mk_gene(G_XOR,  1,  2, 0)
  };

endpackage
