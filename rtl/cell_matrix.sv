// cell_matrix: a feed-forward matrix of configurable gate cells whose
// function and wiring are given by a chromosome.
//
// Signals are numbered as in the chromosome encoding: primary inputs are
// 0..N_IN-1, their complements N_IN..2*N_IN-1, and the cells of row r
// (r = 0..N_ROWS-1) drive signals 2*N_IN + r*N_CELLS + c. The outputs of the
// matrix are the cells of the last row, so with the default sizes the inputs
// are 0..3, their complements 4..7, the rows drive 8..11, 12..15 and 16..19,
// and 16..19 are the outputs. A cell may take its operands from any signal
// numbered below its own row: row 0 from the inputs and their complements,
// later rows also from every earlier row. Each cell is a logic_cell whose
// gate code and operand numbers come from its gene; genes are stored row by
// row, gene r*N_CELLS + c for cell c of row r.
//
// An operand that names a signal the cell may not read (its own row, a later
// row, or beyond the last signal) reads as 0 and raises cfg_error, so that a
// badly formed chromosome is flagged instead of creating a loop. That check
// and the reading of an illegal operand as 0 are this design's choices.
// The block is purely combinational; its depth is N_ROWS gates.
module cell_matrix
  import evo_pkg::*;
#(
  parameter int unsigned N_IN    = 4,
  parameter int unsigned N_ROWS  = 3,
  parameter int unsigned N_CELLS = 4
) (
  input  logic [N_IN-1:0]                in,
  input  cell_gene_t [N_ROWS*N_CELLS-1:0] chrom,
  output logic [N_CELLS-1:0]             out,
  output logic                           cfg_error
);

  localparam int unsigned N_SIG = 2 * N_IN + N_ROWS * N_CELLS;

  initial begin
    assert (N_SIG <= 2 ** SIG_W)
      else $fatal(1, "cell_matrix: %0d signals do not fit in SIG_W=%0d bits", N_SIG, SIG_W);
  end

  logic [N_ROWS-1:0] row_err;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    // Signals visible to this row: everything numbered below its first cell.
    localparam int unsigned AW = 2 * N_IN + r * N_CELLS;
    logic [AW-1:0]      avail;
    logic [2**SIG_W-1:0] avail_pad;  // avail, zero-extended to every signal number
    logic [N_CELLS-1:0] y;
    logic [N_CELLS-1:0] cell_err;

    if (r == 0) begin : g_src
      assign avail = {~in, in};
    end else begin : g_src
      assign avail = {g_row[r-1].y, g_row[r-1].avail};
    end

    assign avail_pad = (2**SIG_W)'(avail);

    for (genvar c = 0; c < N_CELLS; c++) begin : g_cell
      cell_gene_t gene;
      logic       a, b, s;
      logic       ok0, ok1, ok2;

      assign gene = chrom[r*N_CELLS + c];
      assign ok0  = 32'(gene.op0) < AW;
      assign ok1  = 32'(gene.op1) < AW;
      assign ok2  = 32'(gene.op2) < AW;
      assign a    = avail_pad[gene.op0];
      assign b    = avail_pad[gene.op1];
      assign s    = avail_pad[gene.op2];

      always_comb begin
        unique case (gene.gate)
          G_NOT:   cell_err[c] = !ok0;
          G_MUX:   cell_err[c] = !(ok0 && ok1 && ok2);
          default: cell_err[c] = !(ok0 && ok1);
        endcase
      end

      logic_cell u_cell (
        .gate (gene.gate),
        .a    (a),
        .b    (b),
        .s    (s),
        .y    (y[c])
      );
    end

    assign row_err[r] = |cell_err;
  end

  assign out       = g_row[N_ROWS-1].y;
  assign cfg_error = |row_err;

endmodule
