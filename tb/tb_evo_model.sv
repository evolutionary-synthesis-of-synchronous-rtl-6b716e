// tb_evo_model: reference models used by the testbenches.
//
// eval_matrix evaluates a chromosome on an input vector by walking the
// signal numbers in order in an array (inputs, complements, then each cell),
// independently of the generate structure of the RTL. It also reports
// whether any used operand names a signal the cell may not read.
// shiftreg_* give the benchmark machine by state index: st_k goes to
// st_{4*I + k/2} and outputs bit 0 of k; SR_CODE is the state assignment.
package tb_evo_model;
  import evo_pkg::*;

  localparam int unsigned SR_CODE [8] = '{4, 0, 3, 7, 5, 1, 2, 6};

  function automatic logic gate_ref(int unsigned g, logic a, logic b, logic s);
    // Truth tables over {s, b, a} as 8-bit constants, bit index = {s,b,a}.
    logic [7:0] tt [8] = '{8'h55, 8'h88, 8'hEE, 8'h66, 8'h77, 8'h11, 8'h99, 8'hCA};
    return tt[g][{s, b, a}];
  endfunction

  // Returns {cfg_error, out[3:0]}.
  function automatic logic [M_CELLS:0] eval_matrix(chrom_t ch, logic [M_IN-1:0] in);
    logic sig [32];
    logic err;
    logic [M_CELLS-1:0] o;
    int unsigned base, n;
    foreach (sig[i]) sig[i] = 1'b0;
    for (int i = 0; i < M_IN; i++) begin
      sig[i]        = in[i];
      sig[M_IN + i] = !in[i];
    end
    err = 1'b0;
    for (int r = 0; r < M_ROWS; r++) begin
      base = 2 * M_IN + r * M_CELLS;
      for (int c = 0; c < M_CELLS; c++) begin
        cell_gene_t g = ch[r*M_CELLS + c];
        int unsigned o0 = g.op0, o1 = g.op1, o2 = g.op2;
        logic a = (o0 < base) ? sig[o0] : 1'b0;
        logic b = (o1 < base) ? sig[o1] : 1'b0;
        logic s = (o2 < base) ? sig[o2] : 1'b0;
        n = (g.gate == G_NOT) ? 1 : (g.gate == G_MUX) ? 3 : 2;
        if (o0 >= base || (n > 1 && o1 >= base) || (n > 2 && o2 >= base)) err = 1'b1;
        sig[base + c] = gate_ref(int'(g.gate), a, b, s);
      end
    end
    for (int c = 0; c < M_CELLS; c++) o[c] = sig[2*M_IN + (M_ROWS-1)*M_CELLS + c];
    return {err, o};
  endfunction

  // A random chromosome. With legal=1 every operand names a readable signal.
  function automatic chrom_t random_chrom(bit legal);
    chrom_t ch;
    for (int r = 0; r < M_ROWS; r++)
      for (int c = 0; c < M_CELLS; c++) begin
        int unsigned lim = legal ? 2 * M_IN + r * M_CELLS : 2 ** SIG_W;
        ch[r*M_CELLS + c] = mk_gene(gate_e'($urandom_range(7)), $urandom_range(lim - 1),
                                    $urandom_range(lim - 1), $urandom_range(lim - 1));
      end
    return ch;
  endfunction

  function automatic int unsigned shiftreg_next(int unsigned k, logic in);
    return (int'(in) << 2) | (k >> 1);
  endfunction

  function automatic logic shiftreg_out(int unsigned k);
    return k[0];
  endfunction

endpackage
