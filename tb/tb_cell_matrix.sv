// tb_cell_matrix: checks the cell matrix three ways.
// 1. The example chromosome, for all 16 inputs, against its circuit written
//    out as Boolean equations by hand.
// 2. Random legal chromosomes against the array-walking reference model.
// 3. Random unconstrained chromosomes: outputs and cfg_error against the
//    model, plus one hand-made chromosome with a forward reference.
module tb_cell_matrix;
  import evo_pkg::*;
  import tb_evo_model::*;

  logic [3:0] in;
  chrom_t     chrom;
  logic [3:0] out;
  logic       cfg_error;
  int         checks = 0, failures = 0;

  cell_matrix dut (.in(in), .chrom(chrom), .out(out), .cfg_error(cfg_error));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [3:0] exp_out, logic exp_err, string what);
    checks++;
    if (out !== exp_out || cfg_error !== exp_err) begin
      failures++;
      $display("FAIL %s in=%b out=%b exp=%b err=%b exp=%b", what, in, out, exp_out,
               cfg_error, exp_err);
    end
  endtask

  initial begin
    logic s [20];
    logic [4:0] m;
    // 1. Example circuit by hand.
    chrom = CHROM_EXAMPLE;
    for (int v = 0; v < 16; v++) begin
      in = 4'(v);
      for (int i = 0; i < 4; i++) begin s[i] = in[i]; s[i+4] = !in[i]; end
      s[8]  = s[0] & s[2];
      s[9]  = s[4] | s[3];
      s[10] = s[1] ^ s[6];
      s[11] = s[7] ? s[7] : s[5];
      s[12] = !(s[10] | s[9]);
      s[13] = s[8] & s[10];
      s[14] = !(s[9] & s[8]);
      s[15] = !(s[10] & s[11]);
      s[16] = s[11] ? s[14] : s[13];
      s[17] = s[11] ^ s[12];
      s[18] = s[15] ? s[14] : s[15];
      s[19] = s[11] & s[15];
      #1;
      check({s[19], s[18], s[17], s[16]}, 1'b0, "example");
    end
    // 2. Random legal chromosomes.
    for (int t = 0; t < 300; t++) begin
      chrom = random_chrom(1'b1);
      for (int v = 0; v < 16; v++) begin
        in = 4'(v);
        #1;
        m = eval_matrix(chrom, in);
        check(m[3:0], m[4], "legal");
      end
    end
    // 3. Unconstrained chromosomes and one forward reference.
    for (int t = 0; t < 300; t++) begin
      chrom = random_chrom(1'b0);
      in = 4'($urandom);
      #1;
      m = eval_matrix(chrom, in);
      check(m[3:0], m[4], "random");
    end
    chrom = CHROM_EXAMPLE;
    chrom[0] = mk_gene(G_AND, 0, 8, 0);   // row 0 reading its own row
    in = 4'hF;
    #1;
    checks++;
    if (cfg_error !== 1'b1) begin failures++; $display("FAIL forward reference not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
