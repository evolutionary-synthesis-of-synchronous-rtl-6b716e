// tb_evolvable_fsm: the reconfigurable machine against a model that runs the
// stored chromosome through the reference matrix evaluator each cycle.
// Sequence: reset (default chromosome = shiftreg, also checked against the
// shiftreg state-index model), load the example chromosome, load random legal
// chromosomes, load an illegal one (cfg_error), reload shiftreg, and finally
// reset while another chromosome is loaded (reset restores the default).
// Each load must return the state to its initial code on the next cycle.
module tb_evolvable_fsm;
  import evo_pkg::*;
  import tb_evo_model::*;

  logic       clk = 0, rst_n = 0;
  logic       pi, po, cfg_load, cfg_error;
  logic [2:0] state;
  chrom_t     cfg_chrom;
  int         checks = 0, failures = 0;
  int         loads = 0;

  chrom_t      mc;       // model chromosome
  logic [2:0]  ms;       // model state
  int unsigned sk;       // shiftreg state index, valid while mc is CHROM_SHIFTREG

  evolvable_fsm dut (.clk(clk), .rst_n(rst_n), .pi(pi), .po(po), .state(state),
                     .cfg_load(cfg_load), .cfg_chrom(cfg_chrom), .cfg_error(cfg_error));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle with a random input: check outputs, then advance the model.
  task automatic step(bit check_sr);
    logic [4:0] m;
    @(negedge clk);
    pi = 1'($urandom);
    #1;
    m = eval_matrix(mc, {ms, pi});
    checks++;
    if (po !== m[0] || state !== ms || cfg_error !== m[4]) begin
      failures++;
      $display("FAIL state=%b exp=%b po=%b exp=%b err=%b exp=%b", state, ms, po, m[0],
               cfg_error, m[4]);
    end
    if (check_sr) begin
      checks++;
      if (state !== 3'(SR_CODE[sk]) || po !== shiftreg_out(sk)) begin
        failures++;
        $display("FAIL shiftreg st%0d state=%b po=%b", sk, state, po);
      end
    end
    @(posedge clk); #1;
    ms = m[3:1];
    sk = shiftreg_next(sk, pi);
  endtask

  task automatic load(chrom_t ch);
    @(negedge clk);
    cfg_chrom = ch;
    cfg_load  = 1;
    @(posedge clk); #1;
    cfg_load  = 0;
    mc = ch;
    ms = 3'b100;
    sk = 0;
    loads++;
    checks++;
    if (state !== 3'b100) begin failures++; $display("FAIL state not restarted by load"); end
  endtask

  initial begin
    pi = 0; cfg_load = 0; cfg_chrom = '0;
    mc = CHROM_SHIFTREG; ms = 3'b100; sk = 0;
    #16 rst_n = 1;
    repeat (100) step(1);
    load(CHROM_EXAMPLE);
    repeat (50) step(0);
    for (int t = 0; t < 20; t++) begin
      load(random_chrom(1'b1));
      repeat (10) step(0);
    end
    begin
      chrom_t bad = CHROM_SHIFTREG;
      bad[5] = mk_gene(G_AND, 13, 0, 0);  // row 1 reading its own row
      load(bad);
      repeat (3) step(0);
      checks++;
      if (cfg_error !== 1'b1) begin failures++; $display("FAIL illegal chromosome not flagged"); end
    end
    load(CHROM_SHIFTREG);
    repeat (60) step(1);
    load(CHROM_EXAMPLE);
    repeat (5) step(0);
    #1 rst_n = 0;   // just after a rising edge: no edge is missed by the model
    #1 rst_n = 1;
    mc = CHROM_SHIFTREG; ms = 3'b100; sk = 0;
    repeat (40) step(1);
    $display("loads=%0d", loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
