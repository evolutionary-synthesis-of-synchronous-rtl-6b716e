// tb_evo_fsm_top: end-to-end run of the top level at its default sizes.
// All three machines get random inputs for a few hundred cycles.
//  - example machine: output and state against its table (from reset it
//    stays in q0, so the output must be 0 for both input values);
//  - shiftreg machine: state code against the assignment, output against the
//    input of three cycles earlier, every state visited;
//  - evolvable machine: in its default configuration it must track the fixed
//    shiftreg machine cycle by cycle when both get the same input; it is then
//    reconfigured with the example chromosome (checked against the reference
//    evaluator), with an illegal chromosome (cfg_error), and back to shiftreg.
// Each mechanism is counted and one that never happens counts as a failure.
module tb_evo_fsm_top;
  import evo_pkg::*;
  import tb_evo_model::*;

  logic       clk = 0, rst_n = 0;
  logic       t1_in, t1_out, sr_in, sr_out, ev_in, ev_out, ev_cfg_load, ev_cfg_error;
  logic [1:0] t1_state;
  logic [2:0] sr_state, ev_state;
  chrom_t     ev_cfg_chrom;
  int         checks = 0, failures = 0;

  // mechanism counters
  int n_t1_mealy1 = 0, n_t1_mealy0 = 0;   // example-machine output checked at I=1 / I=0
  int n_sr_states = 0;                    // distinct shiftreg states seen
  int n_lockstep = 0;                     // cycles evolvable == fixed shiftreg
  int n_reconfig = 0;                     // chromosome loads
  int n_cfg_err = 0;                      // cycles with cfg_error flagged correctly
  int n_example = 0;                      // cycles run on the example chromosome
  bit sr_seen [8];

  evo_fsm_top dut (
    .clk(clk), .rst_n(rst_n),
    .t1_in(t1_in), .t1_out(t1_out), .t1_state(t1_state),
    .sr_in(sr_in), .sr_out(sr_out), .sr_state(sr_state),
    .ev_in(ev_in), .ev_out(ev_out), .ev_state(ev_state),
    .ev_cfg_load(ev_cfg_load), .ev_cfg_chrom(ev_cfg_chrom), .ev_cfg_error(ev_cfg_error)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  chrom_t      mc;
  logic [2:0]  ms;
  int unsigned sk;
  logic        hist [3];
  bit          lockstep;   // evolvable machine expected to equal the fixed one

  task automatic fail(string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  task automatic step();
    logic [4:0] m;
    @(negedge clk);
    t1_in = 1'($urandom);
    sr_in = 1'($urandom);
    ev_in = lockstep ? sr_in : 1'($urandom);
    #1;
    // example machine
    checks++;
    if (t1_out !== 1'b0 || t1_state !== 2'b00) fail("example machine");
    if (t1_in) n_t1_mealy1++; else n_t1_mealy0++;
    // shiftreg machine
    checks++;
    if (sr_state !== 3'(SR_CODE[sk]) || sr_out !== hist[2]) fail("shiftreg machine");
    if (!sr_seen[sk]) begin sr_seen[sk] = 1; n_sr_states++; end
    // evolvable machine
    m = eval_matrix(mc, {ms, ev_in});
    checks++;
    if (ev_out !== m[0] || ev_state !== ms || ev_cfg_error !== m[4]) fail("evolvable machine");
    if (m[4] && ev_cfg_error) n_cfg_err++;
    if (mc == CHROM_EXAMPLE) n_example++;
    if (lockstep) begin
      checks++;
      if (ev_out !== sr_out || ev_state !== sr_state) fail("evolvable vs fixed shiftreg");
      else n_lockstep++;
    end
    @(posedge clk); #1;
    ms = m[3:1];
    sk = shiftreg_next(sk, sr_in);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = sr_in;
  endtask

  task automatic load(chrom_t ch);
    @(negedge clk);
    ev_cfg_chrom = ch;
    ev_cfg_load  = 1;
    @(posedge clk); #1;
    ev_cfg_load  = 0;
    mc = ch;
    ms = 3'b100;
    // the fixed shiftreg machine took this edge with its held input
    sk = shiftreg_next(sk, sr_in);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = sr_in;
    n_reconfig++;
  endtask

  initial begin
    chrom_t bad;
    t1_in = 0; sr_in = 0; ev_in = 0; ev_cfg_load = 0; ev_cfg_chrom = '0;
    mc = CHROM_SHIFTREG; ms = 3'b100; sk = 0; hist = '{0, 0, 0};
    lockstep = 1;
    #16 rst_n = 1;
    repeat (200) step();
    lockstep = 0;
    load(CHROM_EXAMPLE);
    repeat (100) step();
    bad = CHROM_EXAMPLE;
    bad[9] = mk_gene(G_MUX, 1, 2, 19);   // last row reading a later cell
    load(bad);
    repeat (20) step();
    load(CHROM_SHIFTREG);
    // The fixed machine keeps running; restart the fixed one's comparison by
    // waiting until both hold the same three-input history.
    lockstep = 1;
    repeat (3) begin
      @(negedge clk);
      t1_in = 0;
      sr_in = 1'($urandom);
      ev_in = sr_in;
      @(posedge clk); #1;
      sk = shiftreg_next(sk, sr_in);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = sr_in;
    end
    ms = sr_state;   // after three shared inputs both machines hold the same state
    repeat (100) step();

    $display("mechanisms: example I=0/I=1 %0d/%0d, shiftreg states %0d, lockstep %0d,",
             n_t1_mealy0, n_t1_mealy1, n_sr_states, n_lockstep);
    $display("            reconfigurations %0d, example-chromosome cycles %0d, cfg_error %0d",
             n_reconfig, n_example, n_cfg_err);
    if (n_t1_mealy0 == 0 || n_t1_mealy1 == 0) fail("example machine input values not both seen");
    if (n_sr_states != 8) fail("not every shiftreg state visited");
    if (n_lockstep == 0)  fail("no lockstep cycle");
    if (n_reconfig < 3)   fail("reconfiguration not exercised");
    if (n_example == 0)   fail("example chromosome never ran");
    if (n_cfg_err == 0)   fail("cfg_error never raised");
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
