// evo_fsm_top: the example and benchmark state machines side by side.
//
// Three independent machines share only the clock and reset:
//   t1_*  the four-state example machine under state assignment A1,
//   sr_*  the shiftreg benchmark machine with its evolved control logic,
//   ev_*  the evolvable machine, whose cell-matrix control logic is set by
//         a chromosome (by default the shiftreg machine again, so that the
//         fixed and the reconfigurable versions can be compared).
// Each machine's inputs, outputs and state are brought out unchanged; see
// the individual modules for their timing.
module evo_fsm_top
  import evo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // example machine
  input  logic       t1_in,
  output logic       t1_out,
  output logic [1:0] t1_state,
  // shiftreg machine
  input  logic       sr_in,
  output logic       sr_out,
  output logic [2:0] sr_state,
  // evolvable machine
  input  logic       ev_in,
  output logic       ev_out,
  output logic [2:0] ev_state,
  input  logic       ev_cfg_load,
  input  chrom_t     ev_cfg_chrom,
  output logic       ev_cfg_error
);

  table1_fsm u_table1 (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (t1_in),
    .out   (t1_out),
    .state (t1_state)
  );

  shiftreg_fsm u_shiftreg (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (sr_in),
    .out   (sr_out),
    .state (sr_state)
  );

  evolvable_fsm u_evolvable (
    .clk       (clk),
    .rst_n     (rst_n),
    .pi        (ev_in),
    .po        (ev_out),
    .state     (ev_state),
    .cfg_load  (ev_cfg_load),
    .cfg_chrom (ev_cfg_chrom),
    .cfg_error (ev_cfg_error)
  );

endmodule
