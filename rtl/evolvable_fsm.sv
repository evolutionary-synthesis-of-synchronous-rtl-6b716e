// evolvable_fsm: a synchronous finite state machine whose control logic is
// a reconfigurable cell matrix.
//
// The machine has the usual structure: combinational control logic computes
// the primary outputs and the next state from the primary inputs and the
// current state, and K D flip-flops (state_reg) feed the state back. Here
// the control logic is a cell_matrix, so the machine is defined entirely by
// the chromosome held in a configuration register: loading an evolved
// chromosome turns the same hardware into a different machine.
//
// Mapping (this design's choice): matrix input i is primary input i for
// i < N_PI and current-state bit i-N_PI above that; matrix output j is
// primary output j for j < N_PO and next-state bit j-N_PO above that.
// Outputs are Mealy outputs, valid combinationally in the current cycle.
//
// Configuration: when cfg_load is high at a rising clock edge, cfg_chrom is
// stored and the state returns to RESET_STATE, so the new machine starts in
// its initial state one cycle later. Reset (active low, asynchronous) loads
// INIT_CHROM and RESET_STATE. The defaults hold the shiftreg benchmark
// machine (8 states, 1 input, 1 output, initial state coded 3'b100).
// cfg_error is high while the stored chromosome reads an illegal signal.
module evolvable_fsm
  import evo_pkg::*;
#(
  parameter int unsigned  N_PI        = 1,
  parameter int unsigned  N_PO        = 1,
  parameter int unsigned  K           = 3,
  parameter chrom_t       INIT_CHROM  = CHROM_SHIFTREG,
  parameter logic [K-1:0] RESET_STATE = 3'b100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_PI-1:0] pi,
  output logic [N_PO-1:0] po,
  output logic [K-1:0]    state,
  input  logic            cfg_load,
  input  chrom_t          cfg_chrom,
  output logic            cfg_error
);

  initial begin
    assert (N_PI + K == M_IN)
      else $fatal(1, "evolvable_fsm: N_PI + K must equal the matrix inputs (%0d)", M_IN);
    assert (N_PO + K == M_CELLS)
      else $fatal(1, "evolvable_fsm: N_PO + K must equal the matrix outputs (%0d)", M_CELLS);
  end

  chrom_t              chrom_q;
  logic [M_CELLS-1:0]  m_out;
  logic [K-1:0]        next_state;
  logic [K-1:0]        d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        chrom_q <= INIT_CHROM;
    else if (cfg_load) chrom_q <= cfg_chrom;
  end

  cell_matrix #(
    .N_IN    (M_IN),
    .N_ROWS  (M_ROWS),
    .N_CELLS (M_CELLS)
  ) u_logic (
    .in        ({state, pi}),
    .chrom     (chrom_q),
    .out       (m_out),
    .cfg_error (cfg_error)
  );

  assign po         = m_out[N_PO-1:0];
  assign next_state = m_out[N_PO +: K];
  assign d          = cfg_load ? RESET_STATE : next_state;

  state_reg #(
    .K          (K),
    .RESET_CODE (RESET_STATE)
  ) u_state (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (d),
    .q     (state)
  );

endmodule
