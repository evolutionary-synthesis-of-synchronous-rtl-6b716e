// table1_fsm: the four-state, one-input, one-output example machine, built
// as control logic plus two D flip-flops under a chosen state assignment.
//
// Transition and output table (present state: next state for I=0 / I=1,
// output for I=0 / I=1):
//   q0: q0 / q0, 0 / 0      q1: q2 / q2, 0 / 1
//   q2: q0 / q0, 1 / 0      q3: q2 / q2, 1 / 1
// The next state does not depend on I; the output is a Mealy output.
// CODE[i] is the two-bit code of state qi. The default is the cheaper
// assignment A1 = {q0=00, q1=10, q2=01, q3=11}; A0 = {00, 11, 01, 10} is the
// alternative. A code is read with its first written digit as bit 1.
// The control logic decodes the current code to a state, looks the table
// up and encodes the next state, so that any assignment yields the same
// input/output behaviour and synthesis derives the gates for it.
// As tabulated, q0 only ever returns to q0 and the other states all lead
// to it, so the machine reached from q0 stays there. Reset (active low,
// asynchronous) enters state q{INIT_STATE}, q0 by default; the reset, its
// selectable target and the digit order of the codes are this design's
// choices.
module table1_fsm #(
  parameter logic [1:0]  CODE [4]   = '{2'b00, 2'b10, 2'b01, 2'b11},
  parameter int unsigned INIT_STATE = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in,
  output logic       out,
  output logic [1:0] state
);

  // Next state (index) and output for I=0 and I=1, by present state.
  localparam int unsigned NEXT [4] = '{0, 2, 0, 2};
  localparam logic [1:0]  OUTS [4] = '{2'b00, 2'b10, 2'b01, 2'b11}; // {O(I=1), O(I=0)}

  logic [1:0] idx;
  logic [1:0] next_code;

  always_comb begin
    idx = 2'd0;
    for (int i = 0; i < 4; i++)
      if (state == CODE[i]) idx = 2'(i);
    next_code = CODE[NEXT[idx]];
    out       = OUTS[idx][in];
  end

  state_reg #(
    .K          (2),
    .RESET_CODE (CODE[INIT_STATE])
  ) u_state (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (next_code),
    .q     (state)
  );

endmodule
