// shiftreg_fsm: the eight-state shiftreg benchmark machine with its evolved
// control logic and three D flip-flops.
//
// shiftreg remembers its last three inputs and outputs the oldest of them:
// state st_k moves to st_{4*I + k/2} and outputs bit 0 of k, so the output
// is the input of three clock cycles earlier. With the state assignment
// [4,0,3,7,5,1,2,6] (st0 = 100, st1 = 000, ..., st7 = 110, written c2 c1 c0)
// the control logic reduces to four gates' worth of equations:
//   O  = c2 XNOR c1
//   n2 = NOT c0
//   n1 = c1 XOR c0
//   n0 = I XOR n1
// The XNOR output and the inverter feeding a next-state bit are those of the
// evolved circuits; sharing n1 inside n0 is this design's own form of the
// last equation. The output is combinational from the state (a Moore
// output). Reset (active low, asynchronous) enters st0, code 3'b100; the
// reset is this design's choice.
module shiftreg_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in,
  output logic       out,
  output logic [2:0] state
);

  logic [2:0] next_state;

  always_comb begin
    out           = ~(state[2] ^ state[1]);
    next_state[2] = ~state[0];
    next_state[1] = state[1] ^ state[0];
    next_state[0] = in ^ next_state[1];
  end

  state_reg #(
    .K          (3),
    .RESET_CODE (3'b100)
  ) u_state (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (next_state),
    .q     (state)
  );

endmodule
