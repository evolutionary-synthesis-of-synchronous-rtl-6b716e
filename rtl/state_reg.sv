// state_reg: the bank of D flip-flops that holds the current state of a
// synchronous finite state machine.
//
// The control logic computes the next state from the primary inputs and the
// current state; these K flip-flops load it on every rising clock edge and
// feed it back. K is the smallest integer with 2**K >= number of states.
// An active-low asynchronous reset loads RESET_CODE, the code of the
// machine's initial state; the reset itself is this design's addition.
module state_reg #(
  parameter int unsigned          K          = 2,
  parameter logic [K-1:0]         RESET_CODE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_CODE;
    else        q <= d;
  end

endmodule
