// tb_shiftreg_fsm: drives the shiftreg machine with random bits and checks,
// every cycle, its state code against the assignment of a state-index model
// and its output against the input of three cycles earlier (the machine's
// latency). All eight states must be visited.
module tb_shiftreg_fsm;
  import tb_evo_model::*;

  logic       clk = 0, rst_n = 0, in, out;
  logic [2:0] state;
  logic       hist [3];
  int         checks = 0, failures = 0;
  int         visits [8];

  shiftreg_fsm dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned k = 0;
    in = 0;
    hist = '{0, 0, 0};  // st0 holds three zeros
    #16 rst_n = 1;  // released after the edge at t=15
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      in = 1'($urandom);
      #1;
      checks++;
      if (state !== 3'(SR_CODE[k]) || out !== shiftreg_out(k) || out !== hist[2]) begin
        failures++;
        $display("FAIL cycle %0d st%0d state=%b exp=%b out=%b exp=%b delayed=%b", c, k, state,
                 3'(SR_CODE[k]), out, shiftreg_out(k), hist[2]);
      end
      visits[k]++;
      @(posedge clk); #1;
      k = shiftreg_next(k, in);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = in;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL st%0d never visited", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
