// tb_state_reg: the state flip-flops load d on each rising edge, show it one
// cycle later, and return to the reset code on an asynchronous reset.
module tb_state_reg;
  localparam int unsigned K = 3;
  localparam logic [K-1:0] RC = 3'b101;

  logic         clk = 0, rst_n = 0;
  logic [K-1:0] d, q, prev;
  int           checks = 0, failures = 0;

  state_reg #(.K(K), .RESET_CODE(RC)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [K-1:0] exp, string what);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s q=%b exp=%b", what, q, exp); end
  endtask

  initial begin
    d = '0;
    #12;
    chk(RC, "in reset");
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      prev = 3'($urandom);
      d = prev;
      @(posedge clk); #1;
      chk(prev, "load");
    end
    // asynchronous reset between edges
    @(negedge clk);
    d = ~RC;
    #2 rst_n = 0;
    #1 chk(RC, "async reset");
    @(posedge clk); #1 chk(RC, "held in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
