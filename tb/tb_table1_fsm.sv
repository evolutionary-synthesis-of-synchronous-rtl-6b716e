// tb_table1_fsm: runs the example machine under both state assignments (A1,
// the default, and A0), once from each initial state, with random inputs,
// and compares outputs and state codes every cycle with the transition
// table held here by state index. It also checks that the machine settles
// in q0 within two cycles from any state; every machine is reset every 8 cycles, as the table implies.
module tb_table1_fsm;
  localparam logic [1:0] A0 [4] = '{2'b00, 2'b11, 2'b01, 2'b10};
  localparam logic [1:0] A1 [4] = '{2'b00, 2'b10, 2'b01, 2'b11};
  localparam int unsigned T_NEXT [4] = '{0, 2, 0, 2};
  localparam bit          T_O0   [4] = '{0, 0, 1, 1};
  localparam bit          T_O1   [4] = '{0, 1, 0, 1};

  logic       clk = 0, rst_n = 0, in;
  logic       out [8];
  logic [1:0] st  [8];
  int         checks = 0, failures = 0;
  int         visits [4];

  // Instance 2*i uses A1, 2*i+1 uses A0; both start in q_i.
  for (genvar i = 0; i < 4; i++) begin : g_init
    table1_fsm #(.CODE(A1), .INIT_STATE(i)) u_a1 (.clk(clk), .rst_n(rst_n), .in(in),
                                                  .out(out[2*i]), .state(st[2*i]));
    table1_fsm #(.CODE(A0), .INIT_STATE(i)) u_a0 (.clk(clk), .rst_n(rst_n), .in(in),
                                                  .out(out[2*i+1]), .state(st[2*i+1]));
  end

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned k [8];
    logic exp;
    in = 0;
    for (int j = 0; j < 8; j++) k[j] = j / 2;
    #16 rst_n = 1;  // released after the edge at t=15
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      in = 1'($urandom);
      #1;
      for (int j = 0; j < 8; j++) begin
        exp = in ? T_O1[k[j]] : T_O0[k[j]];
        checks++;
        if (out[j] !== exp || st[j] !== ((j % 2 == 0) ? A1[k[j]] : A0[k[j]])) begin
          failures++;
          $display("FAIL cycle %0d inst %0d q%0d in=%b out=%b exp=%b state=%b", c, j, k[j],
                   in, out[j], exp, st[j]);
        end
        visits[k[j]]++;
      end
      if (c % 8 == 2) begin
        checks++;
        for (int j = 0; j < 8; j++)
          if (st[j] !== 2'b00) begin
            failures++;
            $display("FAIL inst %0d not in q0 after two cycles", j);
            break;
          end
      end
      @(posedge clk); #1;
      for (int j = 0; j < 8; j++) k[j] = T_NEXT[k[j]];
      if (c % 8 == 7) begin
        // restart every machine in its initial state
        rst_n = 0;
        #1 rst_n = 1;
        for (int j = 0; j < 8; j++) k[j] = j / 2;
      end
    end
    $display("state visits q0..q3: %0d %0d %0d %0d", visits[0], visits[1], visits[2], visits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
