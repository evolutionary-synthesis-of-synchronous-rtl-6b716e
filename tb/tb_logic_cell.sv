// tb_logic_cell: exhaustive check of the configurable gate cell against
// truth tables written out per gate code (all 8 gates x 8 input patterns).
module tb_logic_cell;
  import evo_pkg::*;

  gate_e gate;
  logic  a, b, s, y;
  int    checks = 0, failures = 0;

  logic_cell dut (.gate(gate), .a(a), .b(b), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int g = 0; g < 8; g++)
      for (int v = 0; v < 8; v++) begin
        gate = gate_e'(g);
        {s, b, a} = 3'(v);
        #1;
        case (g)
          0: exp = !a;
          1: exp = a && b;
          2: exp = a || b;
          3: exp = a != b;
          4: exp = !(a && b);
          5: exp = !(a || b);
          6: exp = a == b;
          default: exp = (s == 1'b0) ? a : b;
        endcase
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL gate=%0d s=%b b=%b a=%b y=%b expected %b", g, s, b, a, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
