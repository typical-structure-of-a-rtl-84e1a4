// Self-checking testbench of example_h.
//
// For all 16 input sets the predicted check vector must equal the
// weighted-transitions sum of the reference device output F(x), computed here
// from the truth table with integer arithmetic. A few table values are also
// checked literally (W = 11 for x = 0000, 0 for 1101, 14 for 1001 and 1011).
// Outputs are read one clock after each input change; a watchdog ends the
// run after 1000 cycles.
module tb_example_h;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [3:0] x;
  logic [3:0] h;

  example_h dut (.x(x), .h(h));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      @(posedge clk);
      check(int'(h) == int'(weight_sum(32'(F_REF[v]), 5)),
            $sformatf("x=%b h=%b expected W=%0d", x, h, weight_sum(32'(F_REF[v]), 5)));
      case (v)
        0:  check(h == 4'd11, "x=0000");
        9:  check(h == 4'd14, "x=1001");
        11: check(h == 4'd14, "x=1011");
        13: check(h == 4'd0,  "x=1101");
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
