// Self-checking testbench of example_f.
//
// Applies all 16 input sets and compares the outputs with the truth table of
// the example device. It also checks the first two rows of the table against
// the active transitions listed for them (t2,1 t3,2 t5,4 and t2,1 t5,4). Outputs
// are read one clock after each input change; a watchdog ends the run after
// 1000 cycles.
module tb_example_f;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [3:0] x;
  logic [4:0] f;

  example_f dut (.x(x), .f(f));

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      @(posedge clk);
      checks++;
      if (f != F_REF[v]) begin
        failures++;
        $display("FAIL: x=%b f=%b expected %b", x, f, F_REF[v]);
      end
      if (v == 0) begin
        checks++;
        if (weight_sum(32'(f), 5) != 1 + 2 + 8) failures++;
      end
      if (v == 1) begin
        checks++;
        if (weight_sum(32'(f), 5) != 1 + 8) failures++;
      end
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
