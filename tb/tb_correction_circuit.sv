// Self-checking testbench of correction_circuit.
//
// Applies every combination of the unchecked copy's outputs, the disagreement
// flags and the check error (2048 cases). With u = 0 the output must be the
// other copy's value, f1 with the flagged bits inverted; with u = 1 it must be
// f1 unchanged. Outputs are read one clock after each input change; a watchdog
// ends the run after 5000 cycles.
module tb_correction_circuit;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [4:0] f1, e, f;
  logic       u;
  logic [4:0] expected;

  correction_circuit #(.M(5)) dut (.f1(f1), .e(e), .u(u), .f(f));

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        for (int c = 0; c < 2; c++) begin
          f1 = 5'(a);
          e  = 5'(b);
          u  = c[0];
          @(posedge clk);
          for (int i = 0; i < 5; i++) expected[i] = u ? f1[i] : (e[i] ? !f1[i] : f1[i]);
          checks++;
          if (f != expected) begin
            failures++;
            if (failures < 10) $display("FAIL: f1=%b e=%b u=%b f=%b expected %b", f1, e, u, f, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
