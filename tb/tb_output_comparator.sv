// Self-checking testbench of output_comparator.
//
// Applies every pair of 5-bit copy outputs (1024 cases) and expects e[i] = 1
// exactly where the two copies differ, checked bit by bit. Outputs are read
// one clock after each input change; a watchdog ends the run after 5000 cycles.
module tb_output_comparator;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [4:0] f1, f2, e;

  output_comparator #(.M(5)) dut (.f1(f1), .f2(f2), .e(e));

  initial begin
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        f1 = 5'(a);
        f2 = 5'(b);
        @(posedge clk);
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (e[i] != (f1[i] != f2[i])) begin
            failures++;
            if (failures < 10) $display("FAIL: f1=%b f2=%b e=%b", f1, f2, e);
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
