// Self-checking testbench of tcode_checker.
//
// Applies every pair of a 5-bit data vector and a 4-bit predicted check
// vector (512 cases) and expects u = 1 exactly when the predicted value is not
// the weighted-transitions sum W of the data vector, computed here with
// integer arithmetic. It also applies every error mask to a correct vector
// with its correct prediction and expects the error to be seen unless the mask
// inverts all bits. Outputs are read one clock after each input change; a
// watchdog ends the run after 10000 cycles.
module tb_tcode_checker;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [4:0] f;
  logic [3:0] h;
  logic       u;

  tcode_checker #(.M(5)) dut (.f(f), .h(h), .u(u));

  function automatic int unsigned weight_sum(input logic [4:0] v);
    int unsigned w = 0;
    for (int i = 0; i < 4; i++) if (v[i] != v[i+1]) w += (1 << i);
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int detected = 0;

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int p = 0; p < 16; p++) begin
        f = 5'(v);
        h = 4'(p);
        @(posedge clk);
        check(u == (weight_sum(f) != p), $sformatf("f=%b h=%b u=%b", f, h, u));
      end
    end
    for (int v = 0; v < 32; v++) begin
      for (int mask = 1; mask < 32; mask++) begin
        f = 5'(v ^ mask);
        h = 4'(weight_sum(5'(v)));
        @(posedge clk);
        check(u == (mask != 31), $sformatf("error mask %b on %b: u=%b", mask, v, u));
        if (u) detected++;
      end
    end
    check(detected == 32 * 30, $sformatf("detected %0d of %0d errors", detected, 32 * 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
