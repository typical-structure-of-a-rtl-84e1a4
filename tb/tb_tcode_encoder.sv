// Self-checking testbench of tcode_encoder.
//
// Checks every data vector for M = 5 (the example's size) and M = 8. The
// reference is worked out in two independent ways: the sum W of the weights
// 2^(i-1) of the active transitions, computed with integer arithmetic, and the
// observation that W equals the reflected Gray code of f without its top bit.
// It then checks the code's detection property over all pairs of vectors: two
// different vectors share a check vector only if one is the bitwise inverse of
// the other. The encoder is combinational: each vector is applied and the
// outputs are read one clock later. A watchdog ends the run after 200000 cycles.
module tb_tcode_encoder;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [4:0] f5;
  logic [3:0] h5;
  logic [7:0] f8;
  logic [6:0] h8;

  tcode_encoder #(.M(5)) dut5 (.f(f5), .h(h5));
  tcode_encoder #(.M(8)) dut8 (.f(f8), .h(h8));

  function automatic int unsigned weight_sum(input logic [7:0] v, input int m);
    int unsigned w = 0;
    for (int i = 0; i < m - 1; i++) begin
      if (v[i] != v[i+1]) w += (1 << i);
    end
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [3:0] tab5 [32];
  logic [6:0] tab8 [256];

  initial begin
    for (int v = 0; v < 32; v++) begin
      f5 = 5'(v);
      @(posedge clk);
      tab5[v] = h5;
      check(int'(h5) == int'(weight_sum(8'(v), 5)), $sformatf("M=5 f=%b h=%b", f5, h5));
      check(h5 == 4'((v ^ (v >> 1)) & 15), $sformatf("M=5 gray f=%b h=%b", f5, h5));
    end
    for (int v = 0; v < 256; v++) begin
      f8 = 8'(v);
      @(posedge clk);
      tab8[v] = h8;
      check(int'(h8) == int'(weight_sum(8'(v), 8)), $sformatf("M=8 f=%b h=%b", f8, h8));
    end
    // Undetected errors are exactly the full inversions.
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        if (a != b)
          check((tab5[a] == tab5[b]) == (b == (a ^ 31)), $sformatf("M=5 pair %0d %0d", a, b));
    for (int a = 0; a < 256; a++)
      for (int b = a + 1; b < 256; b++)
        check((tab8[a] == tab8[b]) == (b == (a ^ 255)), $sformatf("M=8 pair %0d %0d", a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
