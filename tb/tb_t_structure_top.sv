// End-to-end testbench of t_structure_top, at its only (default) size.
//
// For every one of the 16 input sets it applies the fault-free case and every
// non-zero error mask on each block in turn: 31 masks on copy F1, 31 on copy
// F2 and 15 on the check-bit predictor H(x), 1248 cases in all. The expected
// output is the truth table value of F(x) in every case but one: the mask
// that inverts all five outputs of F2 leaves the check vector unchanged, so
// it goes undetected and its inverted value must appear at f. For each case
// it also checks the disagreement flags e and the check error u.
// It counts how often each mechanism occurred (fault-free run, error of F1
// corrected, error of F2 detected and masked, error of H masked, undetectable
// full inversion) and counts a failure for any that never occurred. Each case
// is read one clock after it is applied; a watchdog ends the run after
// 5000 cycles.
module tb_t_structure_top;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [3:0] x;
  logic [4:0] fault_f1, fault_f2;
  logic [3:0] fault_h;
  logic [4:0] f, e;
  logic       u;

  t_structure_top dut (
    .x(x), .fault_f1(fault_f1), .fault_f2(fault_f2), .fault_h(fault_h),
    .f(f), .e(e), .u(u)
  );

  int n_clean = 0, n_f1_corrected = 0, n_f2_masked = 0, n_h_masked = 0, n_undetected = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input int v, input logic [4:0] m1, input logic [4:0] m2,
                       input logic [3:0] mh);
    logic [4:0] g;
    g = F_REF[v];
    x = 4'(v);
    fault_f1 = m1;
    fault_f2 = m2;
    fault_h  = mh;
    @(posedge clk);
    check(e == (m1 ^ m2), $sformatf("x=%b e=%b", x, e));
    if (m2 == 5'b11111) begin
      check(f == ~g && !u, $sformatf("x=%b full inversion of F2: f=%b u=%b", x, f, u));
      n_undetected++;
    end else begin
      check(f == g, $sformatf("x=%b m1=%b m2=%b mh=%b: f=%b expected %b", x, m1, m2, mh, f, g));
      if (m1 == 0 && m2 == 0 && mh == 0) begin
        check(!u, "no fault, no check error");
        n_clean++;
      end else if (m1 != 0) begin
        check(!u, "F1 error is not a check error");
        if (f == g && e != 0) n_f1_corrected++;
      end else if (m2 != 0) begin
        check(u, $sformatf("x=%b F2 error %b detected", x, m2));
        if (u && f == g) n_f2_masked++;
      end else begin
        check(u, "H error detected");
        if (u && f == g) n_h_masked++;
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      apply(v, '0, '0, '0);
      for (int m = 1; m < 32; m++) apply(v, 5'(m), '0, '0);
      for (int m = 1; m < 32; m++) apply(v, '0, 5'(m), '0);
      for (int m = 1; m < 16; m++) apply(v, '0, '0, 4'(m));
    end
    $display("fault-free %0d, F1 corrected %0d, F2 masked %0d, H masked %0d, undetected %0d",
             n_clean, n_f1_corrected, n_f2_masked, n_h_masked, n_undetected);
    check(n_clean > 0, "fault-free operation occurred");
    check(n_f1_corrected > 0, "correction of F1 occurred");
    check(n_f2_masked > 0, "detection and masking of F2 occurred");
    check(n_h_masked > 0, "masking of an H error occurred");
    check(n_undetected > 0, "undetectable full inversion occurred");
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
