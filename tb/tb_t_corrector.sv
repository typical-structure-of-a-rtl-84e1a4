// Self-checking testbench of t_corrector, at M = 5 and M = 8.
//
// Part 1 drives random, unrelated copy outputs and check bits and compares
// f, e and u with a behavioural model: u is set when the predicted check
// vector differs from the weighted-transitions sum of copy 2 (integer
// arithmetic), and f is copy 2's value when u = 0, copy 1's when u = 1.
// Part 2 takes a random fault-free value g with its correct check bits, puts a
// random non-zero error on exactly one of copy 1, copy 2 and the check bits,
// and requires f = g, except for an error that inverts every bit of copy 2,
// which the code cannot see and which must then reach f as ~g.
// Each case is read one clock after it is applied; a watchdog ends the run
// after 100000 cycles.
module tb_t_corrector;
  import tb_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [4:0] a1, a2, af, ae;
  logic [3:0] ah;
  logic       au;
  logic [7:0] b1, b2, bf, be;
  logic [6:0] bh;
  logic       bu;

  t_corrector #(.M(5)) dut5 (.f1(a1), .f2(a2), .h(ah), .f(af), .e(ae), .u(au));
  t_corrector #(.M(8)) dut8 (.f1(b1), .f2(b2), .h(bh), .f(bf), .e(be), .u(bu));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int corrected_f1 = 0, masked_f2 = 0, masked_h = 0, full_inversion = 0;

  initial begin
    // Part 1: model comparison on arbitrary inputs.
    for (int n = 0; n < 3000; n++) begin
      a1 = 5'($urandom); a2 = 5'($urandom); ah = 4'($urandom);
      b1 = 8'($urandom); b2 = 8'($urandom); bh = 7'($urandom);
      if (n % 3 == 0) begin  // make matching predictions common
        ah = 4'(weight_sum(32'(a2), 5));
        bh = 7'(weight_sum(32'(b2), 8));
      end
      @(posedge clk);
      check(au == (int'(ah) != int'(weight_sum(32'(a2), 5))), "M=5 u");
      check(ae == (a1 ^ a2), "M=5 e");
      check(af == (au ? a1 : a2), $sformatf("M=5 f=%b f1=%b f2=%b u=%b", af, a1, a2, au));
      check(bu == (int'(bh) != int'(weight_sum(32'(b2), 8))), "M=8 u");
      check(be == (b1 ^ b2), "M=8 e");
      check(bf == (bu ? b1 : b2), "M=8 f");
    end
    // Part 2: single faulty block is masked.
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] g8, m8;
      logic [4:0] g5, m5;
      int which;
      g5 = 5'($urandom); g8 = 8'($urandom);
      which = n % 3;
      do m5 = 5'($urandom); while (m5 == 0);
      do m8 = 8'($urandom); while (m8 == 0);
      if (n % 31 == 0) begin  // force the full inversion now and then
        m5 = '1; m8 = '1;
      end
      a1 = g5; a2 = g5; ah = 4'(weight_sum(32'(g5), 5));
      b1 = g8; b2 = g8; bh = 7'(weight_sum(32'(g8), 8));
      case (which)
        0: begin a1 ^= m5; b1 ^= m8; end
        1: begin a2 ^= m5; b2 ^= m8; end
        default: begin ah ^= m5[3:0]; bh ^= m8[6:0]; if (ah == 4'(weight_sum(32'(g5), 5))) ah ^= 4'd1;
                                                     if (bh == 7'(weight_sum(32'(g8), 8))) bh ^= 7'd1; end
      endcase
      @(posedge clk);
      if (which == 1 && m5 == '1)
        check(af == ~g5 && au == 1'b0, "M=5 full inversion of copy 2 goes unseen");
      else
        check(af == g5, $sformatf("M=5 block %0d mask %b: f=%b g=%b", which, m5, af, g5));
      if (which == 1 && m8 == '1) begin
        check(bf == ~g8 && bu == 1'b0, "M=8 full inversion of copy 2 goes unseen");
        full_inversion++;
      end else begin
        check(bf == g8, $sformatf("M=8 block %0d mask %b: f=%b g=%b", which, m8, bf, g8));
        case (which)
          0: begin check(!bu && be != 0, "F1 error corrected"); corrected_f1++; end
          1: begin check(bu, "F2 error detected"); masked_f2++; end
          default: begin check(bu && be == 0, "H error detected"); masked_h++; end
        endcase
      end
    end
    check(corrected_f1 > 0 && masked_f2 > 0 && masked_h > 0 && full_inversion > 0,
          "every fault class exercised");
    $display("F1 corrected %0d, F2 masked %0d, H masked %0d, full inversions %0d",
             corrected_f1, masked_f2, masked_h, full_inversion);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
