// tb_rb_bpm: self-checking testbench of the bit-permutation module.
//
// Two instances through rb_bpm_check: one PPGU per stage (G=1, as in PS-I
// and PS-III) and two per stage (G=2, as in PS-II, with P=4), both at a
// small N=13, Q=5, plus one at the default size. The previous-B path must
// be used at least once in each.
module tb_rb_bpm;

  logic clk = 1'b0;
  int   c0, f0, u0, c1, f1, u1, c2, f2, u2;
  logic d0, d1, d2;
  int   checks, failures;

  always #5 clk = ~clk;

  rb_bpm_check #(.N(13), .P(3), .Q(5), .G(1)) u_g1 (.clk, .checks(c0), .failures(f0), .n_prev_used(u0), .done(d0));
  rb_bpm_check #(.N(13), .P(4), .Q(5), .G(2)) u_g2 (.clk, .checks(c1), .failures(f1), .n_prev_used(u1), .done(d1));
  rb_bpm_check #(.N(163), .P(8), .Q(21), .G(1), .CYCLES(600)) u_full (.clk, .checks(c2), .failures(f2), .n_prev_used(u2), .done(d2));

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (u0 == 0 || u1 == 0 || u2 == 0) begin
      failures++;
      $display("previous-B path never used");
    end
    $display("previous-B reads: %0d %0d %0d", u0, u1, u2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

endmodule
