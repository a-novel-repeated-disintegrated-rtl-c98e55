// tb_rb_a_stager: self-checking testbench of the staggered A feed.
//
// Instances with one PPGU per stage (G=1) and two per stage (G=2), at a
// small size with zero padding (N=13, P=3 or 4, Q=5) and at the default
// size. Each checks every bit of every PPGU in every cycle (rb_stager_check)
// and counts the leading zeros of a staggered PPGU, which must occur.
module tb_rb_a_stager;

  logic clk = 1'b0, rst_n = 1'b0;
  int   c0, f0, z0, c1, f1, z1, c2, f2, z2;
  logic d0, d1, d2;
  int   checks, failures;

  always #5 clk = ~clk;

  rb_stager_check #(.N(13), .P(3), .Q(5), .G(1)) u_g1 (.clk, .rst_n, .checks(c0), .failures(f0), .n_zero_lead(z0), .done(d0));
  rb_stager_check #(.N(13), .P(4), .Q(5), .G(2)) u_g2 (.clk, .rst_n, .checks(c1), .failures(f1), .n_zero_lead(z1), .done(d1));
  rb_stager_check #(.N(163), .P(8), .Q(21), .G(1), .CYCLES(600)) u_full (.clk, .rst_n, .checks(c2), .failures(f2), .n_zero_lead(z2), .done(d2));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (z0 == 0 || z1 == 0 || z2 == 0) begin
      failures++;
      $display("staggered leading zeros never seen");
    end
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
