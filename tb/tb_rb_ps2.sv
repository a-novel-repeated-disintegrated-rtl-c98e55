// tb_rb_ps2: self-checking testbench of rb_ps2.
//
// Runs rb_ps_check on rb_ps2 twice: at the default size (N=163, P=8, Q=21)
// and at a small size with N < P*Q and an odd P (N=13, P=3, Q=5), which
// exercises zero padding of A, and a third time at the default size with
// three PPGUs merged per stage (M=3, so P=8 leaves one AND input unused). Each product is compared with a reference
// cyclic convolution, its latency and the back-to-back rate are checked.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_rb_ps2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks0, failures0, b2b0, gap0, ign0;
  int   checks1, failures1, b2b1, gap1, ign1;
  int   checks2, failures2, b2b2, gap2, ign2;
  logic done0, done1, done2;
  int   checks, failures;

  always #5 clk = ~clk;

  rb_ps_check #(.STRUCT(2), .NOPS(30)) u_full (
    .clk, .rst_n, .checks(checks0), .failures(failures0), .n_back_to_back(b2b0),
    .n_gap(gap0), .n_ignored(ign0), .done(done0)
  );

  rb_ps_check #(.STRUCT(2), .N(13), .P(3), .Q(5), .NOPS(200)) u_small (
    .clk, .rst_n, .checks(checks1), .failures(failures1), .n_back_to_back(b2b1),
    .n_gap(gap1), .n_ignored(ign1), .done(done1)
  );

  rb_ps_check #(.STRUCT(2), .M(3), .NOPS(30)) u_m3 (
    .clk, .rst_n, .checks(checks2), .failures(failures2), .n_back_to_back(b2b2),
    .n_gap(gap2), .n_ignored(ign2), .done(done2)
  );

  task automatic finish();
    checks   = checks0 + checks1 + checks2 + 1;
    failures = failures0 + failures1 + failures2;
    if (b2b0 == 0 || gap0 == 0 || ign0 == 0 || b2b1 == 0 || gap1 == 0 || ign1 == 0 ||
        b2b2 == 0 || gap2 == 0 || ign2 == 0) begin
      failures++;
      $display("back-to-back, gap or ignored-offer case never happened");
    end
    $display("full: back_to_back=%0d gaps=%0d ignored=%0d; small: back_to_back=%0d gaps=%0d ignored=%0d",
             b2b0, gap0, ign0, b2b1, gap1, ign1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done0 && done1 && done2);
    finish();
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: testbench did not finish");
    checks   = checks0 + checks1 + checks2 + 1;
    failures = failures0 + failures1 + failures2 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
