// tb_rb_ctrl: self-checking testbench of the multiplier controller.
//
// in_valid is random. An event model keeps the cycle of every accepted
// operand pair: a product is at PPGU 0 in the Q cycles after its load, at
// step t - L - 1. From that the testbench derives the expected in_ready,
// load, busy and step, and the marker that must reach the accumulator
// DEPTH cycles after each step. Accepting back to back in the last step is
// counted and must happen.
module tb_rb_ctrl
  import rb_pkg::*;
;
  localparam int unsigned Q     = 5;
  localparam int unsigned DEPTH = 3;
  localparam int unsigned SW    = $clog2(Q);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid, in_ready, load, busy;
  logic [SW-1:0] step;
  step_tag_t     acc_tag;
  int            checks = 0, failures = 0, overlaps = 0;

  always #5 clk = ~clk;

  rb_ctrl #(.Q(Q), .DEPTH(DEPTH)) dut (.*);

  // cycle of the most recent load, and the marker history
  int        last_load = -1000;
  step_tag_t hist [int];

  initial begin
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int        rel;
      bit        exp_busy, exp_ready;
      step_tag_t cur, exp_tag;
      @(negedge clk);
      in_valid  = ($urandom % 3 != 0);
      rel       = t - last_load - 1;
      exp_busy  = (rel >= 0 && rel < int'(Q));
      exp_ready = !exp_busy || rel == int'(Q) - 1;
      cur       = '{valid: exp_busy, first: exp_busy && rel == 0, last: exp_busy && rel == int'(Q) - 1};
      hist[t]   = cur;
      exp_tag   = hist.exists(t - int'(DEPTH)) ? hist[t - int'(DEPTH)] : '0;
      #1;
      checks += 4;
      if (busy !== exp_busy)                     begin failures++; $display("%0d: busy", t); end
      if (in_ready !== exp_ready)                begin failures++; $display("%0d: in_ready", t); end
      if (load !== (in_valid && exp_ready))      begin failures++; $display("%0d: load", t); end
      if (acc_tag !== exp_tag)                   begin failures++; $display("%0d: acc_tag", t); end
      if (exp_busy) begin
        checks++;
        if (int'(step) != rel) begin failures++; $display("%0d: step %0d exp %0d", t, step, rel); end
      end
      if (in_valid && exp_ready) begin
        if (exp_busy) overlaps++;
        last_load = t;
      end
    end
    checks++;
    if (overlaps == 0) failures++;
    $display("back-to-back accepts: %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
