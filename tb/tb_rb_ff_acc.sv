// tb_rb_ff_acc: self-checking testbench of the finite field accumulator.
//
// Sends frames of random length: a first partial sum, further sums, a last
// one, with idle cycles (valid low) and garbage data in between. A model
// XORs the valid sums of a frame; at the cycle after the last sum,
// out_valid must pulse with c equal to that XOR, and must stay low
// otherwise. Frames of one sum (first and last together) are included.
module tb_rb_ff_acc
  import rb_pkg::*;
  import rb_ref_pkg::*;
;
  localparam int unsigned N = 163;

  logic         clk = 1'b0, rst_n = 1'b0;
  step_tag_t    tag;
  logic [N-1:0] din, c, model;
  logic         out_valid, exp_valid;
  int           checks = 0, failures = 0, frames = 0;

  always #5 clk = ~clk;

  rb_ff_acc #(.N(N)) dut (.clk, .rst_n, .tag, .din, .out_valid, .c);

  task automatic send(bit v, bit f, bit l);
    tag = '{valid: v, first: f, last: l};
    din = rb_ref#(N)::rand_vec();
    if (v) model = f ? din : (model ^ din);
    exp_valid = v && l;
    @(negedge clk);
    checks++;
    if (out_valid !== exp_valid) begin failures++; $display("out_valid wrong"); end
    if (exp_valid) begin
      checks++;
      if (c !== model) begin failures++; $display("sum wrong in frame %0d", frames); end
      frames++;
    end
  endtask

  initial begin
    tag = '0; din = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) begin
      automatic int len = 1 + int'($urandom % 6);
      for (int i = 0; i < len; i++) begin
        if ($urandom % 4 == 0) send(1'b0, 1'($urandom), 1'($urandom));  // idle cycle
        send(1'b1, i == 0, i == len - 1);
      end
      if ($urandom % 2 == 0) send(1'b0, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
