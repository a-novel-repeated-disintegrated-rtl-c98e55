// tb_rb_ppgu3: self-checking testbench of the PS-III PPGU.
//
// New random inputs every cycle. The AND result of cycle t must be added
// to the r_in of cycle t+1 and appear on r_out in cycle t+2 (two register
// cells). Checked for a chain unit (FIRST=0) and a first unit (FIRST=1).
module tb_rb_ppgu3
  import rb_ref_pkg::*;
;
  localparam int unsigned N = 163;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         a_bit;
  logic [N-1:0] b_op, r_in, r_mid, r_first;
  logic [N-1:0] pp_prev, exp_mid, exp_first;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  rb_ppgu3 #(.N(N), .FIRST(1'b0)) dut_mid (.clk, .rst_n, .a_bit, .b_op, .r_in, .r_out(r_mid));
  rb_ppgu3 #(.N(N), .FIRST(1'b1)) dut_first (.clk, .rst_n, .a_bit, .b_op, .r_in, .r_out(r_first));

  initial begin
    a_bit = 1'b0; b_op = '0; r_in = '0;
    pp_prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      // inputs of cycle i
      a_bit = 1'($urandom);
      b_op  = rb_ref#(N)::rand_vec();
      r_in  = rb_ref#(N)::rand_vec();
      // r_out after this edge: pp of the previous cycle plus this cycle's r_in
      exp_first = pp_prev;
      exp_mid   = pp_prev ^ r_in;
      pp_prev   = a_bit ? b_op : '0;
      @(negedge clk);
      checks += 2;
      if (r_mid !== exp_mid)     begin failures++; $display("mid unit wrong at %0d", i); end
      if (r_first !== exp_first) begin failures++; $display("first unit wrong at %0d", i); end
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
