// tb_rb_ppgu2: self-checking testbench of the PS-II merged PPGU.
//
// Drives two random A bits, two rotated-B words and an incoming sum into a
// chain unit (FIRST=0) and a first unit (FIRST=1) and checks the registered
// sums (a0 & b0) ^ (a1 & b1) ^ r_in and (a0 & b0) ^ (a1 & b1).
module tb_rb_ppgu2
  import rb_ref_pkg::*;
;
  localparam int unsigned N = 163;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [1:0]   a_bit;
  logic [N-1:0] b_op [2];
  logic [N-1:0] r_in, r_mid, r_first, exp_mid, exp_first;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  rb_ppgu2 #(.N(N), .FIRST(1'b0)) dut_mid (.clk, .rst_n, .a_bit, .b_op, .r_in, .r_out(r_mid));
  rb_ppgu2 #(.N(N), .FIRST(1'b1)) dut_first (.clk, .rst_n, .a_bit, .b_op, .r_in, .r_out(r_first));

  initial begin
    a_bit = '0; b_op[0] = '0; b_op[1] = '0; r_in = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (r_mid != '0 || r_first != '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a_bit   = (i < 4) ? 2'(i) : 2'($urandom);
      b_op[0] = rb_ref#(N)::rand_vec();
      b_op[1] = rb_ref#(N)::rand_vec();
      r_in    = rb_ref#(N)::rand_vec();
      exp_first = '0;
      if (a_bit[0]) exp_first ^= b_op[0];
      if (a_bit[1]) exp_first ^= b_op[1];
      exp_mid = exp_first ^ r_in;
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
