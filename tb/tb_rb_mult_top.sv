// tb_rb_mult_top: end-to-end testbench of rb_mult_top at its default size
// (N=163, P=8, Q=21; no parameter overrides).
//
// Offers operand pairs back to back, after idle gaps, and with changing
// operands while in_ready is low. Every product of each of the three
// structures (PS-I, PS-II, PS-III) is compared with a reference cyclic
// convolution, and its latency with Q+P+1, Q+P/2+1 and Q+P+2 cycles.
// Back-to-back pairs must be accepted exactly Q cycles apart. Counted
// mechanisms, each of which must occur: back-to-back acceptance (lagging
// PPGUs read the previous B), idle gaps, ignored offers, and operands with
// bits set in A's last digit, which is only partly filled (N < P*Q) and
// padded with zeros.
module tb_rb_mult_top
  import rb_ref_pkg::*;
;
  localparam int unsigned N = 163, P = 8, Q = 21;
  localparam int unsigned NOPS = 60;
  localparam int unsigned LAT [3] = '{Q + P + 1, Q + (P + 1) / 2 + 1, Q + P + 2};

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready;
  logic [N-1:0] a, b;
  logic         ps1_out_valid, ps2_out_valid, ps3_out_valid;
  logic [N-1:0] ps1_c, ps2_c, ps3_c;

  int checks = 0, failures = 0;
  int n_b2b = 0, n_gap = 0, n_ignored = 0, n_top_digit = 0;
  int received [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  rb_mult_top dut (.*);

  logic [N-1:0] exp_q [3][$];
  longint       cyc_q [3][$];
  longint       cyc = 0;

  task automatic check_out(int s, logic v, logic [N-1:0] c);
    if (!v) return;
    received[s]++;
    checks += 2;
    if (exp_q[s].size() == 0) begin
      failures += 2;
      $display("PS-%0d: unexpected output", s + 1);
    end else begin
      logic [N-1:0] e = exp_q[s].pop_front();
      longint       t = cyc_q[s].pop_front();
      if (c !== e) begin failures++; $display("PS-%0d: product %0d wrong", s + 1, received[s]); end
      if (cyc - t != longint'(LAT[s])) begin
        failures++;
        $display("PS-%0d: latency %0d expected %0d", s + 1, cyc - t, LAT[s]);
      end
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      for (int s = 0; s < 3; s++) begin
        exp_q[s].push_back(rb_ref#(N)::mul(a, b));
        cyc_q[s].push_back(cyc);
      end
      if (a[N-1:(P-1)*Q] != '0) n_top_digit++;
    end
    if (rst_n) begin
      check_out(0, ps1_out_valid, ps1_c);
      check_out(1, ps2_out_valid, ps2_c);
      check_out(2, ps3_out_valid, ps3_c);
    end
  end

  initial begin
    automatic longint last_acc = -1;
    automatic int     gap;
    automatic bit     accepted;
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < int'(NOPS); op++) begin
      gap = (op == 0) ? 2 : ($urandom % 3 == 0) ? 1 + int'($urandom % 5) : 0;
      for (int i = 0; i < gap; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      accepted = 1'b0;
      while (!accepted) begin
        @(negedge clk);
        in_valid = 1'b1;
        a = rb_ref#(N)::rand_vec();
        b = (op == 0) ? N'(1) : rb_ref#(N)::rand_vec();
        #1;
        accepted = in_ready;
        if (!accepted) n_ignored++;
        @(posedge clk);
      end
      if (gap == 0) begin
        n_b2b++;
        checks++;
        if (cyc - 1 - last_acc != longint'(Q)) begin
          failures++;
          $display("back-to-back pairs %0d cycles apart", cyc - 1 - last_acc);
        end
      end else begin
        n_gap++;
      end
      last_acc = cyc - 1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (Q + P + 4) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (received[s] != int'(NOPS)) begin
        failures++;
        $display("PS-%0d: %0d of %0d products", s + 1, received[s], NOPS);
      end
    end
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_ignored == 0 || n_top_digit == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("back_to_back=%0d idle_gaps=%0d ignored_offers=%0d top_digit_used=%0d",
             n_b2b, n_gap, n_ignored, n_top_digit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
