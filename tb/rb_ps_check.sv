// rb_ps_check: drives and checks one digit-serial RB multiplier.
//
// Instantiates structure STRUCT (1 = rb_ps1, 2 = rb_ps2, 3 = rb_ps3) with
// the given N, P and Q, offers NOPS operand pairs and compares every product
// with the cyclic-convolution reference of rb_ref_pkg. Checks per product:
// the value, the latency from the accepting cycle to out_valid (LAT), and,
// for pairs offered back to back, that they are accepted exactly Q cycles
// apart (one product every Q cycles). Operand pairs are offered either
// right away (back to back, overlapping the tail of the previous product
// in the staggered PPGUs) or after an idle gap; while in_ready is low the
// offered operands change every cycle, which the multiplier must ignore.
// The first products use edge-case operands (B = 1, A = all ones, A = 0,
// A = x^(N-1)). Counts of these events are reported on the outputs.
module rb_ps_check
  import rb_ref_pkg::*;
#(
  parameter int unsigned STRUCT = 1,
  parameter int unsigned N      = 163,
  parameter int unsigned P      = 8,
  parameter int unsigned Q      = 21,
  parameter int unsigned NOPS   = 40,
  parameter int unsigned M      = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_back_to_back,
  output int   n_gap,
  output int   n_ignored,
  output logic done
);

  localparam int unsigned LAT = (STRUCT == 1) ? Q + P + 1 :
                                (STRUCT == 2) ? Q + (P + M - 1) / M + 1 : Q + P + 2;

  logic         in_valid, in_ready, out_valid;
  logic [N-1:0] a, b, c;

  if (STRUCT == 1) begin : g_dut
    rb_ps1 #(.N(N), .P(P), .Q(Q)) dut (.*);
  end else if (STRUCT == 2) begin : g_dut
    rb_ps2 #(.N(N), .P(P), .Q(Q), .M(M)) dut (.*);
  end else begin : g_dut
    rb_ps3 #(.N(N), .P(P), .Q(Q)) dut (.*);
  end

  logic [N-1:0] exp_q [$];
  longint       acc_cyc_q [$];
  longint       cyc = 0;
  int           received = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      exp_q.push_back(rb_ref#(N)::mul(a, b));
      acc_cyc_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      received <= received + 1;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("S%0d: out_valid with no product pending", STRUCT);
      end else begin
        logic [N-1:0] e;
        longint       t;
        e = exp_q.pop_front();
        t = acc_cyc_q.pop_front();
        if (c !== e) begin
          failures++;
          $display("S%0d N=%0d: product %0d wrong: got %h exp %h", STRUCT, N, received, c, e);
        end
        if (cyc - t != longint'(LAT)) begin
          failures++;
          $display("S%0d: latency %0d, expected %0d", STRUCT, cyc - t, LAT);
        end
      end
    end
  end

  function automatic void pick(int unsigned op, output logic [N-1:0] va, output logic [N-1:0] vb);
    va = rb_ref#(N)::rand_vec();
    vb = rb_ref#(N)::rand_vec();
    case (op)
      0: vb = N'(1);
      1: va = '1;
      2: va = '0;
      3: va = {1'b1, {(N-1){1'b0}}};
      default: ;
    endcase
  endfunction

  initial begin
    automatic longint last_acc = -1;
    int     gap;
    bit     accepted;
    checks = 0; failures = 0; n_back_to_back = 0; n_gap = 0; n_ignored = 0;
    done = 1'b0;
    in_valid = 1'b0; a = '0; b = '0;
    @(posedge rst_n);
    for (int unsigned op = 0; op < NOPS; op++) begin
      gap = ($urandom % 3 == 0) ? 1 + int'($urandom % 6) : 0;
      if (op == 0) gap = 2;
      for (int i = 0; i < gap; i++) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      accepted = 1'b0;
      while (!accepted) begin
        @(negedge clk);
        in_valid = 1'b1;
        pick(op, a, b);
        #1;
        accepted = in_ready;
        if (!accepted) n_ignored++;
        @(posedge clk);
      end
      if (gap == 0 && last_acc >= 0) begin
        n_back_to_back++;
        checks++;
        if (cyc - 1 - last_acc != longint'(Q)) begin
          failures++;
          $display("S%0d: back-to-back pairs accepted %0d cycles apart, expected %0d",
                   STRUCT, cyc - 1 - last_acc, Q);
        end
      end else if (gap != 0) begin
        n_gap++;
      end
      last_acc = cyc - 1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (received != int'(NOPS) || exp_q.size() != 0) begin
      failures++;
      $display("S%0d: %0d of %0d products received", STRUCT, received, NOPS);
    end
    done = 1'b1;
  end

endmodule
