// rb_bpm_check: drives and checks one rb_bpm instance.
//
// Loads random B operands at most every Q cycles, back to back or after
// random gaps, and generates step/busy as the controller would. For every
// cycle and PPGU p it finds the product that PPGU p works on - the one
// loaded at L with 0 <= t - L - 1 - d_p < Q, d_p = p / G - and checks that
// b_op[p] equals that B times x^(pQ + bit step). Cycles in which PPGU p
// reads the previous B (the lag after a back-to-back load) are counted.
module rb_bpm_check
  import rb_ref_pkg::*;
#(
  parameter int unsigned N = 13,
  parameter int unsigned P = 3,
  parameter int unsigned Q = 5,
  parameter int unsigned G = 1,
  parameter int unsigned CYCLES = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_prev_used,
  output logic done
);

  localparam int unsigned SW = $clog2(Q);

  logic          load, busy;
  logic [N-1:0]  b;
  logic [SW-1:0] step;
  logic [N-1:0]  b_op [P];

  rb_bpm #(.N(N), .P(P), .Q(Q), .G(G)) dut (.*);

  int           load_cyc [$];
  logic [N-1:0] load_b   [$];

  initial begin
    automatic int last = -1000;
    checks = 0; failures = 0; n_prev_used = 0; done = 1'b0;
    load = 1'b0; busy = 1'b0; step = '0; b = '0;
    for (int t = 0; t < int'(CYCLES); t++) begin
      int rel;
      @(negedge clk);
      rel  = t - last - 1;
      busy = (rel >= 0 && rel < int'(Q));
      step = busy ? SW'(rel) : '0;
      load = (!busy || rel == int'(Q) - 1) && ($urandom % 2 == 0);
      b    = rb_ref#(N)::rand_vec();
      #1;
      for (int p = 0; p < int'(P); p++) begin
        automatic int d = p / int'(G);
        for (int k = load_cyc.size() - 1; k >= 0; k--) begin
          automatic int q = t - load_cyc[k] - 1 - d;
          if (q >= 0 && q < int'(Q)) begin
            checks++;
            if (b_op[p] !== rb_ref#(N)::rot(load_b[k], p * Q + q)) begin
              failures++;
              $display("G=%0d t=%0d PPGU %0d bit %0d: wrong rotation", G, t, p, q);
            end
            if (k != load_cyc.size() - 1) n_prev_used++;
            break;
          end
        end
      end
      if (load) begin
        load_cyc.push_back(t);
        load_b.push_back(b);
        last = t;
      end
    end
    done = 1'b1;
  end

endmodule
