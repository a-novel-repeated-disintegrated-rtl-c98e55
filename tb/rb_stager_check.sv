// rb_stager_check: drives and checks one rb_a_stager instance.
//
// Loads random A operands at least Q cycles apart (back to back or after
// gaps). In cycle t, PPGU p must see bit a_{pQ+q} (zero where pQ+q >= N)
// of the operand loaded at L when q = t - L - 1 - d_p lies in 0..Q-1, with
// d_p = p / G, and zero when it works on no product.
module rb_stager_check
  import rb_ref_pkg::*;
#(
  parameter int unsigned N = 13,
  parameter int unsigned P = 3,
  parameter int unsigned Q = 5,
  parameter int unsigned G = 1,
  parameter int unsigned CYCLES = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_zero_lead,
  output logic done
);

  logic         load;
  logic [N-1:0] a;
  logic [P-1:0] a_bit;

  rb_a_stager #(.N(N), .P(P), .Q(Q), .G(G)) dut (.*);

  int           load_cyc [$];
  logic [N-1:0] load_a   [$];

  initial begin
    automatic int last = -1000;
    checks = 0; failures = 0; n_zero_lead = 0; done = 1'b0;
    load = 1'b0; a = '0;
    @(posedge rst_n);
    for (int t = 0; t < int'(CYCLES); t++) begin
      @(negedge clk);
      load = (t - last >= int'(Q)) && ($urandom % 2 == 0);
      a    = rb_ref#(N)::rand_vec();
      for (int p = 0; p < int'(P); p++) begin
        automatic int   d = p / int'(G);
        automatic logic e = 1'b0;
        automatic bit   in_op = 1'b0;
        for (int k = load_cyc.size() - 1; k >= 0; k--) begin
          automatic int q = t - load_cyc[k] - 1 - d;
          if (q >= 0 && q < int'(Q)) begin
            e = (p * Q + q < N) ? load_a[k][p * Q + q] : 1'b0;
            in_op = 1'b1;
            break;
          end
        end
        if (!in_op && d > 0 && load_cyc.size() > 0 && t - load_cyc[load_cyc.size()-1] - 1 >= 0
            && t - load_cyc[load_cyc.size()-1] - 1 < d) n_zero_lead++;
        checks++;
        if (a_bit[p] !== e) begin
          failures++;
          $display("G=%0d t=%0d PPGU %0d: bit %b expected %b", G, t, p, a_bit[p], e);
        end
      end
      if (load) begin
        load_cyc.push_back(t);
        load_a.push_back(a);
        last = t;
      end
    end
    done = 1'b1;
  end

endmodule
