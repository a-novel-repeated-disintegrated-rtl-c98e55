// rb_ps3: digit-serial RB multiplier, proposed structure III (PS-III).
//
// Same computation, operand feed and accumulator as PS-I (see rb_ps1):
// C = A*B in GF(2)[x]/(x^N - 1) in Q cycles per product with P PPGUs.
// The difference is the PPGU (rb_ppgu3): a register between its AND cell
// and its XOR cell, so in every cycle each PPGU multiplies one bit step
// while it adds the previous one. The critical path shrinks to a single
// AND or XOR gate at the cost of N more flip-flops per PPGU and one more
// cycle of latency; throughput is unchanged. The cell counts and purpose
// are the document's; register placement, controller, handshake and the
// double-buffered BPM are this design's.
//
// Interface as rb_ps1. Latency: out_valid rises Q + P + 2 cycles after the
// accepting cycle; one product every Q cycles.
module rb_ps3
  import rb_pkg::*;
#(
  parameter int unsigned N = 163,
  parameter int unsigned P = 8,
  parameter int unsigned Q = 21
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] c
);

  localparam int unsigned SW = (Q > 1) ? $clog2(Q) : 1;

  logic          load, busy;
  logic [SW-1:0] step;
  step_tag_t     acc_tag;
  logic [P-1:0]  a_bit;
  logic [N-1:0]  b_op [P];
  logic [N-1:0]  r    [P];

  rb_ctrl #(.Q(Q), .DEPTH(P + 1)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .step, .busy, .acc_tag
  );

  rb_bpm #(.N(N), .P(P), .Q(Q), .G(1)) u_bpm (
    .clk, .load, .b, .step, .busy, .b_op
  );

  rb_a_stager #(.N(N), .P(P), .Q(Q), .G(1)) u_stager (
    .clk, .rst_n, .load, .a, .a_bit
  );

  for (genvar p = 0; p < P; p++) begin : g_ppgu
    rb_ppgu3 #(.N(N), .FIRST(p == 0)) u_ppgu (
      .clk, .rst_n,
      .a_bit (a_bit[p]),
      .b_op  (b_op[p]),
      .r_in  (r[(p == 0) ? 0 : p - 1]),
      .r_out (r[p])
    );
  end

  rb_ff_acc #(.N(N)) u_acc (
    .clk, .rst_n, .tag(acc_tag), .din(r[P-1]), .out_valid, .c
  );

  initial begin
    assert (N <= P * Q) else $error("rb_ps3: N must not exceed P*Q");
  end

endmodule
