// rb_ps1: digit-serial RB multiplier, proposed structure I (PS-I).
//
// Computes C = A*B in GF(2)[x]/(x^N - 1) (redundant-basis multiplication)
// in Q cycles per product with P partial product generation units (PPGUs).
// With the coefficient index split as i = p*Q + q,
//   C = XOR_q XOR_p a_{pQ+q} * (B * x^(pQ+q)).
// The bit-permutation module (rb_bpm) supplies every PPGU with the rotated
// B it needs; rb_a_stager feeds PPGU p bit q of A's digit p, p cycles late.
// The PPGUs form a systolic chain, each adding its partial product to the
// registered sum of the previous one, so the sum over p of bit step q
// leaves PPGU P-1 at cycle q + P. The finite field accumulator XORs the Q
// sums into C. This three-module organisation (BPM, PPGM, accumulator) and
// the staggered systolic chain are the document's; the controller, the
// handshake and the double-buffered BPM are this design's.
//
// Interface: in_valid/in_ready take a and b together; in_ready is high when
// idle and in the last bit step of the product in progress, so products
// can follow every Q cycles. out_valid pulses once per product with c.
// Latency: out_valid rises Q + P + 1 cycles after the accepting cycle.
module rb_ps1
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

  rb_ctrl #(.Q(Q), .DEPTH(P)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .step, .busy, .acc_tag
  );

  rb_bpm #(.N(N), .P(P), .Q(Q), .G(1)) u_bpm (
    .clk, .load, .b, .step, .busy, .b_op
  );

  rb_a_stager #(.N(N), .P(P), .Q(Q), .G(1)) u_stager (
    .clk, .rst_n, .load, .a, .a_bit
  );

  // Partial product generation module (PPGM): a chain of P PPGUs.
  for (genvar p = 0; p < P; p++) begin : g_ppgu
    rb_ppgu1 #(.N(N), .FIRST(p == 0)) u_ppgu (
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
    assert (N <= P * Q) else $error("rb_ps1: N must not exceed P*Q");
  end

endmodule
