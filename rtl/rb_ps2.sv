// rb_ps2: digit-serial RB multiplier, proposed structure II (PS-II).
//
// Same computation as PS-I (see rb_ps1): C = A*B in GF(2)[x]/(x^N - 1) in
// Q cycles per product with P partial products per cycle. Here every M
// neighbouring PPGUs (M = 2 by default) are merged into one pipeline stage
// (rb_ppgu2: M AND cells, M XOR cells, one register), so the chain has
// S = ceil(P/M) stages and 1/M of the pipeline registers, with the same
// throughput; the combinational path grows to one AND and M XOR gates.
// Original PPGUs kM .. kM+M-1 are all staggered by k cycles, and the BPM
// rotations follow from that (G = M in rb_bpm and rb_a_stager). If M does
// not divide P, the missing AND inputs of the last stage see zero digits.
// Merging two PPGUs, and the option of merging more, are the document's;
// controller, handshake and the double-buffered BPM are this design's.
//
// Interface as rb_ps1. Latency: out_valid rises Q + S + 1 cycles after the
// accepting cycle; one product every Q cycles.
module rb_ps2
  import rb_pkg::*;
#(
  parameter int unsigned N = 163,
  parameter int unsigned P = 8,
  parameter int unsigned Q = 21,
  parameter int unsigned M = 2
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
  localparam int unsigned S  = (P + M - 1) / M;  // merged stages
  localparam int unsigned PE = M * S;            // P rounded up to a multiple of M

  logic          load, busy;
  logic [SW-1:0] step;
  step_tag_t     acc_tag;
  logic [PE-1:0] a_bit;
  logic [N-1:0]  b_op [PE];
  logic [N-1:0]  r    [S];

  rb_ctrl #(.Q(Q), .DEPTH(S)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .step, .busy, .acc_tag
  );

  rb_bpm #(.N(N), .P(PE), .Q(Q), .G(M)) u_bpm (
    .clk, .load, .b, .step, .busy, .b_op
  );

  rb_a_stager #(.N(N), .P(PE), .Q(Q), .G(M)) u_stager (
    .clk, .rst_n, .load, .a, .a_bit
  );

  for (genvar k = 0; k < S; k++) begin : g_ppgu
    logic [N-1:0] b_group [M];
    for (genvar i = 0; i < M; i++) begin : g_in
      assign b_group[i] = b_op[M*k + i];
    end
    rb_ppgu2 #(.N(N), .M(M), .FIRST(k == 0)) u_ppgu (
      .clk, .rst_n,
      .a_bit (a_bit[M*k +: M]),
      .b_op  (b_group),
      .r_in  (r[(k == 0) ? 0 : k - 1]),
      .r_out (r[k])
    );
  end

  rb_ff_acc #(.N(N)) u_acc (
    .clk, .rst_n, .tag(acc_tag), .din(r[S-1]), .out_valid, .c
  );

  initial begin
    assert (N <= P * Q) else $error("rb_ps2: N must not exceed P*Q");
  end

endmodule
