// rb_mult_top: the three digit-serial redundant-basis multipliers side by
// side.
//
// PS-I (rb_ps1), PS-II (rb_ps2) and PS-III (rb_ps3) each compute
// C = A*B in GF(2)[x]/(x^N - 1) with P partial products per cycle and Q
// cycles per product. They trade area against speed: PS-II has half the
// pipeline registers of PS-I, PS-III the shortest critical path. The top
// gives all three the same operands so that they can be compared; a
// design that needs one keeps only that instance. Placing the three
// together is this design's choice.
//
// Interface: an operand pair is taken when in_valid and in_ready (all
// three ready; they run in lockstep). Each structure reports its product
// with its own out_valid pulse: PS-I after Q+P+1 cycles, PS-II after
// Q+ceil(P/2)+1, PS-III after Q+P+2.
module rb_mult_top #(
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
  output logic         ps1_out_valid,
  output logic [N-1:0] ps1_c,
  output logic         ps2_out_valid,
  output logic [N-1:0] ps2_c,
  output logic         ps3_out_valid,
  output logic [N-1:0] ps3_c
);

  logic rdy1, rdy2, rdy3, take;

  assign in_ready = rdy1 && rdy2 && rdy3;
  assign take     = in_valid && in_ready;

  rb_ps1 #(.N(N), .P(P), .Q(Q)) u_ps1 (
    .clk, .rst_n, .in_valid(take), .in_ready(rdy1), .a, .b,
    .out_valid(ps1_out_valid), .c(ps1_c)
  );

  rb_ps2 #(.N(N), .P(P), .Q(Q)) u_ps2 (
    .clk, .rst_n, .in_valid(take), .in_ready(rdy2), .a, .b,
    .out_valid(ps2_out_valid), .c(ps2_c)
  );

  rb_ps3 #(.N(N), .P(P), .Q(Q)) u_ps3 (
    .clk, .rst_n, .in_valid(take), .in_ready(rdy3), .a, .b,
    .out_valid(ps3_out_valid), .c(ps3_c)
  );

endmodule
