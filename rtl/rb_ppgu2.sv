// rb_ppgu2: merged partial product generation unit of structure PS-II.
//
// M neighbouring PS-I PPGUs (M = 2 by default) are folded into one
// pipeline stage: M AND cells form the partial products of M A bits with
// their rotated B words, XOR cells add them to each other and to the
// preceding stage's register, and a single register cell holds the sum.
// With M = 2 that is two AND cells and two XOR cells, and the first unit of
// the chain, having nothing to add, needs one XOR cell (FIRST=1). This cuts
// the pipeline registers of PS-I by a factor M, as the document describes
// for M = 2 and suggests for larger M; the reset is this design's.
//
// Timing: r_out = XOR_i (a_bit[i] & b_op[i]) ^ r_in, registered (one cycle).
module rb_ppgu2 #(
  parameter int unsigned N     = 163,
  parameter int unsigned M     = 2,
  parameter bit          FIRST = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] a_bit,
  input  logic [N-1:0] b_op [M],
  input  logic [N-1:0] r_in,
  output logic [N-1:0] r_out
);

  logic [N-1:0] sum;

  always_comb begin
    sum = FIRST ? '0 : r_in;
    for (int i = 0; i < M; i++) sum ^= b_op[i] & {N{a_bit[i]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_out <= '0;
    else        r_out <= sum;
  end

endmodule
