// rb_ppgu3: partial product generation unit of structure PS-III.
//
// One AND cell, one XOR cell and two register cells. A register after the
// AND cell cuts the path between bit-multiplication and bit-addition, so in
// any cycle a PPGU multiplies one bit step while it adds the previous one:
// the critical path is one AND or one XOR gate, not both. The document
// gives the cell counts and that motive; where the two registers sit is
// this design's reading. The first PPGU adds zero (FIRST=1).
//
// Timing: pp_q = a_bit & b_op (one cycle), r_out = pp_q ^ r_in (one more).
module rb_ppgu3 #(
  parameter int unsigned N     = 163,
  parameter bit          FIRST = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_bit,
  input  logic [N-1:0] b_op,
  input  logic [N-1:0] r_in,
  output logic [N-1:0] r_out
);

  logic [N-1:0] pp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_q  <= '0;
      r_out <= '0;
    end else begin
      pp_q  <= b_op & {N{a_bit}};
      r_out <= FIRST ? pp_q : (pp_q ^ r_in);
    end
  end

endmodule
