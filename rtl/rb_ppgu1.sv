// rb_ppgu1: partial product generation unit of structure PS-I.
//
// AND cell: the current A bit gates the rotated B word (N AND gates).
// XOR cell: adds (bitwise XOR) the registered sum of the preceding PPGU.
// Register cell R: holds the result for the next PPGU one cycle later.
// The first PPGU of the chain has no predecessor and no XOR cell (FIRST=1).
// This cell structure is the document's; the reset is this design's.
//
// Timing: r_out = (a_bit & b_op) ^ r_in, registered (one cycle).
module rb_ppgu1 #(
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

  logic [N-1:0] pp, sum;

  assign pp  = b_op & {N{a_bit}};
  assign sum = FIRST ? pp : (pp ^ r_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_out <= '0;
    else        r_out <= sum;
  end

endmodule
