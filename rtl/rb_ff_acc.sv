// rb_ff_acc: finite field accumulator.
//
// N parallel bit-level accumulation cells, each an XOR gate and a register:
// every valid partial sum from the last PPGU is added (XOR) to the value
// accumulated so far and stored for the next cycle, as the document
// describes. The marker tag (from rb_ctrl) makes the first partial sum of a
// product overwrite instead of add, and the last one raise out_valid; that
// framing is this design's.
//
// Timing: c and out_valid are registered; out_valid is a one-cycle pulse in
// the cycle after the last partial sum of a product arrives, with c = the
// product. c holds until the next product's first partial sum arrives,
// which with back-to-back products is the very next cycle.
module rb_ff_acc
  import rb_pkg::*;
#(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  step_tag_t    tag,
  input  logic [N-1:0] din,
  output logic         out_valid,
  output logic [N-1:0] c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= tag.valid && tag.last;
      if (tag.valid) c <= tag.first ? din : (c ^ din);
    end
  end

endmodule
