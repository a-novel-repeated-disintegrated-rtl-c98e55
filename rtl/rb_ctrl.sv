// rb_ctrl: sequencing for a digit-serial RB multiplier.
//
// Accepts an operand pair (in_valid && in_ready), then counts the Q bit steps
// q = 0..Q-1 of that product as they pass PPGU 0. A new pair is accepted in
// the cycle of the last step, so back-to-back products follow every Q
// cycles. For every step a marker {valid, first, last} is pushed into a
// DEPTH-stage delay line that matches the register depth between PPGU 0 and
// the accumulator, so the marker arrives with the partial sum it describes.
//
// Timing: load is high in the cycle the pair is taken; step 0 is in the next
// cycle. acc_tag for step q appears DEPTH cycles after step q.
// The document gives no controller: all of this is this design's choice.
module rb_ctrl
  import rb_pkg::*;
#(
  parameter int unsigned Q     = 21,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned SW   = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load,
  output logic [SW-1:0] step,
  output logic          busy,
  output step_tag_t     acc_tag
);

  localparam logic [SW-1:0] LAST = SW'(Q - 1);

  step_tag_t tag_now;
  step_tag_t tag_dl [DEPTH];

  assign in_ready = !busy || (step == LAST);
  assign load     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
    end else if (load) begin
      busy <= 1'b1;
      step <= '0;
    end else if (busy) begin
      if (step == LAST) busy <= 1'b0;
      else              step <= step + 1'b1;
    end
  end

  always_comb begin
    tag_now.valid = busy;
    tag_now.first = busy && (step == '0);
    tag_now.last  = busy && (step == LAST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) tag_dl[i] <= '0;
    end else begin
      tag_dl[0] <= tag_now;
      for (int i = 1; i < DEPTH; i++) tag_dl[i] <= tag_dl[i-1];
    end
  end

  assign acc_tag = tag_dl[DEPTH-1];

endmodule
