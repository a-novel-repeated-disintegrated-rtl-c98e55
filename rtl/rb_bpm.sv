// rb_bpm: bit-permutation module (BPM) with its bit distribution cell.
//
// Operand B is loaded into an N-bit register that rotates by one position
// every cycle, so at bit step q of a product it holds B*x^q (mod x^N - 1).
// The bit distribution cell is pure wiring: PPGU p receives that register
// rotated by a fixed p*Q - d_p positions, where d_p = p / G is the PPGU's
// stagger delay; at the cycle PPGU p works on bit q it then sees B*x^(pQ+q).
// Both follow the document: a rotating B register feeding fixed rewirings
// of B to the PPGUs.
//
// Because PPGU p runs d_p cycles behind PPGU 0, it still needs the previous
// B for d_p cycles after a new one is loaded. This design therefore keeps a
// second rotating register with the previous B (continuing its rotation)
// and lets PPGU p read it while step < d_p. This lets a new product start
// every Q cycles; the document does not say how it handles that overlap.
//
// Interface: load takes b in that cycle; step/busy come from rb_ctrl.
// b_op[p] is combinational from the registers. Requires P/G - 1 <= Q.
module rb_bpm
  import rb_pkg::*;
#(
  parameter int unsigned N = 163,
  parameter int unsigned P = 8,
  parameter int unsigned Q = 21,
  parameter int unsigned G = 1,
  localparam int unsigned SW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          load,
  input  logic [N-1:0]  b,
  input  logic [SW-1:0] step,
  input  logic          busy,
  output logic [N-1:0]  b_op [P]
);

  logic [N-1:0] cur_q, prev_q;

  // Multiply by x: rotate towards higher coefficient index.
  function automatic logic [N-1:0] rot1(logic [N-1:0] x);
    return {x[N-2:0], x[N-1]};
  endfunction

  always_ff @(posedge clk) begin
    if (load) begin
      cur_q  <= b;
      prev_q <= rot1(cur_q);
    end else begin
      cur_q  <= rot1(cur_q);
      prev_q <= rot1(prev_q);
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_dist
    localparam int unsigned OFF = bpm_offset(p, Q, G, N);
    localparam int unsigned D   = stage_of(p, G);
    logic         use_prev;
    logic [N-1:0] src;
    if (D == 0) begin : g_no_lag
      assign use_prev = 1'b0;
    end else begin : g_lag
      assign use_prev = busy && (32'(step) < D);
    end
    assign src      = use_prev ? prev_q : cur_q;
    always_comb begin
      for (int j = 0; j < N; j++) b_op[p][j] = src[(j + N - OFF) % N];
    end
  end

  initial begin
    assert (P / G <= Q + 1) else $error("rb_bpm: stagger P/G-1 exceeds Q");
  end

endmodule
