// rb_a_stager: digit-serial, staggered feed of operand A to the PPGUs.
//
// A (zero-padded to P*Q bits) is split into P digits of Q bits; digit p
// holds a_{pQ} .. a_{pQ+Q-1}. After load, each digit register shifts out one
// bit per cycle, lowest index first, then zeros. The bit for PPGU p passes a
// d_p = p / G stage delay line cleared at reset, so PPGU p first sees d_p
// zeros and then a_{pQ}, a_{pQ+1}, ... - the staggered input of a systolic
// pipeline. Digit order, bit order and the leading zeros follow the
// document's structure diagram; zero padding when N < P*Q is this design's.
//
// Timing: load in cycle t puts a_{pQ+q} on a_bit[p] in cycle t + 1 + q + d_p.
module rb_a_stager
  import rb_pkg::*;
#(
  parameter int unsigned N = 163,
  parameter int unsigned P = 8,
  parameter int unsigned Q = 21,
  parameter int unsigned G = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] a,
  output logic [P-1:0] a_bit
);

  logic [Q-1:0] digit_q [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) digit_q[p] <= '0;
    end else begin
      for (int p = 0; p < P; p++) begin
        if (load) begin
          for (int q = 0; q < Q; q++)
            digit_q[p][q] <= (p * Q + q < N) ? a[(p * Q + q) % N] : 1'b0;
        end else begin
          digit_q[p] <= digit_q[p] >> 1;
        end
      end
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_stagger
    localparam int unsigned D = stage_of(p, G);
    if (D == 0) begin : g_direct
      assign a_bit[p] = digit_q[p][0];
    end else begin : g_delay
      logic [D:0] dl_q;  // dl_q[0] is the digit output, dl_q[D] the PPGU input
      assign dl_q[0] = digit_q[p][0];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) dl_q[D:1] <= '0;
        else        dl_q[D:1] <= dl_q[D-1:0];
      end
      assign a_bit[p] = dl_q[D];
    end
  end

endmodule
