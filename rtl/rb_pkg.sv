// rb_pkg: types and helpers shared by the digit-serial redundant-basis (RB)
// multipliers.
//
// An RB element is an N-bit vector of coefficients a_0..a_{N-1}; the product
// of two elements is the cyclic convolution c_k = XOR_i a_i b_{(k-i) mod N},
// i.e. multiplication in GF(2)[x]/(x^N - 1). The multipliers split the index
// i into i = p*Q + q: P partial product generation units (PPGUs) each handle
// one digit p, and the Q bits of every digit are stepped through in Q cycles.
//
// step_tag_t travels alongside the datapath so that the accumulator knows
// which of its inputs starts and which ends a product. The marker is this
// design's own sequencing; the document does not describe a controller.
package rb_pkg;

  typedef struct packed {
    logic valid;  // a partial sum of a product is present
    logic first;  // it belongs to bit step q = 0
    logic last;   // it belongs to bit step q = Q-1
  } step_tag_t;

  // Stagger delay of PPGU p when G PPGUs share one pipeline stage.
  function automatic int unsigned stage_of(int unsigned p, int unsigned g);
    return p / g;
  endfunction

  // Fixed rotation (in positions, modulo n) applied by the bit distribution
  // cell for PPGU p: the PPGU needs B*x^(pQ+q) at the cycle in which the
  // rotating BPM register holds B*x^(q+d_p).
  function automatic int unsigned bpm_offset(int unsigned p, int unsigned q_len,
                                             int unsigned g, int unsigned n);
    return (p * q_len + n - ((p / g) % n)) % n;
  endfunction

endpackage
