// rb_ref_pkg: reference model for the testbenches.
//
// rb_ref#(N)::mul computes the redundant-basis product the straightforward
// way, as a cyclic convolution over GF(2): c_k = XOR_i a_i b_{(k-i) mod N}.
// It shares no code with the RTL. rand_vec fills an N-bit vector from
// $urandom.
package rb_ref_pkg;

  class rb_ref #(int unsigned N = 163);

    static function automatic logic [N-1:0] mul(logic [N-1:0] a, logic [N-1:0] b);
      logic [N-1:0] c = '0;
      for (int i = 0; i < N; i++)
        if (a[i])
          for (int j = 0; j < N; j++)
            if (b[j]) c[(i + j) % N] ^= 1'b1;
      return c;
    endfunction

    // b * x^k mod (x^N - 1)
    static function automatic logic [N-1:0] rot(logic [N-1:0] b, int unsigned k);
      logic [N-1:0] r;
      for (int j = 0; j < N; j++) r[(j + k) % N] = b[j];
      return r;
    endfunction

    static function automatic logic [N-1:0] rand_vec();
      logic [N-1:0] v;
      for (int j = 0; j < N; j++) v[j] = 1'($urandom);
      return v;
    endfunction

  endclass

endpackage
