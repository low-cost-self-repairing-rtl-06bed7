// tb_bsd_pkg: reference helpers for the BSD adder testbenches.
//
// Words of BSD digits are handled here as flat bit vectors in the layout of
// a packed bsd_digit_t array: digit i occupies bits [2i+1] (p) and [2i] (n),
// value p - n, weight 2^i. The helpers compute word values with plain
// integer arithmetic, independently of the adders under test.
package tb_bsd_pkg;

  localparam int MAXD = 160;                 // largest word handled, in digits
  typedef logic signed [MAXD+7:0] big_t;     // holds any word value
  typedef logic [2*MAXD-1:0]      word_t;

  // Value of the first nd digits of w.
  function automatic big_t word_val(word_t w, int nd);
    big_t v = '0;
    for (int i = nd - 1; i >= 0; i--) begin
      v = v * 2;
      v = v + big_t'(w[2*i+1]) - big_t'(w[2*i]);
    end
    return v;
  endfunction

  // Random digit: each of 00, 01, 10, 11 equally likely (zero has two codes).
  function automatic logic [1:0] rand_digit();
    return 2'($urandom_range(0, 3));
  endfunction

  function automatic word_t rand_word(int nd);
    word_t w = '0;
    for (int i = 0; i < nd; i++) w[2*i +: 2] = rand_digit();
    return w;
  endfunction

  // XOR of all 2*nd bits of a word: P(X).
  function automatic logic word_par(word_t w, int nd);
    logic p = 1'b0;
    for (int i = 0; i < 2 * nd; i++) p ^= w[i];
    return p;
  endfunction

  // Per-digit parities: bit i = 1 when digit i is non-zero.
  function automatic logic [MAXD-1:0] digit_pars(word_t w, int nd);
    logic [MAXD-1:0] p = '0;
    for (int i = 0; i < nd; i++) p[i] = w[2*i+1] ^ w[2*i];
    return p;
  endfunction

  // Bitwise complement of the first nd digits (the BSD 1's complement).
  function automatic word_t word_inv(word_t w, int nd);
    word_t r = '0;
    for (int i = 0; i < 2 * nd; i++) r[i] = ~w[i];
    return r;
  endfunction

endpackage
