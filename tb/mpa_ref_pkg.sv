// mpa_ref_pkg: reference arithmetic and stream builders for the testbenches.
//
// mul_ref multiplies two little-endian arrays of 16-bit words by column sums
// (product scanning with a 64-bit running sum), a different order from the
// row-by-row method of the hardware, so the two are computed independently.
// make_pair builds the A stream (size word, then A's words once per word of B),
// the B stream (size word, then B's words) and the expected result stream
// (size word flagged in bit 16, then na+nb words) of one multiplication.
package mpa_ref_pkg;

  typedef logic [15:0] word_t;
  typedef word_t       warr_t [];
  typedef logic [16:0] oword_t;   // {is_size_word, word}

  function automatic warr_t mul_ref(input warr_t a, input warr_t b);
    warr_t p;
    longint unsigned acc;
    int na = a.size();
    int nb = b.size();
    p   = new[na + nb];
    acc = 0;
    for (int k = 0; k < na + nb; k++) begin
      for (int i = 0; i < nb; i++) begin
        int j = k - i;
        if (j >= 0 && j < na) acc += longint'(a[j]) * longint'(b[i]);
      end
      p[k] = word_t'(acc & 64'hFFFF);
      acc  = acc >> 16;
    end
    return p;
  endfunction

  function automatic word_t size_word(input int n, input bit neg);
    return neg ? word_t'(-n) : word_t'(n);
  endfunction

  // Random operand words; 'extreme' makes every word 16'hFFFF to reach the
  // largest carries.
  function automatic warr_t rand_words(input int n, input bit extreme);
    warr_t w = new[n];
    foreach (w[k]) w[k] = extreme ? 16'hFFFF : word_t'($urandom);
    return w;
  endfunction

  class pair_c;
    word_t  a_stream [$];
    word_t  b_stream [$];
    oword_t exp      [$];
    int     na, nb;
    function new(input int na_i, input int nb_i, input bit nega, input bit negb,
                 input bit extreme);
      warr_t a, b, p;
      na = na_i;
      nb = nb_i;
      a  = rand_words(na, extreme);
      b  = rand_words(nb, extreme);
      p  = mul_ref(a, b);
      a_stream.push_back(size_word(na, nega));
      for (int i = 0; i < nb; i++)
        for (int j = 0; j < na; j++) a_stream.push_back(a[j]);
      b_stream.push_back(size_word(nb, negb));
      for (int i = 0; i < nb; i++) b_stream.push_back(b[i]);
      exp.push_back({1'b1, size_word(na + nb, nega ^ negb)});
      foreach (p[k]) exp.push_back({1'b0, p[k]});
    endfunction
  endclass

endpackage
