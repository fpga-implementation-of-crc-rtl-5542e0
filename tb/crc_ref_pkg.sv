// crc_ref_pkg: reference CRC model for the testbenches.
//
// Computes the remainder by plain polynomial long division over GF(2), not by
// stepping an LFSR. For an m-bit message M(x) (first bit = highest power), a
// generator P(x) = x^w + poly(x) and a register seed S(x), the remainder the
// hardware must hold after the message is
//     R(x) = ( S(x) * x^m  +  M(x) * x^w )  mod  P(x)
// The S(x) * x^m term is what a non-zero starting register contributes after
// m shifts. Widths up to 64 bits are supported.
package crc_ref_pkg;

  typedef bit bitq_t[$];

  function automatic logic [63:0] crc_ref(input logic [63:0] poly,
                                          input int unsigned w,
                                          input logic [63:0] seed,
                                          input bitq_t msg);
    int unsigned m = msg.size();
    bit          div[];
    logic [63:0] rem;
    div = new[m + w];
    foreach (div[i]) div[i] = 1'b0;
    for (int unsigned i = 0; i < m; i++) div[m - 1 - i + w] = msg[i];
    for (int unsigned j = 0; j < w; j++) begin
      int unsigned k = j + m;
      div[k] = div[k] ^ seed[j];
    end
    for (int p = int'(m + w) - 1; p >= int'(w); p--) begin
      if (div[p]) begin
        div[p] = 1'b0;
        for (int unsigned j = 0; j < w; j++) begin
          int k = p - int'(w) + int'(j);
          div[k] = div[k] ^ poly[j];
        end
      end
    end
    rem = '0;
    for (int unsigned j = 0; j < w; j++) rem[j] = div[j];
    return rem;
  endfunction

  // Bits of a vector, most significant first.
  function automatic bitq_t vec_bits(input logic [63:0] v, input int unsigned n);
    bitq_t q;
    for (int i = int'(n) - 1; i >= 0; i--) q.push_back(v[i]);
    return q;
  endfunction

endpackage
