// Reference arithmetic for the testbenches, written independently of the RTL.
//
// Field elements are held in MAXW-bit vectors, bit i = coefficient of x^i;
// only the low m bits are meaningful. f holds F(x) - x^m.
//   ref_mul       : A*B mod F, most significant bit of B first (Horner), the
//                   opposite order to the hardware's alpha chain.
//   ref_xtime     : x*A mod F.
//   ref_parity    : k-bit multiple parity; horizontal parts (floor(m/k)+1
//                   bits first) or, with vert = 1, interleaved parts
//                   (part of bit i = i mod k).
//   ref_undetected: 1 when an error pattern (data error ed, parity error ep)
//                   has even weight in every part, i.e. escapes a checker.
package tb_ref_pkg;

  localparam int MAXW = 1024;
  typedef logic [MAXW-1:0] vec_t;

  function automatic vec_t ref_xtime(input vec_t a, input vec_t f, input int m);
    vec_t r;
    logic top;
    top = a[m-1];
    r = '0;
    for (int i = m - 1; i >= 1; i--) r[i] = a[i-1];
    if (top) r ^= f;
    for (int i = m; i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction

  function automatic vec_t ref_mul(input vec_t a, input vec_t b, input vec_t f, input int m);
    vec_t r;
    r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = ref_xtime(r, f, m);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic logic [63:0] ref_parity(input vec_t z, input int m, input int k,
                                             input bit vert = 0);
    logic [63:0] p;
    int j, cnt, len;
    p = '0;
    if (vert) begin
      for (int i = 0; i < m; i++) p[i % k] ^= z[i];
      return p;
    end
    j = 0;
    cnt = 0;
    for (int i = 0; i < m; i++) begin
      len = (m / k) + ((j < (m % k)) ? 1 : 0);
      if (cnt == len) begin
        j++;
        cnt = 0;
      end
      p[j] ^= z[i];
      cnt++;
    end
    return p;
  endfunction

  function automatic logic ref_undetected(input vec_t ed, input logic [63:0] ep,
                                          input int m, input int k, input bit vert = 0);
    logic [63:0] p;
    p = ref_parity(ed, m, k, vert);
    for (int j = 0; j < k; j++) if (p[j] != ep[j]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic vec_t rand_vec(input int m);
    vec_t r;
    for (int i = 0; i < MAXW / 32; i++) r[i*32 +: 32] = $urandom;
    for (int i = m; i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction

endpackage
