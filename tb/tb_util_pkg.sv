// tb_util_pkg: reference arithmetic for the testbenches, written
// independently of the design's helpers: modular multiplication by
// shift-and-add (no wide product, no division), roots of unity by repeated
// squaring with it, and a random field element source.
package tb_util_pkg;
  import sam_pkg::W, sam_pkg::P, sam_pkg::ROOT, sam_pkg::LMAX, sam_pkg::elem_t;

  function automatic elem_t ref_add(elem_t a, elem_t b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, P}) s -= {1'b0, P};
    return elem_t'(s);
  endfunction

  function automatic elem_t ref_sub(elem_t a, elem_t b);
    logic [W:0] s;
    s = (a >= b) ? {1'b0, a} - {1'b0, b} : {1'b0, a} + {1'b0, P} - {1'b0, b};
    return elem_t'(s);
  endfunction

  // a * b mod p, MSB-first double-and-add
  function automatic elem_t ref_mul(elem_t a, elem_t b);
    elem_t r;
    r = '0;
    for (int i = W - 1; i >= 0; i--) begin
      r = ref_add(r, r);
      if (b[i]) r = ref_add(r, a);
    end
    return r;
  endfunction

  function automatic elem_t ref_pow(elem_t a, longint unsigned e);
    elem_t r;
    r = elem_t'(1);
    for (int i = 63; i >= 0; i--) begin
      r = ref_mul(r, r);
      if (e[i]) r = ref_mul(r, a);
    end
    return r;
  endfunction

  function automatic elem_t ref_root(int k);
    elem_t r;
    r = ROOT;
    for (int i = 0; i < int'(LMAX) - k; i++) r = ref_mul(r, r);
    return r;
  endfunction

  function automatic elem_t ref_rand();
    elem_t v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    while (v >= P) v = v - P;
    return v;
  endfunction
endpackage
