// sam_pkg: field, sizing constants and modular-arithmetic helpers shared by
// every block of the multi-dimensional NTT accelerator.
//
// The accelerator works on W-bit elements of the prime field Z_p. The
// default configuration is the 256-bit one: the field is the BN254 (BN128)
// scalar field, whose multiplicative group has 2^28 roots of unity, so
// NTT sizes up to 2^28 can be run. ROOT is a primitive 2^LMAX-th root of
// unity (5^((p-1)/2^28) mod p); any smaller power-of-two root is obtained by
// repeated squaring (root_pow2). The choice of prime and root is this
// design's own: the SAM architecture only fixes the bit width and the size range.
//
// Arithmetic helpers are plain functions so that one definition serves the
// pipelines, the per-lane multipliers and the twiddle generator; each call
// site is one modular operator in hardware.
package sam_pkg;

  // ---- field --------------------------------------------------------------
  parameter int unsigned W    = 256;   // element width in bits
  parameter int unsigned LMAX = 28;    // log2 of the largest supported N

  typedef logic [W-1:0]   elem_t;
  typedef logic [2*W-1:0] wide_t;

  parameter elem_t P =
    256'h30644e72e131a029b85045b68181585d2833e84879b9709143e1f593f0000001;
  parameter elem_t ROOT =
    256'h2a3c09f0a58a7e8500e0a7eb8ef62abc402d111e41112ed49bd61b6e725b19f0;

  // ---- architecture defaults (256-bit configuration) ------------------------
  parameter int unsigned N_PT_DEF = 64;  // n: points of one NTT pipeline
  parameter int unsigned T_DEF    = 4;   // t: compute lanes
  parameter int unsigned B_DEF    = 8;   // b: buffer capacity extension

  parameter int unsigned AW = LMAX;      // element address width (DDR side)
  parameter int unsigned DMAX = LMAX;    // bound for digit loops

  // ---- modular arithmetic -----------------------------------------------------
  function automatic elem_t add_mod(elem_t a, elem_t b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, P}) s = s - {1'b0, P};
    return s[W-1:0];
  endfunction

  function automatic elem_t sub_mod(elem_t a, elem_t b);
    logic [W:0] s;
    if (a >= b) s = {1'b0, a} - {1'b0, b};
    else        s = {1'b0, a} + {1'b0, P} - {1'b0, b};
    return s[W-1:0];
  endfunction

  function automatic elem_t mul_mod(elem_t a, elem_t b);
    wide_t prod;
    prod = wide_t'(a) * wide_t'(b);
    prod = prod % wide_t'(P);
    return prod[W-1:0];
  endfunction

  // a^e mod p, square and multiply (elaboration-time use only)
  function automatic elem_t pow_mod(elem_t a, int unsigned e);
    elem_t r, x;
    r = elem_t'(1);
    x = a;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = mul_mod(r, x);
      x = mul_mod(x, x);
    end
    return r;
  endfunction

  // primitive 2^k-th root of unity
  function automatic elem_t root_pow2(int unsigned k);
    elem_t r;
    r = ROOT;
    for (int unsigned i = 0; i < LMAX; i++)
      if (i < LMAX - k) r = mul_mod(r, r);
    return r;
  endfunction

  // reverse the low `bits` bits of v
  function automatic logic [15:0] bit_rev(logic [15:0] v, int unsigned bits);
    logic [15:0] r;
    r = '0;
    for (int unsigned i = 0; i < 16; i++)
      if (i < bits) r[i] = v[bits-1-i];
    return r;
  endfunction

endpackage
