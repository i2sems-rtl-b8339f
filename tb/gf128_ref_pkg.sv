// gf128_ref_pkg: reference GF(2^128) product for the testbenches, computed
// a different way from the RTL: reverse the bit order, form the full
// 255-bit carry-less product, reduce it modulo x^128 + x^7 + x^2 + x + 1,
// and reverse back. Also a reference GCM block tag built on it.
package gf128_ref_pkg;
  function automatic logic [127:0] rev128(input logic [127:0] x);
    logic [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = x[127-i];
    return r;
  endfunction

  function automatic logic [127:0] gmul(input logic [127:0] a, input logic [127:0] b);
    logic [254:0] prod;
    logic [127:0] ar, br;
    ar = rev128(a); br = rev128(b);
    prod = '0;
    for (int i = 0; i < 128; i++) if (ar[i]) prod = prod ^ (255'(br) << i);
    for (int i = 254; i >= 128; i--)
      if (prod[i]) prod = prod ^ (255'(135) << (i - 128)) ^ (255'(1) << i);
    return rev128(prod[127:0]);
  endfunction

  function automatic logic [127:0] tag(input logic [127:0] h, input logic [127:0] a,
                                       input logic [127:0] c1, input logic [127:0] c2,
                                       input logic [127:0] pad);
    return gmul(h, gmul(h, gmul(h, a) ^ c1) ^ c2) ^ pad;
  endfunction
endpackage
