// aes_pkg: the AES-128 (FIPS-197) round functions used by the keystream
// generator.
//
// The S-box is not stored as a typed-in table: gen_sbox() builds it at
// elaboration time by walking the multiplicative group of GF(2^8) with the
// generator 3 while tracking the inverse with the generator 3^-1 = 0xF6
// (written as q ^= q<<1, q<<2, q<<4, ^0x09), then applying the affine map
// s = q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^ rotl(q,4) ^ 0x63. The state is
// held as 128 bits with byte 0 (FIPS in[0]) in bits [127:120]; byte r+4c is
// row r, column c.
package aes_pkg;

  typedef logic [127:0] state_t;

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int unsigned n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0] p, q;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int i = 0; i < 255; i++) begin
      // p <- p * 3
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1B : 8'h00);
      // q <- q / 3
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      q = q ^ (q[7] ? 8'h09 : 8'h00);
      t[p*8 +: 8] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[7:0] = 8'h63;
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return SBOX[x*8 +: 8];
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
  endfunction

  // Byte k of the state (k = r + 4c).
  function automatic logic [7:0] getb(input state_t s, input int unsigned k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic state_t sub_shift(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = sbox(getb(s, r + 4*((c + r) % 4)));
    return o;
  endfunction

  function automatic state_t mix_columns(input state_t s);
    state_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = getb(s, 4*c);
      a1 = getb(s, 4*c + 1);
      a2 = getb(s, 4*c + 2);
      a3 = getb(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127 - 8*(4*c + 3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Next round key from the previous one and the round constant.
  function automatic state_t next_rkey(input state_t k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
