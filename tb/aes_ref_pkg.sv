// aes_ref_pkg: behavioural AES-128 for the testbenches. It is written
// independently of the RTL: the S-box entry of x is found by searching for
// the multiplicative inverse of x in GF(2^8) and applying the affine map bit
// by bit, and the cipher runs round by round on a 4x4 byte matrix. Also
// builds the keystream of a counter the way the design defines it.
package aes_ref_pkg;
  import i2sems_pkg::*;

  function automatic logic [7:0] gm(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = (a << 1) ^ (a[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int y = 1; y < 256; y++) if (gm(x, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  logic [7:0] stab [256];
  bit         stab_ok = 0;

  function automatic logic [127:0] aes(input logic [127:0] k, input logic [127:0] pt);
    logic [7:0] m [4][4], w [44][4], t [4], tmp [4][4];
    logic [7:0] rc = 8'h01;
    if (!stab_ok) begin
      for (int i = 0; i < 256; i++) stab[i] = sb(8'(i));
      stab_ok = 1;
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = k[127 - 8*(4*i+j) -: 8];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = '{stab[w[i-1][1]] ^ rc, stab[w[i-1][2]], stab[w[i-1][3]], stab[w[i-1][0]]};
        rc = gm(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = pt[127 - 8*(4*c+r) -: 8] ^ w[c][r];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) tmp[r][c] = stab[m[r][(c+r)%4]];
      m = tmp;
      if (rnd != 10)
        for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
          tmp[r][c] = gm(m[r][c], 2) ^ gm(m[(r+1)%4][c], 3) ^ m[(r+2)%4][c] ^ m[(r+3)%4][c];
      m = tmp;
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] ^= w[4*rnd + c][r];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) aes[127 - 8*(4*c+r) -: 8] = m[r][c];
  endfunction

  function automatic keystream_t keystream(input logic [127:0] k, input cnt_t c);
    keystream_t ks;
    ks.mac_pad = aes(k, {64'h0, c});
    ks.pad1    = aes(k, {64'h1, c});
    ks.pad2    = aes(k, {64'h3, c});
    return ks;
  endfunction
endpackage
