// Reference model of AES-128 for the testbenches, written independently of
// the RTL: GF(2^8) products by the shift-and-add loop, the S-box from the
// multiplicative inverse (a^254) and the affine map, the key schedule and the
// cipher and inverse cipher as plain byte-matrix loops. Byte i of a 128-bit
// block (byte 0 in bits [127:120]) is row i%4, column i/4.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);   // a^254 = a^-1, 0 -> 0
    return r;
  endfunction

  function automatic logic [7:0] sbox_calc(logic [7:0] a);
    logic [7:0] b = ginv(a), s;
    s = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
    return s;
  endfunction

  // Tables filled on first use.
  logic [7:0] sbox_t [256];
  logic [7:0] inv_t  [256];
  bit         tables_built = 0;

  function automatic void build();
    if (tables_built) return;
    for (int a = 0; a < 256; a++) begin
      sbox_t[a] = sbox_calc(8'(a));
      inv_t[sbox_t[a]] = 8'(a);
    end
    tables_built = 1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    build();
    return sbox_t[a];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] s);
    build();
    return inv_t[s];
  endfunction

  function automatic logic [7:0] gb(logic [127:0] s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] sb(logic [127:0] s, bit inv);
    logic [127:0] t;
    for (int i = 0; i < 16; i++) t[8*i +: 8] = inv ? inv_sbox(s[8*i +: 8]) : sbox(s[8*i +: 8]);
    return t;
  endfunction

  function automatic logic [127:0] sr(logic [127:0] s, bit inv);
    logic [127:0] t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[127 - 8*(4*c + r) -: 8] = inv ? gb(s, r, (c - r + 4) % 4) : gb(s, r, (c + r) % 4);
    return t;
  endfunction

  function automatic logic [127:0] mc(logic [127:0] s, bit inv);
    logic [127:0] t;
    logic [7:0] m [4][4];
    if (!inv) m = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    else      m = '{'{14,11,13,9}, '{9,14,11,13}, '{13,9,14,11}, '{11,13,9,14}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 0;
        for (int j = 0; j < 4; j++) acc ^= gmul(m[r][j], gb(s, j, c));
        t[127 - 8*(4*c + r) -: 8] = acc;
      end
    return t;
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t expand(logic [127:0] key);
    rk_t k;
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    rk_t k = expand(key);
    logic [127:0] s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = sr(sb(s, 0), 0);
      if (r != 10) s = mc(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    rk_t k = expand(key);
    logic [127:0] s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = sb(sr(s, 1), 1) ^ k[r];
      if (r != 0) s = mc(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
