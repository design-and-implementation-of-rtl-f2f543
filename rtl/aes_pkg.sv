// Shared types and helpers of the AES-128 design.
//
// The 128-bit block is held as a 4x4 byte matrix filled column by column:
// byte i of the block (byte 0 in bits [127:120]) sits in row i%4, column i/4.
// This is the column order of FIPS-197 and of the published test vectors.
// state_byte/with_byte give row/column access to that packing.
//
// make_table computes the S-box, inverse S-box, logarithm and antilogarithm
// tables at elaboration time, so no table file is needed.
//
// mix_impl_e selects one of the two MixColumns implementations: the
// shift-and-XOR network (default, the smaller and faster one) or the
// log/antilog look-up-table multiplier.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  typedef enum logic {
    MIX_ADD_SHIFT = 1'b0,
    MIX_LUT       = 1'b1
  } mix_impl_e;

  // Multiplication by x (02) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // The four 256-entry byte tables of the design.
  typedef enum logic [1:0] {
    TBL_SBOX     = 2'd0,   // S-box
    TBL_INV_SBOX = 2'd1,   // inverse S-box
    TBL_LOG      = 2'd2,   // L(a): logarithm to base 03, L(0) = 0 (unused)
    TBL_EXP      = 2'd3    // E(i) = 03^i, E(255) = 01
  } table_e;

  typedef logic [255:0][7:0] table_t;  // entry a in element a

  // Builds a table at elaboration time from its definition:
  //   E(i)  = 03^i, stepping by x*03 = xtime(x) ^ x
  //   L(a)  = the i with E(i) = a
  //   S(a)  = affine(a^-1), a^-1 = E(255 - L(a)) and 0^-1 = 0,
  //           affine(b) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63
  //   S^-1  = the inverse permutation of S
  function automatic table_t make_table(table_e which);
    table_t e, l, s, si;
    byte_t  x, b;
    x = 8'h01;
    l = '0;
    for (int i = 0; i < 256; i++) begin
      e[i] = x;
      if (i < 255) l[x] = 8'(i);
      x = xtime(x) ^ x;
    end
    for (int a = 0; a < 256; a++) begin
      b = (a == 0) ? 8'h00 : e[(255 - int'(l[a])) % 255];
      s[a] = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
               ^ {b[3:0], b[7:4]} ^ 8'h63;
      si[s[a]] = 8'(a);
    end
    case (which)
      TBL_SBOX:     return s;
      TBL_INV_SBOX: return si;
      TBL_LOG:      return l;
      default:      return e;
    endcase
  endfunction

  // Byte at row r, column c of the state matrix.
  function automatic byte_t state_byte(block_t s, int unsigned r, int unsigned c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  // Copy of s with the byte at row r, column c replaced by b.
  function automatic block_t with_byte(block_t s, int unsigned r, int unsigned c, byte_t b);
    block_t t;
    t = s;
    t[127 - 8*(4*c + r) -: 8] = b;
    return t;
  endfunction

endpackage
