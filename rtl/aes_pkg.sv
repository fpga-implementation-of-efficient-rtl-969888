// aes_pkg: types and constants shared by the AES-128 encryption pipeline.
//
// State layout (FIPS-197): a 128-bit state holds bytes s0..s15 with s0 in
// bits 127:120. Column c (0..3) is bytes 4c..4c+3 and occupies bits
// 127-32c -: 32; inside a column, row 0 is the most significant byte.
// The S-box is not stored as a literal table: sbox_table() derives it from
// its definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1,
// followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
// rotl(b,4) ^ 0x63), and sbox_dpram uses it to initialise its memory.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NUM_ROUNDS = 10;   // AES-128
  localparam int unsigned ISSUE_INTERVAL = 3; // minimum cycles between accepted blocks

  // Multiply by x (i.e. by 2) modulo the AES polynomial 0x11B.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic byte_t rotl8(byte_t x, int unsigned n);
    return byte_t'((x << n) | (x >> (8 - n)));
  endfunction

  // The whole S-box. p walks through all non-zero field elements as powers
  // of the generator 3 while q walks through their inverses (powers of 1/3),
  // so every step yields one pair (p, p^-1); the entry for p is the affine
  // map of q. The zero element, which has no inverse, maps to 0x63.
  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    byte_t p = 8'h01;
    byte_t q = 8'h01;
    t[0] = 8'h63;
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);                 // p * 3
      q = q ^ (q << 1);                 // q / 3 = q * 0xf6
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    return t;
  endfunction

  // Round constant of round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon_of(int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Byte r of column c of a state.
  function automatic byte_t st_byte(state_t s, int unsigned c, int unsigned r);
    return s[127 - 8 * (4 * c + r) -: 8];
  endfunction

endpackage
