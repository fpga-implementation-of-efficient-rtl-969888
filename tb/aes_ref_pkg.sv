// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse and applying the affine map as a sum of byte
// rotations; the cipher works on a byte array in FIPS-197 order.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;

  function automatic b8_t ref_mul(b8_t a, b8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8_t rotl8(b8_t x, int n);
    return b8_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic b8_t ref_sbox(b8_t a);
    b8_t inv = 8'h00;
    for (int c = 1; c < 256; c++) if (ref_mul(a, b8_t'(c)) == 8'h01) inv = b8_t'(c);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // byte i of a 128-bit value (byte 0 = bits 127:120)
  function automatic b8_t gb(logic [127:0] s, int i);
    return s[127 - 8 * i -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_shift(logic [127:0] s);
    logic [127:0] o;
    // output byte (c, r) = S(input byte ((c + r) % 4, r))
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8 * (4 * c + r) -: 8] = ref_sbox(gb(s, 4 * ((c + r) % 4) + r));
    return o;
  endfunction

  function automatic logic [31:0] ref_mix_col(logic [31:0] w);
    b8_t a [4];
    b8_t o [4];
    for (int r = 0; r < 4; r++) a[r] = w[31 - 8 * r -: 8];
    o[0] = ref_mul(a[0], 8'h02) ^ ref_mul(a[1], 8'h03) ^ a[2] ^ a[3];
    o[1] = a[0] ^ ref_mul(a[1], 8'h02) ^ ref_mul(a[2], 8'h03) ^ a[3];
    o[2] = a[0] ^ a[1] ^ ref_mul(a[2], 8'h02) ^ ref_mul(a[3], 8'h03);
    o[3] = ref_mul(a[0], 8'h03) ^ a[1] ^ a[2] ^ ref_mul(a[3], 8'h02);
    return {o[0], o[1], o[2], o[3]};
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] s);
    return {ref_mix_col(s[127:96]), ref_mix_col(s[95:64]), ref_mix_col(s[63:32]), ref_mix_col(s[31:0])};
  endfunction

  function automatic b8_t ref_rcon(int r);
    b8_t c = 8'h01;
    for (int i = 1; i < r; i++) c = ref_mul(c, 8'h02);
    return c;
  endfunction

  function automatic logic [127:0] ref_next_key(logic [127:0] k, int r);
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32 * i -: 32];
    t = {ref_sbox(w[3][23:16]), ref_sbox(w[3][15:8]), ref_sbox(w[3][7:0]), ref_sbox(w[3][31:24])};
    t ^= {ref_rcon(r), 24'h0};
    w[0] ^= t;
    for (int i = 1; i < 4; i++) w[i] ^= w[i - 1];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  // One full round r (1..10) of state s with previous round key k
  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, int r, bit final_round);
    logic [127:0] t = ref_sub_shift(s);
    if (!final_round) t = ref_mix(t);
    return t ^ ref_next_key(k, r);
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ key;
    logic [127:0] k = key;
    for (int r = 1; r <= 10; r++) begin
      s = ref_round(s, k, r, r == 10);
      k = ref_next_key(k, r);
    end
    return s;
  endfunction

endpackage
