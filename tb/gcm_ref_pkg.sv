// gcm_ref_pkg: reference models for the testbenches, written independently of
// the RTL. The S-box is computed (multiplicative inverse in GF(2^8) followed by
// the affine map), AES-256 follows the textbook word-by-word key expansion, and
// the GF(2^128) product is the bit-serial algorithm of the GCM specification.
package gcm_ref_pkg;

  function automatic logic [7:0] gmul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox_ref(input logic [7:0] a);
    logic [7:0] inv = 8'h00, s;
    logic [7:0] c = 8'h63;
    if (a != 0) begin
      inv = 8'h01;
      for (int i = 0; i < 254; i++) inv = gmul8(inv, a);   // a^254 = a^-1
    end
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return s;
  endfunction

  // byte k of a block (k = 0 leftmost)
  function automatic logic [7:0] byte_of(input logic [127:0] b, input int k);
    return b[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int k = 0; k < 16; k++) o[127-8*k -: 8] = sbox_ref(byte_of(s, k));
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = byte_of(s, 4*((c+r)%4)+r);
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(input logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a[4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = byte_of(s, 4*c+r);
      o[127-32*c -: 8] = gmul8(a[0],2) ^ gmul8(a[1],3) ^ a[2] ^ a[3];
      o[119-32*c -: 8] = a[0] ^ gmul8(a[1],2) ^ gmul8(a[2],3) ^ a[3];
      o[111-32*c -: 8] = a[0] ^ a[1] ^ gmul8(a[2],2) ^ gmul8(a[3],3);
      o[103-32*c -: 8] = gmul8(a[0],3) ^ a[1] ^ a[2] ^ gmul8(a[3],2);
    end
    return o;
  endfunction

  function automatic logic [31:0] ref_sub_word(input logic [31:0] w);
    return {sbox_ref(w[31:24]), sbox_ref(w[23:16]), sbox_ref(w[15:8]), sbox_ref(w[7:0])};
  endfunction

  // round key r (0..14) of AES-256
  function automatic logic [127:0] ref_round_key(input logic [255:0] key, input int r);
    logic [31:0] w[60];
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 8 == 0) begin
        t = ref_sub_word({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gmul8(rc, 8'h02);
      end else if (i % 8 == 4) t = ref_sub_word(t);
      w[i] = w[i-8] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] aes256_ref(input logic [255:0] key, input logic [127:0] pt);
    logic [127:0] s = pt ^ ref_round_key(key, 0);
    for (int r = 1; r < 14; r++)
      s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ ref_round_key(key, r);
    s = ref_shift_rows(ref_sub_bytes(s)) ^ ref_round_key(key, 14);
    return s;
  endfunction

  // bit-serial GF(2^128) product, x_0 = bit 127
  function automatic logic [127:0] gfmul_ref(input logic [127:0] x, input logic [127:0] y);
    logic [127:0] z = '0, v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
