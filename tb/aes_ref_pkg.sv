// aes_ref_pkg - reference model used by the testbenches to work out
// expected values independently of the RTL.
//
// The S-box table is generated with the multiply-by-3 / divide-by-3 walk
// over GF(2^8): p runs through all non-zero field elements as powers of the
// generator 03 while q runs through their inverses, and S(p) is q passed
// through the affine map written as q ^ rotl(q,1..4) ^ 63. This is a
// different construction from the RTL (which inverts by exponentiation and
// applies the affine matrix row by row). The cipher itself is modelled on
// byte arrays, with all eleven round keys expanded ahead of time and the
// inverse cipher using them in reverse order, so decryption is checked
// without the RTL's backward key walk. The LFSR model steps one bit at a
// time from an explicit list of tap positions.
package aes_ref_pkg;

  typedef logic [7:0] bytes_t [16];

  logic [7:0] sbox_tab [256];
  logic [7:0] isbox_tab [256];

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic void init();
    logic [7:0] p, q, x;
    p = 8'h01;
    q = 8'h01;
    do begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);   // p *= 3
      q = q ^ (q << 1);                             // q /= 3
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      sbox_tab[p] = x ^ 8'h63;
    end while (p != 8'h01);
    sbox_tab[0] = 8'h63;
    for (int i = 0; i < 256; i++) isbox_tab[sbox_tab[i]] = 8'(i);
  endfunction

  // GF(2^8) product by repeated doubling of b.
  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, bb;
    r  = 0;
    bb = b;
    for (int i = 0; i < 8; i++) begin
      if (a[i]) r ^= bb;
      bb = bb[7] ? ((bb << 1) ^ 8'h1b) : (bb << 1);
    end
    return r;
  endfunction

  function automatic bytes_t to_bytes(input logic [127:0] b);
    bytes_t o;
    for (int i = 0; i < 16; i++) o[i] = b[127-8*i -: 8];
    return o;
  endfunction

  function automatic logic [127:0] from_bytes(input bytes_t s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = s[i];
    return o;
  endfunction

  function automatic logic [127:0] sub(input logic [127:0] b, input bit inv);
    bytes_t s = to_bytes(b);
    for (int i = 0; i < 16; i++) s[i] = inv ? isbox_tab[s[i]] : sbox_tab[s[i]];
    return from_bytes(s);
  endfunction

  // Row r, column c is byte 4c+r; rotate rows left (or right when inv).
  function automatic logic [127:0] shift(input logic [127:0] b, input bit inv);
    bytes_t s = to_bytes(b);
    bytes_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[4*c + r] = s[4*((c + r) & 3) + r];
        else      o[4*((c + r) & 3) + r] = s[4*c + r];
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] mix(input logic [127:0] b, input bit inv);
    logic [7:0] m [4][4];
    bytes_t s = to_bytes(b);
    bytes_t o;
    m = inv ? '{'{8'h0e, 8'h0b, 8'h0d, 8'h09}, '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                '{8'h0d, 8'h09, 8'h0e, 8'h0b}, '{8'h0b, 8'h0d, 8'h09, 8'h0e}}
            : '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 0;
        for (int k = 0; k < 4; k++) o[4*c + r] ^= mul(m[r][k], s[4*c + k]);
      end
    return from_bytes(o);
  endfunction

  // All 44 key words; round key r is words 4r..4r+3.
  function automatic void expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub(s, 0), 0);
      if (r != 10) s = mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub(shift(s, 1), 1) ^ rk[r];
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  // n steps of a Fibonacci LFSR: shift left, feed in the XOR of the bits at
  // the 1-based tap positions 128, 126, 101 and 99.
  function automatic logic [127:0] lfsr(input logic [127:0] s_in, input int n);
    logic [127:0] s = s_in;
    for (int i = 0; i < n; i++) s = {s[126:0], s[127] ^ s[125] ^ s[100] ^ s[98]};
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
