// aes_ref_pkg -- behavioural single-rail AES-128 reference for the testbenches.
// Written independently of the dual-rail RTL: the S-box is found by searching
// for the multiplicative inverse with a shift-and-add GF(2^8) multiplication,
// and the rounds follow the textbook description on a byte array. Byte 0 of a
// block is bits [127:120].
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = (a[7]) ? ((a << 1) ^ 8'h1B) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int c = 1; c < 256; c++)
      if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s;
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] v, int n);
    return v[127 - 8*n -: 8];
  endfunction

  function automatic logic [127:0] set_byte(logic [127:0] v, int n, logic [7:0] b);
    v[127 - 8*n -: 8] = b;
    return v;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    for (int n = 0; n < 16; n++) s = set_byte(s, n, sbox(get_byte(s, n)));
    return s;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o = set_byte(o, r + 4*c, get_byte(s, r + 4*((c + r) % 4)));
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c); a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o = set_byte(o, 4*c,   gmul(a0,2) ^ gmul(a1,3) ^ a2 ^ a3);
      o = set_byte(o, 4*c+1, a0 ^ gmul(a1,2) ^ gmul(a2,3) ^ a3);
      o = set_byte(o, 4*c+2, a0 ^ a1 ^ gmul(a2,2) ^ gmul(a3,3));
      o = set_byte(o, 4*c+3, gmul(a0,3) ^ a1 ^ a2 ^ gmul(a3,2));
    end
    return o;
  endfunction

  function automatic logic [7:0] rcon(int r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = gmul(v, 8'h02);
    return v;
  endfunction

  // Round key r+1 from round key r (r counted from 0).
  function automatic logic [127:0] next_key(logic [127:0] k, int r);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    t[31:24] ^= rcon(r + 1);
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  // State after round r (r = 0: initial AddRoundKey).
  function automatic logic [127:0] state_after(logic [127:0] pt, logic [127:0] key, int rounds);
    logic [127:0] s, k;
    s = pt ^ key; k = key;
    for (int r = 1; r <= rounds; r++) begin
      k = next_key(k, r - 1);
      s = shift_rows(sub_bytes(s));
      if (r != 10) s = mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    return state_after(pt, key, 10);
  endfunction

endpackage
