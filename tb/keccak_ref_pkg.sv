// keccak_ref_pkg: behavioural reference model of Keccak-f[1600], SHAKE-128,
// SHAKE-256 and Dilithium's ExpandA rejection sampler, for testbenches.
//
// Written from the FIPS 202 definition with the round constants and
// rotation offsets as literal tables (the RTL derives them by rule), so the
// two do not share a mistake. Byte order: state byte i is byte (i mod 8) of
// lane i/8, little-endian, as in the sponge construction.
package keccak_ref_pkg;

  typedef logic [63:0] lane_t;
  typedef byte unsigned bytes_q[$];

  localparam lane_t RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // rotation offset of lane x+5y
  localparam int ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic lane_t rol(lane_t v, int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic void keccak_f(ref lane_t s[25]);
    lane_t c[5], d[5], b[25];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = s[x] ^ s[x+5] ^ s[x+10] ^ s[x+15] ^ s[x+20];
      for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
      for (int i = 0; i < 25; i++) s[i] ^= d[i%5];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          b[y + 5*((2*x+3*y)%5)] = rol(s[x+5*y], ROT[x+5*y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          s[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5+5*y] & b[(x+2)%5+5*y]);
      s[0] ^= RC[r];
    end
  endfunction

  function automatic byte unsigned get_byte(const ref lane_t s[25], int i);
    return s[i/8][8*(i%8) +: 8];
  endfunction

  function automatic void xor_byte(ref lane_t s[25], input int i, input byte unsigned b);
    s[i/8][8*(i%8) +: 8] ^= b;
  endfunction

  // SHAKE with the given rate in bytes (168: SHAKE-128, 136: SHAKE-256)
  function automatic bytes_q shake(int rate, bytes_q msg, int outlen);
    lane_t s[25];
    bytes_q out;
    int pos;
    foreach (s[i]) s[i] = '0;
    pos = 0;
    foreach (msg[i]) begin
      xor_byte(s, pos, msg[i]);
      pos++;
      if (pos == rate) begin keccak_f(s); pos = 0; end
    end
    xor_byte(s, pos, 8'h1F);
    xor_byte(s, rate-1, 8'h80);
    keccak_f(s);
    pos = 0;
    for (int k = 0; k < outlen; k++) begin
      if (pos == rate) begin keccak_f(s); pos = 0; end
      out.push_back(get_byte(s, pos));
      pos++;
    end
    return out;
  endfunction

  // Dilithium ExpandA entry (i, j): 256 coefficients below q from
  // SHAKE-128(rho || j || i), three bytes per 23-bit candidate
  function automatic void expand_poly(bytes_q rho, int i, int j, output int unsigned coef[256]);
    bytes_q m, st;
    int k, p;
    m = rho;
    m.push_back(byte'(j));
    m.push_back(byte'(i));
    st = shake(168, m, 168*8);
    k = 0; p = 0;
    while (k < 256) begin
      int unsigned t;
      t = {st[p+2][6:0], st[p+1], st[p]};
      p += 3;
      if (t < 8380417) begin coef[k] = t; k++; end
    end
  endfunction
endpackage
