// siphash_ref_pkg -- software reference model of SipHash-c-d for the testbenches.
//
// Written directly from the SipHash definition, without using any RTL type or
// module, so that the testbenches compare the hardware against an
// independent model: a byte message is padded into 64-bit little-endian
// words (last word: remaining bytes, zero bytes, length mod 256 in the top
// byte), the state is initialised from the key, each word m is absorbed as
// v3 ^= m, c rounds, v0 ^= m, then v2 ^= 0xff, d rounds, and the hash is
// v0 ^ v1 ^ v2 ^ v3. Two published SipHash-2-4 vectors (key 00..0f, empty
// message and message 00..0e) are provided to check the model itself.
package siphash_ref_pkg;

  typedef logic [63:0] u64;
  typedef u64  st_t [4];
  typedef byte unsigned bytes_t [$];
  typedef u64  words_t [$];

  localparam u64 KAT_K0         = 64'h0706050403020100;
  localparam u64 KAT_K1         = 64'h0f0e0d0c0b0a0908;
  localparam u64 KAT_EMPTY_24   = 64'h726fdb47dd0e0e31;  // message of 0 bytes
  localparam u64 KAT_15BYTES_24 = 64'ha129ca6149be45e5;  // message 00 01 .. 0e

  function automatic u64 rol(u64 x, int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  function automatic st_t ref_round(st_t v);
    st_t r = v;
    r[0] = r[0] + r[1]; r[1] = rol(r[1], 13); r[1] ^= r[0]; r[0] = rol(r[0], 32);
    r[2] = r[2] + r[3]; r[3] = rol(r[3], 16); r[3] ^= r[2];
    r[0] = r[0] + r[3]; r[3] = rol(r[3], 21); r[3] ^= r[0];
    r[2] = r[2] + r[1]; r[1] = rol(r[1], 17); r[1] ^= r[2]; r[2] = rol(r[2], 32);
    return r;
  endfunction

  function automatic st_t ref_init(u64 k0, u64 k1);
    st_t v;
    v[0] = k0 ^ 64'h736f6d6570736575;
    v[1] = k1 ^ 64'h646f72616e646f6d;
    v[2] = k0 ^ 64'h6c7967656e657261;
    v[3] = k1 ^ 64'h7465646279746573;
    return v;
  endfunction

  function automatic st_t ref_absorb(st_t v, u64 m, int c);
    st_t r = v;
    r[3] ^= m;
    for (int i = 0; i < c; i++) r = ref_round(r);
    r[0] ^= m;
    return r;
  endfunction

  function automatic u64 ref_final(st_t v, int d);
    st_t r = v;
    r[2] ^= 64'hff;
    for (int i = 0; i < d; i++) r = ref_round(r);
    return r[0] ^ r[1] ^ r[2] ^ r[3];
  endfunction

  // Pad a byte message into ceil((len+1)/8) little-endian words.
  function automatic words_t ref_pad(bytes_t msg);
    words_t w;
    int     n = msg.size();
    for (int i = 0; i < n / 8 + 1; i++) begin
      u64 x = '0;
      for (int b = 0; b < 8; b++)
        if (8 * i + b < n) x[8*b +: 8] = msg[8*i + b];
      w.push_back(x);
    end
    w[w.size()-1][63:56] = 8'(n);
    return w;
  endfunction

  function automatic u64 ref_hash_words(words_t w, u64 k0, u64 k1, int c, int d);
    st_t v = ref_init(k0, k1);
    foreach (w[i]) v = ref_absorb(v, w[i], c);
    return ref_final(v, d);
  endfunction

  function automatic u64 ref_hash(bytes_t msg, u64 k0, u64 k1, int c, int d);
    return ref_hash_words(ref_pad(msg), k0, k1, c, d);
  endfunction

  // message 00 01 02 .. (n-1) mod 256
  function automatic bytes_t ref_counting_msg(int n);
    bytes_t m;
    for (int i = 0; i < n; i++) m.push_back(8'(i));
    return m;
  endfunction

  function automatic bytes_t ref_random_msg(int n);
    bytes_t m;
    for (int i = 0; i < n; i++) m.push_back(8'($urandom));
    return m;
  endfunction

endpackage
