// siphash_pkg -- types and constants shared by the SipHash-C-D accelerator.
//
// The internal state of SipHash is four 64-bit words v0..v3. It is carried
// between modules as the packed struct state_t. The four initialization
// constants c0..c3 are the ASCII string "somepseudorandomlygeneratedbytes"
// split into 64-bit words; each is xored with one half of the 128-bit key
// (k0 = low 64 bits, k1 = high 64 bits) to form the initial state:
//   v0 = k0 ^ c0, v1 = k1 ^ c1, v2 = k0 ^ c2, v3 = k1 ^ c3.
// FINAL_XOR is the constant folded into v2 before the finalization rounds.
package siphash_pkg;

  typedef logic [63:0] word_t;

  typedef struct packed {
    word_t v0;
    word_t v1;
    word_t v2;
    word_t v3;
  } state_t;

  localparam word_t C0 = 64'h736f6d6570736575;
  localparam word_t C1 = 64'h646f72616e646f6d;
  localparam word_t C2 = 64'h6c7967656e657261;
  localparam word_t C3 = 64'h7465646279746573;

  localparam word_t FINAL_XOR = 64'h00000000000000ff;

  // Initial state for key {k1, k0}.
  function automatic state_t init_state(word_t k0, word_t k1);
    state_t s;
    s.v0 = k0 ^ C0;
    s.v1 = k1 ^ C1;
    s.v2 = k0 ^ C2;
    s.v3 = k1 ^ C3;
    return s;
  endfunction

endpackage
