// siphash_compress -- initialization and compression loop of SipHash-C-D.
//
// Each clock cycle in which word_valid is high, one 64-bit little-endian
// message word m is absorbed into the state:
//   v  = first ? init_state(k0, k1) : state register   (input multiplexers)
//   v3 ^= m;  C x SipRound;  v0 ^= m;                   (all combinational)
//   state register <= v
// so the C SipRounds form one combinational loop around the four 64-bit state
// registers and one word is taken per cycle with no bubbles. The multiplexers
// pick the key-derived initial state for the first word of a message and the
// register contents for every later word. "first" is held in a flag that is
// set by reset and by a word flagged word_last, and cleared by any other word,
// so the message boundary is given only by word_last; messages can follow each
// other back to back.
//
// The last word of a message must already be padded as SipHash requires
// (remaining bytes, zero bytes, length mod 256 in the top byte); this block
// does not pad.
//
// Timing: state_o is the registered state. done_o is high for exactly one
// cycle, the cycle after the last word of a message was taken; during that
// cycle state_o holds the fully compressed state, which the finalization
// pipeline must sample then, because the next message may overwrite it on the
// following edge. srst is a synchronous active-high reset.
//
// The structure (input multiplexers, m xored into v3 before and into v0 after
// the rounds, registers after the C rounds) follows the published
// architecture of this accelerator; the reset values and the first-word flag are this design's own
// choices.
module siphash_compress
  import siphash_pkg::*;
#(
  parameter int unsigned C_ROUNDS = 2
) (
  input  logic   clk,
  input  logic   srst,
  input  word_t  k0,
  input  word_t  k1,
  input  word_t  word_i,
  input  logic   word_valid,
  input  logic   word_last,
  output state_t state_o,
  output logic   done_o
);

  state_t state_q;
  logic   first_q;
  logic   done_q;

  state_t first_in;   // multiplexer output with m xored into v3
  state_t next_state; // after the rounds, with m xored into v0

  // input multiplexer and pre-round xor of m into v3
  always_comb begin
    first_in     = first_q ? init_state(k0, k1) : state_q;
    first_in.v3 ^= word_i;
  end

  // C_ROUNDS SipRounds in series, all within one clock cycle
  for (genvar i = 0; i < C_ROUNDS; i++) begin : g_round
    state_t r_in, r_out;
    if (i == 0) begin : g_head
      assign r_in = first_in;
    end else begin : g_chain
      assign r_in = g_round[i-1].r_out;
    end
    sipround u_round (.state_i(r_in), .state_o(r_out));
  end

  // post-round xor of m into v0
  always_comb begin
    next_state     = g_round[C_ROUNDS-1].r_out;
    next_state.v0 ^= word_i;
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      state_q <= '0;
      first_q <= 1'b1;
      done_q  <= 1'b0;
    end else begin
      done_q <= word_valid && word_last;
      if (word_valid) begin
        state_q <= next_state;
        first_q <= word_last;
      end
    end
  end

  assign state_o = state_q;
  assign done_o  = done_q;

endmodule
