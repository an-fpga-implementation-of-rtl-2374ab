// siphash_core -- SipHash-C-D core with AXI-Stream input and output.
//
// The core hashes messages that arrive as 64-bit little-endian words on a
// slave AXI-Stream port, one word per beat, with TLAST on the last word of
// each message. The message must arrive already padded: the last word holds
// the final (length mod 8) bytes, zero bytes, and the length mod 256 in its
// top byte. Because the message end is taken from TLAST alone, messages of
// any length are hashed without configuration.
//
// Inside, siphash_compress absorbs one word per cycle through C_ROUNDS
// combinational SipRounds, and siphash_finalize runs the completed state
// through a D_ROUNDS-stage SipRound pipeline into the output hash register.
// The input is never stalled: s_axis_tready is high whenever the core is out
// of reset, so a message of w words occupies the input for w cycles and the
// next message may start on the following cycle.
//
// The hash leaves on a master AXI-Stream port (one beat, TLAST always high)
// and on hash_o / hash_valid_o for the register block. The output is not
// back-pressured: the core assumes every hash is read before the next one
// replaces it. m_axis_tvalid stays high until the beat is taken or a newer
// hash overwrites the data; an unread hash is lost in that case.
//
// Timing: the hash of a message appears on hash_o and m_axis_tdata
// D_ROUNDS + 1 cycles after the clock edge that took its TLAST beat.
// srst is a synchronous active-high reset (bus reset or soft reset).
//
// The key inputs k0/k1 are sampled on the first word of each message.
module siphash_core
  import siphash_pkg::*;
#(
  parameter int unsigned C_ROUNDS = 2,
  parameter int unsigned D_ROUNDS = 4
) (
  input  logic  clk,
  input  logic  srst,
  input  word_t k0,
  input  word_t k1,
  // message input stream
  input  word_t s_axis_tdata,
  input  logic  s_axis_tvalid,
  input  logic  s_axis_tlast,
  output logic  s_axis_tready,
  // hash output stream
  output word_t m_axis_tdata,
  output logic  m_axis_tvalid,
  output logic  m_axis_tlast,
  input  logic  m_axis_tready,
  // last hash, for the register block
  output word_t hash_o,
  output logic  hash_valid_o
);

  state_t state;
  logic   comp_done;
  logic   beat;
  logic   out_valid_q;

  assign s_axis_tready = !srst;
  assign beat          = s_axis_tvalid && s_axis_tready;

  siphash_compress #(.C_ROUNDS(C_ROUNDS)) u_compress (
    .clk        (clk),
    .srst       (srst),
    .k0         (k0),
    .k1         (k1),
    .word_i     (s_axis_tdata),
    .word_valid (beat),
    .word_last  (s_axis_tlast),
    .state_o    (state),
    .done_o     (comp_done)
  );

  siphash_finalize #(.D_ROUNDS(D_ROUNDS)) u_finalize (
    .clk          (clk),
    .srst         (srst),
    .state_i      (state),
    .start_i      (comp_done),
    .hash_o       (hash_o),
    .hash_valid_o (hash_valid_o)
  );

  // output stream valid: set by a new hash, cleared when the beat is taken
  always_ff @(posedge clk) begin
    if (srst)
      out_valid_q <= 1'b0;
    else if (m_axis_tvalid && m_axis_tready)
      out_valid_q <= 1'b0;
    else if (hash_valid_o)
      out_valid_q <= 1'b1;
  end

  // A new hash is announced by hash_valid_o in the cycle it appears; the
  // stream beat is offered from that cycle on.
  assign m_axis_tvalid = out_valid_q || hash_valid_o;
  assign m_axis_tdata  = hash_o;
  assign m_axis_tlast  = 1'b1;

  // AXI-Stream: once offered, a beat stays offered until it is taken.
  a_out_hold : assert property (@(posedge clk) disable iff (srst)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid);

endmodule
