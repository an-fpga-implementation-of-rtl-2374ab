// siphash_finalize -- finalization pipeline of SipHash-C-D.
//
// When start_i is high, the compressed state on state_i enters the pipeline:
// 0xFF is xored into v2, then the state passes through D_ROUNDS stages, each
// one SipRound followed by a 256-bit register. The four words leaving the last
// stage are xored together and the 64-bit result is stored in the output hash
// register. A valid bit travels beside the data so that the output register
// only loads real hashes; it keeps its value otherwise.
//
// The pipeline accepts a new state every cycle, so a new message may end in
// every cycle without stalling anything.
//
// Timing: the edge that samples start_i high loads the first stage; the
// output register loads the hash D_ROUNDS edges later, i.e. hash_o and
// hash_valid_o change D_ROUNDS cycles after the start cycle's edge, and
// hash_valid_o is high for the one cycle that follows that load. Inside the
// core start_i comes one cycle after the last word, so a hash appears
// D_ROUNDS + 1 cycles after its last word was taken. srst is a synchronous active-high reset that clears the valid bits
// and the hash register.
//
// One register per SipRound and the output register after the xor follow the
// published architecture of this accelerator; the valid bits are this design's way of
// letting the output register "only latch valid hashes".
module siphash_finalize
  import siphash_pkg::*;
#(
  parameter int unsigned D_ROUNDS = 4
) (
  input  logic   clk,
  input  logic   srst,
  input  state_t state_i,
  input  logic   start_i,
  output word_t  hash_o,
  output logic   hash_valid_o
);

  state_t head;          // compressed state with 0xFF xored into v2
  word_t  hash_q;
  logic   hash_valid_q;

  always_comb begin
    head     = state_i;
    head.v2 ^= FINAL_XOR;
  end

  // stage i: SipRound on the previous stage's register, then a register
  for (genvar i = 0; i < D_ROUNDS; i++) begin : g_stage
    state_t r_in, r_out, q;
    logic   v_in, vq;
    if (i == 0) begin : g_head
      assign r_in = head;
      assign v_in = start_i;
    end else begin : g_chain
      assign r_in = g_stage[i-1].q;
      assign v_in = g_stage[i-1].vq;
    end

    sipround u_round (.state_i(r_in), .state_o(r_out));

    always_ff @(posedge clk) begin
      if (srst) begin
        vq <= 1'b0;
        q  <= '0;
      end else begin
        vq <= v_in;
        q  <= r_out;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      hash_q       <= '0;
      hash_valid_q <= 1'b0;
    end else begin
      hash_valid_q <= g_stage[D_ROUNDS-1].vq;
      if (g_stage[D_ROUNDS-1].vq)
        hash_q <= g_stage[D_ROUNDS-1].q.v0 ^ g_stage[D_ROUNDS-1].q.v1
                ^ g_stage[D_ROUNDS-1].q.v2 ^ g_stage[D_ROUNDS-1].q.v3;
    end
  end

  assign hash_o       = hash_q;
  assign hash_valid_o = hash_valid_q;

endmodule
