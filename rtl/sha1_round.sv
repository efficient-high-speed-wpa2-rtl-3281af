// sha1_round: one registered round t of the unrolled SHA-1 pipeline.
//
// Each stage holds the five working words A..E, a 16-word message-schedule
// window W_t..W_{t+15} and the pre-added sum E + K_t + W_t. The stage
// computes the new A as rol5(A) + f_t(B, C, D) + pre, passes A, rol30(B),
// C and D down to B..E, slides the window by one word (appending
// W_{t+16} = rol1(W_{t+13} ^ W_{t+8} ^ W_{t+2} ^ W_t)) and already adds the
// next round's E (today's D), K_{t+1} and W_{t+1}. Moving the E + K + W
// addition one stage ahead leaves a three-operand sum on the critical path
// instead of five; this split of the E-word addition follows the design,
// the exact grouping of the operands is this implementation's choice.
//
// Interface: the stage has no enable and no reset; the pipeline advances
// on every clock. Latency one cycle. ROUND selects f_t and K_t at
// elaboration time.
module sha1_round
  import sha1_pkg::*;
#(
  parameter int unsigned ROUND = 0
) (
  input  logic   clk,
  input  state_t in_state,   // A..E before round ROUND
  input  word_t  in_pre,     // E + K_ROUND + W_ROUND
  input  block_t in_w,       // W_ROUND .. W_ROUND+15, word 0 in bits [511:480]
  output state_t out_state,  // A..E after round ROUND
  output word_t  out_pre,    // E' + K_ROUND+1 + W_ROUND+1 (zero after round 79)
  output block_t out_w       // W_ROUND+1 .. W_ROUND+16
);

  word_t  w_next;
  state_t st_d;
  word_t  pre_d;

  always_comb begin
    w_next = rol(block_word(in_w, 13) ^ block_word(in_w, 8) ^ block_word(in_w, 2)
                 ^ block_word(in_w, 0), 1);
    st_d.a = rol(in_state.a, 5) + f_of(ROUND, in_state.b, in_state.c, in_state.d) + in_pre;
    st_d.b = in_state.a;
    st_d.c = rol(in_state.b, 30);
    st_d.d = in_state.c;
    st_d.e = in_state.d;
    if (ROUND + 1 < ROUNDS)
      pre_d = in_state.d + k_of(ROUND + 1) + block_word(in_w, 1);
    else
      pre_d = '0;
  end

  always_ff @(posedge clk) begin
    out_state <= st_d;
    out_pre   <= pre_d;
    out_w     <= {in_w[479:0], w_next};
  end

endmodule
