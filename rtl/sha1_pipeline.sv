// sha1_pipeline: fully unrolled SHA-1 compression function, 83 stages deep.
//
// The stages are the ones the design names: a Buffer stage that registers
// the inputs (so that the multiplexers in front of the pipeline are not on
// the same path as round 0), an Initiate stage that loads A..E from the
// chaining value and pre-adds E + K_0 + W_0, the 80 round stages
// (sha1_round), and an Add stage that adds the chaining value back to the
// result (the SHA-1 feed-forward). The chaining value is not carried
// through the 81 stages between Buffer and Add; it travels in a block-RAM
// delay line (delay_line) next to the pipeline, the "FIFO" of the design.
//
// Interface: one compression per clock, no stalls, no valid bit (the
// controller knows which slot each output belongs to). in_chain and
// in_block are sampled on a rising edge; out_digest shows
// compress(in_chain, in_block) 83 cycles later: inputs presented in
// cycle k give their digest in cycle k + 83 (ROUNDS + 3 registers).
module sha1_pipeline
  import sha1_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  digest_t in_chain,
  input  block_t  in_block,
  output digest_t out_digest
);

  // Buffer stage.
  digest_t buf_chain;
  block_t  buf_block;

  always_ff @(posedge clk) begin
    buf_chain <= in_chain;
    buf_block <= in_block;
  end

  // Initiate stage, and the stage signals of the round chain: index t
  // holds the input of round t, index 80 the output of round 79.
  state_t st  [ROUNDS+1];
  word_t  pre [ROUNDS+1];
  block_t w   [ROUNDS+1];

  always_ff @(posedge clk) begin
    st[0]  <= to_state(buf_chain);
    pre[0] <= buf_chain[31:0] + k_of(0) + block_word(buf_block, 0);
    w[0]   <= buf_block;
  end

  for (genvar t = 0; t < ROUNDS; t++) begin : g_round
    sha1_round #(.ROUND(t)) u_round (
      .clk      (clk),
      .in_state (st[t]),
      .in_pre   (pre[t]),
      .in_w     (w[t]),
      .out_state(st[t+1]),
      .out_pre  (pre[t+1]),
      .out_w    (w[t+1])
    );
  end

  // FIFO: chaining value from the Buffer stage to the Add stage
  // (Initiate + 80 rounds = 81 cycles).
  digest_t h_delayed;

  delay_line #(.WIDTH(160), .DELAY(ROUNDS + 1)) u_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (buf_chain),
    .dout (h_delayed)
  );

  // Add stage.
  always_ff @(posedge clk) begin
    out_digest <= add_digest(h_delayed, st[ROUNDS]);
  end

endmodule
