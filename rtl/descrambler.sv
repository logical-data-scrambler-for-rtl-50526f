// descrambler: additive (synchronous) data descrambler, W bits per clock.
//
// How it works: the mirror image of the scrambler. Each crypto word is taken
// into the crypto word register and XORed bit by bit with W key bits from a
// PN generator (pn_lfsr) identical to the scrambler's. Because XOR undoes
// itself, the output is the original plain text as long as both generators are
// in the same state for the same word. That is arranged by the frame-start
// flag: the word flagged with din_sync is keyed from the seed at both ends,
// and both generators advance W bit steps per valid word from there on.
//
// Two forms, chosen by PIPELINE, as in the scrambler:
//   PIPELINE = 0  key word and XOR in the same cycle, dout combinational
//                 from the crypto word register. Latency 1 clock.
//   PIPELINE = 1  key word registered one cycle ahead, XOR result registered.
//                 Latency 2 clocks.
// Both accept one word per clock.
//
// Interface: din/din_valid/din_sync carry the crypto word and its flags in;
// dout/dout_valid/dout_sync carry the recovered plain text out. Reset is
// asynchronous, active low.
//
// The XOR of the crypto word with an identical LFSR and the 8-bit word follow
// the design; the frame-start reseeding, the valid flag and the pipeline
// register positions are this design's own choices.
module descrambler
  import scrambler_pkg::*;
#(
  parameter int unsigned       W        = DATA_W,
  parameter bit                PIPELINE = 1'b1,
  parameter int unsigned       N        = LFSR_N,
  parameter logic [LFSR_N-1:0] TAPS     = LFSR_TAPS,
  parameter logic [LFSR_N-1:0] SEED     = LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  input  logic         din_sync,
  output logic [W-1:0] dout,
  output logic         dout_valid,
  output logic         dout_sync
);

  logic [W-1:0] crypto_q;
  logic         crypto_valid;
  logic         crypto_sync;
  logic [W-1:0] key;
  logic         lfsr_advance;
  logic         lfsr_reseed;

  // Crypto word register.
  word_register #(.W(W)) u_crypto (
    .clk, .rst_n,
    .d(din), .d_valid(din_valid), .d_sync(din_sync),
    .q(crypto_q), .q_valid(crypto_valid), .q_sync(crypto_sync)
  );

  pn_lfsr #(.W(W), .N(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n,
    .advance(lfsr_advance), .reseed(lfsr_reseed), .keystream(key)
  );

  if (PIPELINE) begin : g_pipe
    logic [W-1:0] key_q;

    assign lfsr_advance = din_valid;
    assign lfsr_reseed  = din_valid & din_sync;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         key_q <= '0;
      else if (din_valid) key_q <= key;
    end

    // Output (recovered plain text) register.
    word_register #(.W(W)) u_out (
      .clk, .rst_n,
      .d(crypto_q ^ key_q), .d_valid(crypto_valid), .d_sync(crypto_sync),
      .q(dout), .q_valid(dout_valid), .q_sync(dout_sync)
    );
  end else begin : g_flat
    assign lfsr_advance = crypto_valid;
    assign lfsr_reseed  = crypto_valid & crypto_sync;

    assign dout       = crypto_q ^ key;
    assign dout_valid = crypto_valid;
    assign dout_sync  = crypto_sync;
  end

  a_sync_needs_valid : assert property (
    @(posedge clk) disable iff (!rst_n) din_sync |-> din_valid
  ) else $error("descrambler: din_sync without din_valid");

endmodule
