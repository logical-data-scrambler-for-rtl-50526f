// scrambler: additive (synchronous) data scrambler, W bits per clock.
//
// How it works: each plain text word D0..D(W-1) is taken into the plain text
// register and XORed bit by bit with W key bits from the PN generator
// (pn_lfsr); the result is the crypto word. The generator advances W bit
// steps for every valid word, so the bits are keyed exactly as a serial
// scrambler would key D0, D1, ... in turn. A word flagged with din_sync opens
// a frame: it is keyed from the seed, which lets the descrambler fall into
// step with the scrambler.
//
// Two forms, chosen by PIPELINE:
//   PIPELINE = 0  The key word is worked out from the generator's register in
//                 the same cycle as the XOR; dout is combinational from the
//                 plain text register. Latency 1 clock.
//   PIPELINE = 1  The key word is worked out one cycle earlier, while the
//                 plain text word is being registered, and held in a key
//                 register; the XOR result is registered again. Key generation
//                 and the XOR sit in different clock cycles, which shortens
//                 the critical path. Latency 2 clocks.
// Both forms accept one word every clock (throughput W bits per clock).
//
// Interface: din/din_valid/din_sync in; dout/dout_valid/dout_sync out, the
// flags delayed with the word. din_sync is only honoured with din_valid.
// Reset is asynchronous, active low.
//
// The XOR of the plain text with the LFSR output, the 8-bit word and the two
// forms with and without pipelining follow the design; the frame-start
// reseeding, the valid flag and the exact position of the pipeline register
// are this design's own choices.
module scrambler
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

  logic [W-1:0] plain_q;
  logic         plain_valid;
  logic         plain_sync;
  logic [W-1:0] key;
  logic         lfsr_advance;
  logic         lfsr_reseed;

  // Plain text register.
  word_register #(.W(W)) u_plain (
    .clk, .rst_n,
    .d(din), .d_valid(din_valid), .d_sync(din_sync),
    .q(plain_q), .q_valid(plain_valid), .q_sync(plain_sync)
  );

  pn_lfsr #(.W(W), .N(N), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n,
    .advance(lfsr_advance), .reseed(lfsr_reseed), .keystream(key)
  );

  if (PIPELINE) begin : g_pipe
    logic [W-1:0] key_q;

    // Key generation runs alongside the plain text register.
    assign lfsr_advance = din_valid;
    assign lfsr_reseed  = din_valid & din_sync;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         key_q <= '0;
      else if (din_valid) key_q <= key;
    end

    // Output (crypto word) register.
    word_register #(.W(W)) u_out (
      .clk, .rst_n,
      .d(plain_q ^ key_q), .d_valid(plain_valid), .d_sync(plain_sync),
      .q(dout), .q_valid(dout_valid), .q_sync(dout_sync)
    );
  end else begin : g_flat
    assign lfsr_advance = plain_valid;
    assign lfsr_reseed  = plain_valid & plain_sync;

    assign dout       = plain_q ^ key;
    assign dout_valid = plain_valid;
    assign dout_sync  = plain_sync;
  end

  // A frame start is a property of a word: it needs a valid word.
  a_sync_needs_valid : assert property (
    @(posedge clk) disable iff (!rst_n) din_sync |-> din_valid
  ) else $error("scrambler: din_sync without din_valid");

endmodule
