// scrambler_link: the complete scrambler/descrambler pair.
//
// What it does: plain text words enter the scrambler, which XORs each word
// with the output of its PN generator and sends out the crypto word. The
// crypto word goes straight into the descrambler, whose identical PN
// generator, started from the same seed at the same frame start, removes the
// key again, so plain_out repeats plain_in after the latency of both halves.
// The crypto word is also brought out, as it would be sent over the line.
//
// Interface and timing: one W-bit word per clock. plain_valid marks clocks
// that carry a word; frame_start (only with plain_valid) reseeds both key
// generators on that word. Latency from plain_in to crypto_out is 1 clock
// without pipelining and 2 with it; plain_in to plain_out is twice that. The
// clock comes from outside (a clock generator is not part of the logic).
// Reset is asynchronous, active low.
//
// The pairing of scrambler and descrambler over a direct crypto-word
// connection follows the design; the frame-start signalling is this design's
// own choice.
module scrambler_link
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
  // Plain text in
  input  logic [W-1:0] plain_in,
  input  logic         plain_valid,
  input  logic         frame_start,
  // Crypto word as sent over the line
  output logic [W-1:0] crypto_out,
  output logic         crypto_valid,
  output logic         crypto_sync,
  // Recovered plain text
  output logic [W-1:0] plain_out,
  output logic         plain_out_valid,
  output logic         plain_out_sync
);

  scrambler #(.W(W), .PIPELINE(PIPELINE), .N(N), .TAPS(TAPS), .SEED(SEED)) u_scrambler (
    .clk, .rst_n,
    .din(plain_in), .din_valid(plain_valid), .din_sync(frame_start),
    .dout(crypto_out), .dout_valid(crypto_valid), .dout_sync(crypto_sync)
  );

  descrambler #(.W(W), .PIPELINE(PIPELINE), .N(N), .TAPS(TAPS), .SEED(SEED)) u_descrambler (
    .clk, .rst_n,
    .din(crypto_out), .din_valid(crypto_valid), .din_sync(crypto_sync),
    .dout(plain_out), .dout_valid(plain_out_valid), .dout_sync(plain_out_sync)
  );

endmodule
