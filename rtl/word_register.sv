// word_register: the data register of the scrambler link. On the transmit
// side it holds the plain text word, on the receive side the crypto word, and
// the scrambler and descrambler also use it as the output register of their
// pipelined form.
//
// How it works: a W-bit register that takes a new word on every clock edge at
// which d_valid is high and otherwise keeps its word. Two one-bit side flags
// travel with the word: q_valid says the register holds a word taken in the
// previous cycle, q_sync that this word opens a frame (the key generators are
// reseeded on it).
//
// Interface and timing: one clock of latency from d to q. Reset (asynchronous,
// active low) clears the word and both flags.
//
// The plain text and crypto word registers are part of the design; the valid
// and frame-start flags and the reset are this design's own choices.
module word_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         d_valid,
  input  logic         d_sync,
  output logic [W-1:0] q,
  output logic         q_valid,
  output logic         q_sync
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
      q_sync  <= 1'b0;
    end else begin
      q_valid <= d_valid;
      q_sync  <= d_valid & d_sync;
      if (d_valid) q <= d;
    end
  end

endmodule
