// scrambler_pkg: constants shared by the PN generator, the scrambler, the
// descrambler and the link top.
//
// The word width of eight bits (D0..D7) and the use of an LFSR whose output is
// XORed onto the data are the design's defining figures. The register length,
// tap set and seed are this design's own choice: the default is the 16-stage
// generator 1 + x + x^3 + x^12 + x^16 with an all-ones seed, the frame-
// synchronous scrambler of the OTN payload (ITU-T G.709), the protocol this
// scrambler is aimed at.
package scrambler_pkg;

  // Width of one plain text / crypto word: D0..D7.
  localparam int unsigned DATA_W = 8;

  // Number of shift register stages (N in the tap notation a1..aN).
  localparam int unsigned LFSR_N = 16;

  // Tap vector a1..aN: bit i-1 set means stage i feeds the modulo-2 adder
  // chain. Stages 1, 3, 12 and 16 give 1 + x + x^3 + x^12 + x^16.
  localparam logic [LFSR_N-1:0] LFSR_TAPS = 16'h8805;

  // Register contents loaded at reset and at every frame start.
  localparam logic [LFSR_N-1:0] LFSR_SEED = 16'hFFFF;

endpackage
