// pn_lfsr: pseudo-noise key generator for the additive scrambler and
// descrambler.
//
// How it works: an N-stage shift register. In one bit step the stages selected
// by the tap vector a1..aN are summed modulo 2; that sum is the key bit K for
// the current data bit and is also shifted into stage 1 while every stage moves
// one place towards stage N. Serial processing would take one such step per
// data bit (D0, then D1, ... D7). Here the W steps are unrolled, so a whole
// word of key bits is produced per clock: keystream[0] keys D0,
// keystream[W-1] keys D7.
//
// Interface and timing:
//   advance  - on the clock edge the register moves W bit steps ahead.
//   reseed   - the current word is keyed from SEED instead of the register,
//              and the register continues from there; used at frame start so
//              that both ends of a link start from the same state.
//   keystream- combinational, from the register (or SEED when reseed is high)
//              as it stands in the current cycle.
// Reset (asynchronous, active low) loads SEED.
//
// The LFSR and its XOR-with-data role follow the design; the register length,
// taps, seed, word-parallel unrolling, reseed input and reset are this
// design's own choices.
module pn_lfsr
  import scrambler_pkg::*;
#(
  parameter int unsigned       W    = DATA_W,
  parameter int unsigned       N    = LFSR_N,
  parameter logic [LFSR_N-1:0] TAPS = LFSR_TAPS,
  parameter logic [LFSR_N-1:0] SEED = LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,
  input  logic         reseed,
  output logic [W-1:0] keystream
);

  logic [N-1:0] state_q;
  logic [N-1:0] base;
  logic [N-1:0] walk;
  logic [N-1:0] state_d;
  logic [N-1:0] taps_n;
  logic [N-1:0] seed_n;

  assign taps_n = TAPS[N-1:0];
  assign seed_n = SEED[N-1:0];
  assign base   = reseed ? seed_n : state_q;

  // W unrolled bit steps: K = sum of a_i * s_i, then shift K into stage 1.
  always_comb begin
    logic k;
    walk = base;
    for (int unsigned j = 0; j < W; j++) begin
      k            = ^(walk & taps_n);
      keystream[j] = k;
      walk         = {walk[N-2:0], k};
    end
  end

  always_comb begin
    if (advance)     state_d = walk;
    else if (reseed) state_d = seed_n;
    else             state_d = state_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= seed_n;
    else        state_q <= state_d;
  end

endmodule
