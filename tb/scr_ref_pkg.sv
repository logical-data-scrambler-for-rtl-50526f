// scr_ref_pkg: reference model for the testbenches of the scrambler link.
//
// pn_ref is a bit-serial model of the PN generator, written independently of
// the word-parallel RTL: it keeps the stages s1..sN in an unpacked array, and
// one call of step() forms K = s1 ^ s3 ^ s12 ^ s16 (the tap list is given as
// stage numbers) and shifts K into s1. word() calls step() once per data bit,
// D0 first, exactly as a serial scrambler would key D0, D1, ... in turn.
package scr_ref_pkg;

  class pn_ref;
    int unsigned n;
    int          taps[$];
    bit          s[];

    function new(int unsigned n_stages = 16);
      n    = n_stages;
      taps = '{1, 3, 12, 16};
      s    = new[n + 1];
      reseed();
    endfunction

    // All ones, as after reset or at a frame start.
    function void reseed();
      foreach (s[i]) s[i] = 1'b1;
    endfunction

    function bit step();
      bit k = 1'b0;
      foreach (taps[t]) k ^= s[taps[t]];
      for (int i = int'(n); i > 1; i--) s[i] = s[i-1];
      s[1] = k;
      return k;
    endfunction

    function logic [31:0] word(int unsigned w);
      logic [31:0] r = '0;
      for (int unsigned j = 0; j < w; j++) r[j] = step();
      return r;
    endfunction
  endclass

  // One expected output word with its flags.
  typedef struct {
    bit          valid;
    bit          sync;
    logic [31:0] data;
  } exp_t;

endpackage
