// mpm_pkg: constants shared by the prefix-based multi-pattern matcher.
//
// The matcher compares the k-character prefixes of N patterns with the M
// prefix windows that start in each group of M text characters, and only
// reads a pattern's remaining L-k characters (its body) from a pattern RAM
// when its prefix hits. The default sizes are the evaluated configuration:
// N = 16 patterns of L = 36 characters, prefix length k = 4, M = 8
// characters per clock. The 8-bit character is this design's choice.
package mpm_pkg;
  parameter int unsigned CHAR_W  = 8;   // bits per character
  parameter int unsigned NPAT    = 16;  // N, number of patterns
  parameter int unsigned PFX_LEN = 4;   // k, prefix length in characters
  parameter int unsigned PAT_LEN = 36;  // L, pattern length in characters
  parameter int unsigned LANES   = 8;   // M, characters per clock
  parameter int unsigned POS_W   = 32;  // width of text positions

  // Beats of M characters the window buffer holds: enough for the
  // M+L-1 characters spanned by M overlapping windows of length L.
  function automatic int unsigned buf_beats(int unsigned m, int unsigned l);
    return (m + l - 1 + m - 1) / m;
  endfunction
endpackage
