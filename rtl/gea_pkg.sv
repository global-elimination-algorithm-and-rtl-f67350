// Shared types and constants of the global-elimination (GEA) motion-estimation core.
// The default numbers are the core's main configuration: 16x16 blocks, search range
// [-16,+15] (p = 16), level-3 subsampling (4x4 subblocks, 16 "macro-pixels") and
// M = 7 candidates kept for the final SAD pass. Pixels are 8-bit luminance.
package gea_pkg;
  localparam int unsigned PIXW = 8;

  // Width of a signed motion-vector component holding [-P, P-1].
  function automatic int unsigned mv_width(int unsigned p);
    return $clog2(2 * p);
  endfunction

  // Width of SAD/SSAD for an NxN block of 8-bit pixels (16 bits for N = 16).
  function automatic int unsigned sad_width(int unsigned n);
    return PIXW + 2 * $clog2(n);
  endfunction

  // Width of a subblock sum (12 bits for 4x4 subblocks).
  function automatic int unsigned subsum_width(int unsigned sb);
    return PIXW + 2 * $clog2(sb);
  endfunction
endpackage
