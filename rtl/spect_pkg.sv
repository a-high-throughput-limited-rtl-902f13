// Shared constants and types of the path-parallel SPEC-T decoder.
//
// The code is the rate-1/2 systematic feed-forward ODP code of memory 19
// with generators (2000000, 7144761) in octal. The systematic output is the
// information bit itself; the parity output uses G_PARITY, written MSB first:
// bit 19 is the coefficient of D^0 and bit 0 that of D^19. The octal parity
// generator has 21 significant bits, one more than a memory-19 polynomial
// holds; its low 20 bits are used (both end taps are then 1). This reading,
// the soft-input format and the path length are this design's own choices.
//
// Metrics are "distances from the speculated best metric": every path stores
// D = speculated_best - path_metric, which is never negative, so the path
// purge is a plain compare D > T. Soft inputs are signed SOFT_W-bit samples
// in which a noiseless BPSK amplitude of 1.0 reads as 2**Q_FRAC; thresholds
// given in amplitude units (T, R) are shifted left by Q_FRAC internally.
package spect_pkg;

  // Encoder memory m and parity generator (see above).
  localparam int unsigned MEM = 19;
  localparam logic [MEM:0] G_PARITY = 20'hCC9F1;

  // Soft input: signed, 2**Q_FRAC LSBs per unit of received amplitude.
  localparam int unsigned SOFT_W = 5;
  localparam int unsigned Q_FRAC = 2;

  // Width of the stored metric difference D (saturating).
  localparam int unsigned DW = 10;
  localparam logic [DW-1:0] D_MAX = '1;

  // Path length: information bits kept per path. The oldest bits leave the
  // path v at a time towards the correction module, so this is the decoding
  // delay in trellis depths. It must be a multiple of v and exceed MEM + v.
  localparam int unsigned PATH_LEN = 64;

  typedef logic signed [SOFT_W-1:0] soft_t;
  typedef logic [DW-1:0]            dist_t;
  typedef logic [PATH_LEN-1:0]      hist_t;

  // One survivor or contender path: valid flag, metric distance from the
  // speculated best metric, and its information bits (bit 0 = newest).
  typedef struct packed {
    logic  valid;
    dist_t d;
    hist_t hist;
  } path_t;

  // Parity bit of the encoder for a path whose newest bit is hist[0].
  function automatic logic parity_of(hist_t h);
    logic p;
    p = 1'b0;
    for (int j = 0; j <= int'(MEM); j++)
      p ^= G_PARITY[MEM - j] & h[j];
    return p;
  endfunction

  // Penalty of a coded bit against a received sample, relative to the hard
  // decision: 0 when the bit agrees with the sign of r (BPSK: 0 -> +1,
  // 1 -> -1), 2|r| when it disagrees.
  function automatic dist_t bit_penalty(logic c, soft_t r);
    logic [SOFT_W:0] mag;
    mag = r[SOFT_W-1] ? (SOFT_W+1)'(-$signed({r[SOFT_W-1], r})) : (SOFT_W+1)'(r);
    return (c != r[SOFT_W-1]) ? dist_t'({mag, 1'b0}) : '0;
  endfunction

  // Saturating add and floor-at-zero subtract on distances.
  function automatic dist_t d_add(dist_t a, dist_t b);
    logic [DW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[DW] ? D_MAX : s[DW-1:0];
  endfunction

  function automatic dist_t d_sub(dist_t a, dist_t b);
    return (a > b) ? a - b : '0;
  endfunction

endpackage
