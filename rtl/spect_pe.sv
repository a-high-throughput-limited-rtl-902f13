// Processing element PE_i of the path-parallel SPEC-T decoder.
//
// Extends one survivor path by one trellis depth and purges the results.
// The parent path (bit history and distance D from the speculated best
// metric) is extended by information bit 0 and by bit 1. For each child the
// coded pair is (u, parity) and the branch metric is charged against the
// hard decision of the received pair: D grows by 2|r| for every coded bit
// that disagrees with the sign of its sample, which is exactly the gap
// between the best branch metric BM_B and this branch's metric. On depths
// where the speculated best metric is corrected, E is subtracted (floor 0).
// A child survives when its D does not exceed the threshold T.
//
// Interface: purely combinational; parent.valid = 0 gives two invalid
// children. Parameter T is in units of received amplitude, as in the
// reference configuration (T = 8).
module spect_pe
  import spect_pkg::*;
#(
  parameter int unsigned T = 8
) (
  input  path_t parent,
  input  soft_t r0,       // sample of the systematic bit
  input  soft_t r1,       // sample of the parity bit
  input  dist_t e_sub,    // correction E (0 on depths without correction)
  output path_t child0,   // parent extended by bit 0
  output path_t child1    // parent extended by bit 1
);

  localparam dist_t T_LSB = dist_t'(T << Q_FRAC);

  function automatic path_t extend(path_t p, logic u, soft_t s0, soft_t s1, dist_t e);
    path_t c;
    dist_t inc;
    c.hist  = {p.hist[PATH_LEN-2:0], u};
    inc     = d_add(bit_penalty(u, s0), bit_penalty(parity_of(c.hist), s1));
    c.d     = d_sub(d_add(p.d, inc), e);
    c.valid = p.valid && (c.d <= T_LSB);
    return c;
  endfunction

  assign child0 = extend(parent, 1'b0, r0, r1, e_sub);
  assign child1 = extend(parent, 1'b1, r0, r1, e_sub);

endmodule
