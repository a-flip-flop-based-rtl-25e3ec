// ffapuf_pkg: constants and helper functions shared by the FF-APUF modules.
//
// Sizes: the design is the 64-stage, 64-bit flip-flop arbiter PUF. Each stage
// consumes two challenge bits (one for the two first-level muxes of a slice and
// one for the second-level mux), so a challenge has 2*N_STAGES bits.
//
// Delay model (simulation only): on silicon, the race between the two paths is
// decided by the manufacturing spread of each flip-flop's clock-to-Q delay and
// of the short route behind it (the delay segments a..h of a stage). This
// package turns a device seed and the position of a segment into a repeatable
// pseudo-random delay in picoseconds, so that different seeds behave like
// different chips. The numbers (nominal delay, spread) are this design's own
// choice; synthesis ignores all delays.
package ffapuf_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_BITS_DEF   = 64;  // response bits (N)
  localparam int unsigned N_STAGES_DEF = 64;  // stages per path (n)

  // Delay model: each segment is SEG_NOM_PS + uniform(-SEG_SPREAD_PS/2, +SEG_SPREAD_PS/2),
  // rounded to an even number of picoseconds. The lower path gets one extra
  // picosecond at the arbiter (TIE_SKEW_PS), so the total upper delay is always
  // even and the total lower delay always odd: an exact tie, which a two-state
  // simulator cannot resolve, never happens.
  localparam int unsigned SEG_NOM_PS    = 400;
  localparam int unsigned SEG_SPREAD_PS = 64;
  localparam int unsigned TIE_SKEW_PS   = 1;

  typedef enum logic {CHAIN_UPPER = 1'b0, CHAIN_LOWER = 1'b1} chain_e;

  // 32-bit integer mixer (a murmur3-style finaliser).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h85eb_ca6b;
    h = h ^ (h >> 13);
    h = h * 32'hc2b2_ae35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in ps of flip-flop segment `ff` (0..3) of stage `stage` of chain
  // `chain` of response cell `cell_id` on the device identified by `seed`.
  function automatic int unsigned seg_delay_ps(input int unsigned seed, input int unsigned cell_id,
                                               input int unsigned stage, input chain_e chain,
                                               input int unsigned ff);
    logic [31:0] h;
    int unsigned off;
    h   = mix32(seed ^ mix32(cell_id ^ mix32(stage ^ mix32(ff + 32'(chain) * 8))));
    off = h % (SEG_SPREAD_PS + 1);
    return ((SEG_NOM_PS - SEG_SPREAD_PS / 2 + off) / 2) * 2;
  endfunction

  // The four segment delays of one slice, packed, index = flip-flop number.
  function automatic logic [3:0][15:0] slice_delays(input int unsigned seed, input int unsigned cell_id,
                                                    input int unsigned stage, input chain_e chain);
    logic [3:0][15:0] d;
    for (int k = 0; k < 4; k++) d[k] = 16'(seg_delay_ps(seed, cell_id, stage, chain, k));
    return d;
  endfunction

  // Challenge bit that drives the first-level (lo) and second-level (hi) muxes
  // of stage s (0-based) in a chain of n stages. The upper chain reads the
  // challenge from C0 upwards (stage s: C[2s], C[2s+1]); the lower chain reads
  // it from the top down (stage s: C[2n-1-2s], C[2n-2-2s]).
  function automatic int unsigned sel_lo_index(input int unsigned n, input int unsigned s,
                                               input chain_e chain);
    return (chain == CHAIN_UPPER) ? 2 * s : 2 * n - 1 - 2 * s;
  endfunction

  function automatic int unsigned sel_hi_index(input int unsigned n, input int unsigned s,
                                               input chain_e chain);
    return (chain == CHAIN_UPPER) ? 2 * s + 1 : 2 * n - 2 - 2 * s;
  endfunction

endpackage
