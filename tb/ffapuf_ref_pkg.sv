// ffapuf_ref_pkg: reference model of the FF-APUF race for the testbenches.
//
// It applies the additive delay model directly: the delay of a path is the
// sum over its stages of the delay of the one flip-flop segment that the two
// challenge bits of that stage select. The segment delays of a simulated chip
// come from ffapuf_pkg::seg_delay_ps (the chip's "process variation"); the
// challenge-to-stage wiring and the mux selection are recomputed here from
// the cell description, independently of the RTL.
package ffapuf_ref_pkg;
  import ffapuf_pkg::*;

  localparam int unsigned MAXC = 1024;  // widest challenge the model accepts

  // Segment index selected by a stage: bit `lo` picks within a pair, `hi` the pair.
  function automatic int unsigned pick(input logic lo, input logic hi);
    return hi ? (lo ? 3 : 2) : (lo ? 1 : 0);
  endfunction

  // Delay in ps of the upper (lower = 0/1) path of cell `cell_id` with n stages.
  function automatic int unsigned path_ps(input int unsigned seed, input int unsigned cell_id,
                                          input int unsigned n, input logic [MAXC-1:0] c,
                                          input bit lower);
    int unsigned t;
    t = 0;
    for (int unsigned s = 0; s < n; s++) begin
      if (!lower) t += seg_delay_ps(seed, cell_id, s, CHAIN_UPPER, pick(c[2*s], c[2*s+1]));
      else        t += seg_delay_ps(seed, cell_id, s, CHAIN_LOWER,
                                    pick(c[2*n-1-2*s], c[2*n-2-2*s]));
    end
    return t;
  endfunction

  // Expected response bit: 0 when the upper path reaches the arbiter first.
  function automatic logic resp_bit(input int unsigned seed, input int unsigned cell_id,
                                    input int unsigned n, input logic [MAXC-1:0] c);
    return (path_ps(seed, cell_id, n, c, 1'b0) < path_ps(seed, cell_id, n, c, 1'b1) + TIE_SKEW_PS)
           ? 1'b0 : 1'b1;
  endfunction

  // Random challenge of `bits` bits.
  function automatic logic [MAXC-1:0] rand_challenge(input int unsigned bits);
    logic [MAXC-1:0] c;
    c = '0;
    for (int unsigned i = 0; i < bits; i++) c[i] = 1'($urandom);
    return c;
  endfunction
endpackage
