// ffapuf_cell: the 1-bit response cell of the flip-flop arbiter PUF.
//
// Two chains of N_STAGES ffapuf_slice stages, an upper and a lower one, are
// launched by the same rising edge of START; the output of each stage clocks
// the next. The challenge steers both chains: the upper chain reads the
// challenge bits from C0 upwards (stage s uses C[2s] for its first-level muxes
// and C[2s+1] for its second-level mux), the lower chain reads them in the
// opposite order (stage s uses C[2n-1-2s] and C[2n-2-2s]). The two path ends,
// Q^U and Q^L, race into a cross-coupled NAND arbiter; `response` is its Z0
// output: 0 if the upper path was faster, 1 if the lower path was.
//
// Interface: `clear` clears every flip-flop of both chains; `start` launches
// the race; `challenge` has 2*N_STAGES bits and must be stable from before
// `start` rises until the response is read. `response` is asynchronous and
// settles about N_STAGES segment delays after `start` rises.
//
// Structure, chain ordering of the challenge and arbiter polarity follow the
// described cell. The per-segment simulation delays come from
// ffapuf_pkg::slice_delays(DEVICE_SEED, CELL_ID, stage, chain), a stand-in for
// process variation; the lower chain gets a 1 ps skew at the arbiter so that
// no exact tie can occur in simulation. Synthesis ignores the delays.
// Lint reports a combinational loop through `response`: it is the
// cross-coupled NAND latch of the arbiter and is intended.
module ffapuf_cell
  import ffapuf_pkg::*;
#(
  parameter int unsigned N_STAGES    = N_STAGES_DEF,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned CELL_ID     = 0
) (
  input  logic                  clear,
  input  logic                  start,
  input  logic [2*N_STAGES-1:0] challenge,
  output logic                  q_u,
  output logic                  q_l,
  output logic                  response
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_STAGES:0] up_edge, lo_edge;
  logic              q_l_skewed;
  logic              unused_z1;

  assign up_edge[0] = start;
  assign lo_edge[0] = start;

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    ffapuf_slice #(
      .SEG_DLY_PS(slice_delays(DEVICE_SEED, CELL_ID, s, CHAIN_UPPER))
    ) u_upper (
      .clear   (clear),
      .launch  (up_edge[s]),
      .sel_lo  (challenge[sel_lo_index(N_STAGES, s, CHAIN_UPPER)]),
      .sel_hi  (challenge[sel_hi_index(N_STAGES, s, CHAIN_UPPER)]),
      .edge_out(up_edge[s+1])
    );
    ffapuf_slice #(
      .SEG_DLY_PS(slice_delays(DEVICE_SEED, CELL_ID, s, CHAIN_LOWER))
    ) u_lower (
      .clear   (clear),
      .launch  (lo_edge[s]),
      .sel_lo  (challenge[sel_lo_index(N_STAGES, s, CHAIN_LOWER)]),
      .sel_hi  (challenge[sel_hi_index(N_STAGES, s, CHAIN_LOWER)]),
      .edge_out(lo_edge[s+1])
    );
  end

  assign q_u = up_edge[N_STAGES];
  assign q_l = lo_edge[N_STAGES];
  assign #(TIE_SKEW_PS) q_l_skewed = q_l;

  nand_arbiter u_arbiter (
    .q_u(q_u),
    .q_l(q_l_skewed),
    .z0 (response),
    .z1 (unused_z1)
  );
endmodule
