// ffapuf_array: the N-bit flip-flop arbiter PUF.
//
// N_BITS independent ffapuf_cell instances share the challenge, CLEAR and
// START; cell i produces response bit i. The cells do not share any delay
// path, so the bits carry no designed dependency on each other. Each cell gets
// its own position (CELL_ID = i), which on silicon means its own placement and
// in simulation its own set of segment delays from the device seed.
//
// Interface and timing: as ffapuf_cell, with an N_BITS-wide response that is
// asynchronous to every clock and settles after the slowest cell's race.
//
// Replicating the 1-bit cell N times with a common challenge follows the
// described array; the defaults (64 bits, 64 stages, 128-bit challenge) are the
// evaluated configuration.
module ffapuf_array
  import ffapuf_pkg::*;
#(
  parameter int unsigned N_BITS      = N_BITS_DEF,
  parameter int unsigned N_STAGES    = N_STAGES_DEF,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                  clear,
  input  logic                  start,
  input  logic [2*N_STAGES-1:0] challenge,
  output logic [N_BITS-1:0]     response
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_BITS-1:0] unused_q_u, unused_q_l;

  for (genvar i = 0; i < N_BITS; i++) begin : g_cell
    ffapuf_cell #(
      .N_STAGES   (N_STAGES),
      .DEVICE_SEED(DEVICE_SEED),
      .CELL_ID    (i)
    ) u_cell (
      .clear    (clear),
      .start    (start),
      .challenge(challenge),
      .q_u      (unused_q_u[i]),
      .q_l      (unused_q_l[i]),
      .response (response[i])
    );
  end
endmodule
