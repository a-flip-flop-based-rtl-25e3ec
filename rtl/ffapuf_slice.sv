// ffapuf_slice: one stage of one delay path of the flip-flop arbiter PUF.
//
// Four flip-flops share one clock, the incoming edge `launch` (START for the
// first stage, the previous stage's output otherwise). Their D inputs are tied
// to 1 and all four are cleared asynchronously by `clear`, so a rising edge on
// `launch` makes all four outputs rise, each after its own, slightly different
// delay. Three 2:1 muxes then forward exactly one of the four outputs: the two
// first-level muxes (flip-flops 0/1 and 2/3) are steered by `sel_lo`, the
// second-level mux by `sel_hi`; a select of 0 takes the lower-numbered input.
// The forwarded edge is the clock of the next stage, so the path delay is the
// sum over the stages of the delay of the flip-flop each stage selects.
//
// Timing: purely asynchronous. `clear` must be released before `launch`
// rises, and the challenge selects must be stable across the race.
//
// The four flip-flops, D = 1, CLEAR and the 3-mux tree steered by two challenge
// bits follow the described slice. The select polarity and the simulation
// delays are this design's choice: SEG_DLY_PS[k] stands for the clock-to-Q
// delay plus the route of flip-flop k, set by placement and process variation
// on a real device. Synthesis ignores the delays. The flip-flops carry keep
// attributes so that synthesis does not merge the four identical registers;
// placing them in one slice with balanced routing is left to the vendor's
// placement constraints.
module ffapuf_slice
  import ffapuf_pkg::*;
#(
  parameter logic [3:0][15:0] SEG_DLY_PS = {4{16'(SEG_NOM_PS)}}
) (
  input  logic clear,
  input  logic launch,
  input  logic sel_lo,
  input  logic sel_hi,
  output logic edge_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [3:0] seg;  // flip-flop outputs after their segment delay
  logic       mux_a, mux_b;

  for (genvar k = 0; k < 4; k++) begin : g_ff
    // Keep the four identical flip-flops apart: merging them would remove
    // the four delay choices of the stage.
    (* keep = "true", dont_touch = "true" *) logic q;
    (* keep = "true" *)
    always_ff @(posedge launch or posedge clear) begin
      if (clear) q <= 1'b0;
      else       q <= 1'b1;
    end
    assign #(SEG_DLY_PS[k]) seg[k] = q;
  end

  assign mux_a    = sel_lo ? seg[1] : seg[0];
  assign mux_b    = sel_lo ? seg[3] : seg[2];
  assign edge_out = sel_hi ? mux_b : mux_a;
endmodule
