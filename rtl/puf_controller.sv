// puf_controller: runs one evaluation of the asynchronous PUF array from the
// system clock.
//
// A `go` pulse starts the sequence of the evaluation timing: CLEAR is raised
// for CLEAR_CYCLES cycles to reset every flip-flop of the array, then lowered
// for one cycle, then START is raised, which launches the race in every cell.
// The asynchronous response bits pass through a two-flip-flop synchroniser;
// SETTLE_CYCLES cycles after START rose they are copied into `response` and
// `done` pulses for one cycle. START returns low at that point (only its
// rising edge matters to the array).
//
// Interface: `go` is taken only when `busy` is low. `puf_clear`, `puf_start`
// drive the array, `puf_resp` is its raw response. `response` holds the last
// captured value until the next capture.
// Timing: `done` comes CLEAR_CYCLES + 1 + SETTLE_CYCLES + 1 cycles after `go`.
//
// The CLEAR-then-START order follows the evaluation timing of the design;
// the pulse lengths, the synchroniser and the fixed settling time are this
// design's choice. SETTLE_CYCLES must cover the slowest path (64 stages of
// about 0.4 ns is about 26 ns, under 3 cycles at 100 MHz) plus the two
// synchroniser stages.
module puf_controller #(
  parameter int unsigned N_BITS        = 64,
  parameter int unsigned CLEAR_CYCLES  = 2,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  output logic              busy,
  output logic              done,
  output logic              puf_clear,
  output logic              puf_start,
  input  logic [N_BITS-1:0] puf_resp,
  output logic [N_BITS-1:0] response
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_GAP, S_RUN} state_e;

  localparam int unsigned CNT_MAX = (CLEAR_CYCLES > SETTLE_CYCLES) ? CLEAR_CYCLES : SETTLE_CYCLES;
  localparam int unsigned CW      = $clog2(CNT_MAX + 1);

  state_e            state;
  logic [CW-1:0]     cnt;
  logic [N_BITS-1:0] sync1, sync2;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= puf_resp;
      sync2 <= sync1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      puf_clear <= 1'b0;
      puf_start <= 1'b0;
      done      <= 1'b0;
      response  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (go) begin
            state     <= S_CLEAR;
            puf_clear <= 1'b1;
            cnt       <= CW'(CLEAR_CYCLES - 1);
          end
        end
        S_CLEAR: begin
          if (cnt == '0) begin
            state     <= S_GAP;
            puf_clear <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_GAP: begin
          state     <= S_RUN;
          puf_start <= 1'b1;
          cnt       <= CW'(SETTLE_CYCLES - 1);
        end
        S_RUN: begin
          if (cnt == '0) begin
            state     <= S_IDLE;
            puf_start <= 1'b0;
            response  <= sync2;
            done      <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // CLEAR and START are never high together: START must rise on a cleared array.
  a_clear_start_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(puf_clear && puf_start));
endmodule
