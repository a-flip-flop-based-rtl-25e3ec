// ffapuf_top: the complete flip-flop arbiter PUF evaluation design.
//
// A host PC sends a 2*N_STAGES-bit challenge over the UART link (host_if,
// uart_rx). puf_controller then clears the array, raises START and, after a
// fixed settling time, captures the N_BITS-bit response of ffapuf_array, which
// host_if sends back over the link (uart_tx). The array is asynchronous: the
// response is decided by which of the two flip-flop delay paths of each cell
// is faster for the given challenge, not by the clock.
//
// Interface: `clk` is the 100 MHz board clock, `rst_n` an active-low reset,
// `uart_rxd`/`uart_txd` the serial link (8N1, BAUD bit/s). `busy` is high
// during an evaluation.
// Timing: one challenge/response exchange takes (CHAL_BYTES + RESP_BYTES)
// UART frames (24 frames, about 2.1 ms at 115,200 bit/s, for the default
// 128-bit challenge and 64-bit response) plus about 20 clock cycles of
// evaluation.
//
// Array size (64 bits x 64 stages), clock and link speed follow the evaluated
// set-up; the host protocol, the controller timing and the simulation delay
// model (DEVICE_SEED picks one simulated chip) are this design's choices.
module ffapuf_top
  import ffapuf_pkg::*;
#(
  parameter int unsigned N_BITS        = N_BITS_DEF,
  parameter int unsigned N_STAGES      = N_STAGES_DEF,
  parameter int unsigned DEVICE_SEED   = 1,
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned BAUD          = 115_200,
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic busy
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CHAL_BITS    = 2 * N_STAGES;

  logic [7:0]           rx_data, tx_data;
  logic                 rx_valid, tx_valid, tx_ready;
  logic [CHAL_BITS-1:0] challenge;
  logic                 go, done;
  logic                 puf_clear, puf_start;
  logic [N_BITS-1:0]    puf_resp, response;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk  (clk),
    .rst_n(rst_n),
    .rxd  (uart_rxd),
    .data (rx_data),
    .valid(rx_valid)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk  (clk),
    .rst_n(rst_n),
    .data (tx_data),
    .valid(tx_valid),
    .ready(tx_ready),
    .txd  (uart_txd)
  );

  host_if #(.CHAL_BITS(CHAL_BITS), .RESP_BITS(N_BITS)) u_host (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx_data  (rx_data),
    .rx_valid (rx_valid),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready),
    .challenge(challenge),
    .go       (go),
    .done     (done),
    .response (response)
  );

  puf_controller #(.N_BITS(N_BITS), .SETTLE_CYCLES(SETTLE_CYCLES)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .go       (go),
    .busy     (busy),
    .done     (done),
    .puf_clear(puf_clear),
    .puf_start(puf_start),
    .puf_resp (puf_resp),
    .response (response)
  );

  ffapuf_array #(
    .N_BITS     (N_BITS),
    .N_STAGES   (N_STAGES),
    .DEVICE_SEED(DEVICE_SEED)
  ) u_array (
    .clear    (puf_clear),
    .start    (puf_start),
    .challenge(challenge),
    .response (puf_resp)
  );
endmodule
