// uart_tx: 8N1 UART transmitter for the host link (115,200 bit/s from a
// 100 MHz clock by default).
//
// A byte offered with `valid` while `ready` is high is taken in the same
// cycle and sent as a start bit (0), eight data bits LSB first and a stop bit
// (1), each CLKS_PER_BIT clock cycles long. `ready` is low while a frame is on
// the line.
//
// Interface: valid/ready handshake on the byte side, `txd` idles high.
// Timing: one byte takes 10 * CLKS_PER_BIT cycles; a new byte can be taken in
// the cycle after the stop bit ends.
//
// The link speed and clock frequency are the board's; the frame format and
// handshake are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;    // stop bit, data[7:0]; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
        txd       <= 1'b0;
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[8:1]};
      txd       <= frame[0];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end

  // A byte must not be offered and then withdrawn before it is taken.
  property p_valid_held;
    @(posedge clk) disable iff (!rst_n) (valid && !ready) |=> valid;
  endproperty
  a_valid_held: assert property (p_valid_held);
endmodule
