// uart_rx: 8N1 UART receiver for the host link (115,200 bit/s from a 100 MHz
// clock by default).
//
// The serial input is first synchronised with two flip-flops. A falling edge
// starts a frame; the start bit is re-checked at its middle, then each of the
// eight data bits (LSB first) is sampled in the middle of its bit time and the
// stop bit is checked. A good frame gives a one-cycle `valid` pulse with the
// byte on `data`; a frame whose stop bit is 0 is dropped.
//
// Interface: `rxd` idles high. `data` holds the last byte until the next one.
// Timing: one byte takes 10 bit times of CLKS_PER_BIT clock cycles.
//
// The link speed and clock frequency are the board's; the frame format and
// the receiver structure are this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e     state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RX_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          clk_cnt <= '0;
          if (!rx_s) state <= RX_START;
        end
        RX_START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= rx_s ? RX_IDLE : RX_DATA;  // glitch: back to idle
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {rx_s, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= RX_STOP;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        RX_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= RX_IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
