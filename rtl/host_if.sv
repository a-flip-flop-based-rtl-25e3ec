// host_if: challenge/response exchange with the host PC over the UART link.
//
// The host sends a challenge as CHAL_BYTES bytes, least significant byte
// first (byte 0 holds challenge bits 7:0). When the last byte has arrived the
// challenge register is complete and `go` pulses for one cycle. When the
// evaluation reports `done`, the response is latched and sent back as
// RESP_BYTES bytes, least significant byte first. Bytes that arrive while a
// response is still being evaluated or sent are ignored.
//
// Interface: byte stream in from uart_rx (`rx_data`/`rx_valid`), byte stream
// out to uart_tx (valid/ready), `challenge` to the PUF array (stable from the
// `go` pulse until the next challenge is complete), `go`/`done` to
// puf_controller.
// Timing: the exchange is bounded by the link: (CHAL_BYTES + RESP_BYTES) * 10
// bit times, plus the evaluation itself.
//
// A UART link to the PC is part of the measured set-up; this byte protocol is
// this design's choice.
module host_if #(
  parameter int unsigned CHAL_BITS = 128,
  parameter int unsigned RESP_BITS = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           rx_data,
  input  logic                 rx_valid,
  output logic [7:0]           tx_data,
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output logic [CHAL_BITS-1:0] challenge,
  output logic                 go,
  input  logic                 done,
  input  logic [RESP_BITS-1:0] response
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CHAL_BYTES = (CHAL_BITS + 7) / 8;
  localparam int unsigned RESP_BYTES = (RESP_BITS + 7) / 8;
  localparam int unsigned BW = $clog2(((CHAL_BYTES > RESP_BYTES) ? CHAL_BYTES : RESP_BYTES) + 1);

  typedef enum logic [1:0] {H_RECV, H_EVAL, H_SEND} state_e;

  state_e                    state;
  logic [BW-1:0]             byte_cnt;
  logic [CHAL_BYTES*8-1:0]   chal_buf;
  logic [RESP_BYTES*8-1:0]   resp_buf;

  assign challenge = chal_buf[CHAL_BITS-1:0];
  assign tx_data   = resp_buf[7:0];
  assign tx_valid  = (state == H_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= H_RECV;
      byte_cnt <= '0;
      chal_buf <= '0;
      resp_buf <= '0;
      go       <= 1'b0;
    end else begin
      go <= 1'b0;
      unique case (state)
        H_RECV: begin
          if (rx_valid) begin
            chal_buf <= {rx_data, chal_buf[CHAL_BYTES*8-1:8]};
            if (byte_cnt == BW'(CHAL_BYTES - 1)) begin
              byte_cnt <= '0;
              go       <= 1'b1;
              state    <= H_EVAL;
            end else begin
              byte_cnt <= byte_cnt + 1'b1;
            end
          end
        end
        H_EVAL: begin
          if (done) begin
            resp_buf <= (RESP_BYTES * 8)'(response);
            byte_cnt <= '0;
            state    <= H_SEND;
          end
        end
        H_SEND: begin
          if (tx_ready) begin
            resp_buf <= {8'h00, resp_buf[RESP_BYTES*8-1:8]};
            if (byte_cnt == BW'(RESP_BYTES - 1)) begin
              byte_cnt <= '0;
              state    <= H_RECV;
            end else begin
              byte_cnt <= byte_cnt + 1'b1;
            end
          end
        end
        default: state <= H_RECV;
      endcase
    end
  end
endmodule
