// uart_tx: 8N1 serial transmitter towards the PC's RS-232 port.
//
// A byte accepted on the valid/ready input is sent as one start bit (0),
// eight data bits least significant first, and one stop bit (1); the line
// idles high. A counter divides the system clock down to the bit period,
// CLK_HZ / BAUD cycles (rounded to nearest). The original design specifies the link as
// RS-232 through a UART; the 8N1 frame, the 9600 baud default and the
// handshake are this design's choices.
//
// Interface
//   in_valid/in_ready/in_data  byte to send; accepted on a cycle where both
//                              valid and ready are high. ready is high only
//                              while the line is idle.
//   txd                        serial output (idle high).
//
// Timing: txd falls the cycle after acceptance; one frame lasts 10 bit
// periods, after which in_ready rises again.
`timescale 1ns / 1ps
module uart_tx
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ = 24_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       txd
);

  localparam int unsigned BIT_CYCLES = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW = $clog2(BIT_CYCLES + 1);

  uart_state_t   state;
  logic [CW-1:0] baud_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shift_out;
  logic          bit_end;

  assign bit_end  = (baud_cnt == '0);
  assign in_ready = (state == UART_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= UART_IDLE;
      baud_cnt  <= '0;
      bit_idx   <= '0;
      shift_out <= '0;
      txd       <= 1'b1;
    end else begin
      baud_cnt <= bit_end ? CW'(BIT_CYCLES - 1) : baud_cnt - 1'b1;
      case (state)
        UART_IDLE: begin
          txd <= 1'b1;
          if (in_valid) begin
            shift_out <= in_data;
            txd       <= 1'b0;
            baud_cnt  <= CW'(BIT_CYCLES - 1);
            state     <= UART_START;
          end
        end
        UART_START: begin
          if (bit_end) begin
            txd       <= shift_out[0];
            shift_out <= shift_out >> 1;
            bit_idx   <= '0;
            state     <= UART_DATA;
          end
        end
        UART_DATA: begin
          if (bit_end) begin
            if (bit_idx == 3'd7) begin
              txd   <= 1'b1;
              state <= UART_STOP;
            end else begin
              txd       <= shift_out[0];
              shift_out <= shift_out >> 1;
              bit_idx   <= bit_idx + 1'b1;
            end
          end
        end
        UART_STOP: begin
          if (bit_end) state <= UART_IDLE;
        end
        default: state <= UART_IDLE;
      endcase
    end
  end

  initial assert (BIT_CYCLES >= 2);

endmodule
