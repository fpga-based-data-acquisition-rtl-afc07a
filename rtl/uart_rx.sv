// uart_rx: 8N1 serial receiver for the PC's command bytes.
//
// rxd is synchronised by two flops. A falling edge on the idle line starts a
// frame; the start bit is checked again half a bit period later (a glitch
// shorter than that is ignored), then each data bit and the stop bit are
// sampled one bit period apart, in the middle of the bit. Data arrive least
// significant bit first. The original design states only that the PC talks to the FPGA
// over RS-232 through a UART; the mid-bit sampling, the 8N1 frame and the
// 9600 baud default are this design's choices.
//
// Interface
//   rxd            serial input (idle high).
//   out_valid      one-cycle pulse with out_data when a frame ends with a
//                  valid (high) stop bit.
//   frame_err      one-cycle pulse instead when the stop bit is low; the byte
//                  is dropped.
//
// Timing: out_valid rises 2 cycles (synchroniser) plus 9.5 bit periods after
// the falling edge of the start bit.
`timescale 1ns / 1ps
module uart_rx
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ = 24_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       frame_err
);

  localparam int unsigned BIT_CYCLES  = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned HALF_CYCLES = BIT_CYCLES / 2;
  localparam int unsigned CW = $clog2(BIT_CYCLES + 1);

  uart_state_t   state;
  logic [CW-1:0] baud_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shift_in;
  logic [1:0]    rx_sync;
  logic          rx;

  assign rx = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= UART_IDLE;
      baud_cnt  <= '0;
      bit_idx   <= '0;
      shift_in  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      frame_err <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      if (baud_cnt != '0) baud_cnt <= baud_cnt - 1'b1;
      case (state)
        UART_IDLE: begin
          if (!rx) begin
            baud_cnt <= CW'(HALF_CYCLES - 1);
            state    <= UART_START;
          end
        end
        UART_START: begin
          if (baud_cnt == '0) begin
            if (!rx) begin
              baud_cnt <= CW'(BIT_CYCLES - 1);
              bit_idx  <= '0;
              state    <= UART_DATA;
            end else begin
              state <= UART_IDLE;   // glitch, not a start bit
            end
          end
        end
        UART_DATA: begin
          if (baud_cnt == '0) begin
            shift_in <= {rx, shift_in[7:1]};
            baud_cnt <= CW'(BIT_CYCLES - 1);
            if (bit_idx == 3'd7) state <= UART_STOP;
            else                 bit_idx <= bit_idx + 1'b1;
          end
        end
        UART_STOP: begin
          if (baud_cnt == '0) begin
            if (rx) begin
              out_valid <= 1'b1;
              out_data  <= shift_in;
            end else begin
              frame_err <= 1'b1;
            end
            state <= UART_IDLE;
          end
        end
        default: state <= UART_IDLE;
      endcase
    end
  end

  initial assert (BIT_CYCLES >= 4);

endmodule
