// daq_top: FPGA data acquisition system, ADC0804 in, RS-232 out.
//
// An ADC0804 8-bit converter is read over its parallel bus and the bytes are
// delivered to a PC over a serial link:
//
//   ADC0804 --WR/RD/INTR/DB--> adc0804_ctrl --> sample_fifo --> host_cmd_ctrl
//                                                                 |      ^
//   PC <--txd-- uart_tx <-----------------------------------------+      |
//   PC --rxd--> uart_rx -------------------------------------------------+
//
// adc0804_ctrl runs conversions back to back (start with WR, wait for INTR,
// read with RD, start again) while acquisition is enabled; every byte read is
// pushed into sample_fifo and shown on the eight LEDs. The PC polls: it asks
// how many samples are stored, then reads them one byte per request, and it
// can start and stop the acquisition (see host_cmd_ctrl for the command set).
// The structure, the ADC handshake and the 24 MHz clock follow the original
// description; the command set, the FIFO, the 9600-baud 8N1 framing and the
// LED display of the last sample are this design's choices.
//
// The RS-232 level shifter sits outside the FPGA: txd/rxd are logic-level.
// The ADC's CS input is assumed tied low on the board.
`timescale 1ns / 1ps
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 24_000_000,
  parameter int unsigned BAUD       = 9_600,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned WR_CYCLES  = 3,
  parameter int unsigned RD_CYCLES  = 4,
  parameter int unsigned GAP_CYCLES = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // ADC0804 parallel bus
  output logic        adc_wr_n,
  output logic        adc_rd_n,
  input  logic        adc_intr_n,
  input  sample_t     adc_db,
  // serial link to the PC (through an RS-232 transceiver)
  output logic        txd,
  input  logic        rxd,
  // board LEDs: last sample read
  output logic [7:0]  led,
  // status
  output logic        acq_enable,
  output logic [15:0] conversions,
  output logic        fifo_full,
  output logic        fifo_overflow,
  output logic        rx_frame_err,
  output logic        cmd_drop,
  output logic        bad_cmd
);

  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  sample_t          sample;
  logic             sample_valid;
  logic             fifo_rd_en, fifo_empty;
  sample_t          fifo_rd_data;
  logic [CNT_W-1:0] fifo_count;
  logic             rx_valid;
  logic [7:0]       rx_data;
  logic             tx_valid, tx_ready;
  logic [7:0]       tx_data;

  adc0804_ctrl #(
    .WR_CYCLES (WR_CYCLES),
    .RD_CYCLES (RD_CYCLES),
    .GAP_CYCLES(GAP_CYCLES)
  ) u_adc (
    .clk, .rst_n,
    .enable      (acq_enable),
    .adc_wr_n, .adc_rd_n, .adc_intr_n, .adc_db,
    .sample,
    .sample_valid,
    .conversions
  );

  sample_fifo #(
    .WIDTH(8),
    .DEPTH(FIFO_DEPTH)
  ) u_fifo (
    .clk, .rst_n,
    .wr_en   (sample_valid),
    .wr_data (sample),
    .rd_en   (fifo_rd_en),
    .rd_data (fifo_rd_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count),
    .overflow(fifo_overflow)
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst_n,
    .rxd,
    .out_valid(rx_valid),
    .out_data (rx_data),
    .frame_err(rx_frame_err)
  );

  host_cmd_ctrl #(.CNT_W(CNT_W)) u_cmd (
    .clk, .rst_n,
    .cmd_valid    (rx_valid),
    .cmd_data     (rx_data),
    .fifo_count,
    .fifo_empty,
    .fifo_rd_en,
    .fifo_rd_data,
    .latest_sample(sample),
    .tx_valid,
    .tx_ready,
    .tx_data,
    .acq_enable,
    .cmd_drop,
    .bad_cmd
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst_n,
    .in_valid(tx_valid),
    .in_ready(tx_ready),
    .in_data (tx_data),
    .txd
  );

  assign led = sample;

endmodule
