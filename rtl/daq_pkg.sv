// daq_pkg: shared types and constants of the FPGA data acquisition system.
//
// The system samples an ADC0804 over its parallel bus, keeps the samples in
// a FIFO and answers a PC over an 8N1 UART link. This package holds the
// sample type, the state encodings of the controllers and the command bytes
// the PC sends. The board clock (24 MHz) follows the original design; the
// command codes, the baud rate and the ADC bus timing are this design's own
// choices, since the description names the exchange but not its encoding.
`timescale 1ns / 1ps
package daq_pkg;

  // One ADC0804 result: 8 bits, 0 .. 255.
  typedef logic [7:0] sample_t;

  // Command bytes sent by the PC (ASCII so a terminal can drive the link).
  localparam logic [7:0] CMD_STATUS = 8'h53;  // 'S': how many samples are stored
  localparam logic [7:0] CMD_READ   = 8'h52;  // 'R': send the oldest stored sample
  localparam logic [7:0] CMD_START  = 8'h47;  // 'G': start acquisition
  localparam logic [7:0] CMD_STOP   = 8'h48;  // 'H': halt acquisition

  // ADC0804 bus sequencer states.
  typedef enum logic [2:0] {
    ADC_IDLE,       // acquisition stopped
    ADC_WR,         // WR low: start of conversion
    ADC_WAIT_INTR,  // conversion running, waiting for INTR low
    ADC_RD,         // RD low: result driven onto DB
    ADC_RECOVER     // gap between RD high and the next WR
  } adc_state_t;

  // UART transmitter / receiver states.
  typedef enum logic [1:0] {
    UART_IDLE,
    UART_START,
    UART_DATA,
    UART_STOP
  } uart_state_t;

endpackage
