// host_cmd_ctrl: answers the PC's command bytes arriving over the UART.
//
// The PC first asks whether data are available, then asks for the data, and
// its application can start and stop the acquisition. This block decodes one
// command byte at a time and queues the one-byte reply for the transmitter:
//
//   'S' (8'h53)  reply: number of stored samples, saturated to 255
//   'R' (8'h52)  reply: oldest stored sample, popped from the FIFO; when the
//                FIFO is empty, the most recent sample read from the ADC
//   'G' (8'h47)  start acquisition, reply 'G'
//   'H' (8'h48)  halt acquisition, reply 'H'
//   other        ignored, no reply; bad_cmd pulses
//
// The query-then-read exchange and start/stop follow the original design's description
// of the PC program; the byte codes and the reply formats are this design's own.
//
// A command that arrives while the previous one is still being answered waits
// in a one-byte holding register; a further one is dropped (cmd_drop pulses).
// Latency: 'S', 'G', 'H' present their reply to the transmitter 2 cycles
// after the command byte arrives, 'R' 4 cycles (two more for the FIFO read).
//
// The flops use rst_n as an asynchronous reset while the bus assertion uses
// it synchronously in `disable iff`; lint tools report that mix, and it is
// intended: the assertion is simply off while reset is held.
`timescale 1ns / 1ps
module host_cmd_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned CNT_W        = 11,
  parameter bit          ACQ_ON_RESET = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command bytes from the receiver
  input  logic             cmd_valid,
  input  logic [7:0]       cmd_data,
  // sample store
  input  logic [CNT_W-1:0] fifo_count,
  input  logic             fifo_empty,
  output logic             fifo_rd_en,
  input  sample_t          fifo_rd_data,
  input  sample_t          latest_sample,
  // replies to the transmitter
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic [7:0]       tx_data,
  // control and events
  output logic             acq_enable,
  output logic             cmd_drop,
  output logic             bad_cmd
);

  typedef enum logic [1:0] {
    CMD_IDLE,     // waiting for a command in the holding register
    CMD_FETCH,    // FIFO read in flight
    CMD_SEND      // reply offered to the transmitter
  } cmd_state_t;

  cmd_state_t  state;
  logic        pend_valid;
  logic [7:0]  pend_cmd;
  logic        take;

  assign take = (state == CMD_IDLE) && pend_valid;

  // One-byte holding register between the receiver and the decoder.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend_cmd   <= '0;
      cmd_drop   <= 1'b0;
    end else begin
      cmd_drop <= 1'b0;
      if (take) pend_valid <= 1'b0;
      if (cmd_valid) begin
        if (!pend_valid || take) begin
          pend_valid <= 1'b1;
          pend_cmd   <= cmd_data;
        end else begin
          cmd_drop <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CMD_IDLE;
      tx_valid   <= 1'b0;
      tx_data    <= '0;
      fifo_rd_en <= 1'b0;
      acq_enable <= ACQ_ON_RESET;
      bad_cmd    <= 1'b0;
    end else begin
      fifo_rd_en <= 1'b0;
      bad_cmd    <= 1'b0;
      case (state)
        CMD_IDLE: begin
          if (pend_valid) begin
            case (pend_cmd)
              CMD_STATUS: begin
                tx_data  <= (fifo_count > CNT_W'(255)) ? 8'hFF : fifo_count[7:0];
                tx_valid <= 1'b1;
                state    <= CMD_SEND;
              end
              CMD_READ: begin
                if (fifo_empty) begin
                  tx_data  <= latest_sample;
                  tx_valid <= 1'b1;
                  state    <= CMD_SEND;
                end else begin
                  fifo_rd_en <= 1'b1;
                  state      <= CMD_FETCH;
                end
              end
              CMD_START, CMD_STOP: begin
                acq_enable <= (pend_cmd == CMD_START);
                tx_data    <= pend_cmd;
                tx_valid   <= 1'b1;
                state      <= CMD_SEND;
              end
              default: bad_cmd <= 1'b1;
            endcase
          end
        end
        CMD_FETCH: begin
          // fifo_rd_en was high last cycle; the popped word is on rd_data now.
          if (!fifo_rd_en) begin
            tx_data  <= fifo_rd_data;
            tx_valid <= 1'b1;
            state    <= CMD_SEND;
          end
        end
        CMD_SEND: begin
          if (tx_ready) begin
            tx_valid <= 1'b0;
            state    <= CMD_IDLE;
          end
        end
        default: state <= CMD_IDLE;
      endcase
    end
  end

  // A reply, once offered, is held until the transmitter takes it.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
