// adc0804_ctrl: conversion sequencer for an ADC0804 on its parallel bus.
//
// The FPGA starts a conversion by pulsing WR low, waits for the converter to
// pull INTR low (its "conversion done" acknowledge), then pulls RD low so the
// ADC drives its result onto DB[7:0], latches the byte at the end of the RD
// pulse and immediately starts the next conversion. This start / wait for
// acknowledge / read / restart loop is the one the original design describes; the pulse
// widths, the INTR synchroniser and the start/stop input are this design's own.
//
// Interface
//   enable        while high, conversions follow one another back to back;
//                 when it falls, the conversion in flight is finished and read,
//                 then the sequencer idles.
//   adc_wr_n      WR (active low), start of conversion. CS is assumed tied low.
//   adc_rd_n      RD (active low), output enable of the ADC.
//   adc_intr_n    INTR (active low) from the ADC, synchronised by two flops.
//   adc_db        DB[7:0] from the ADC, sampled on the last cycle of RD low.
//   sample        last byte read; sample_valid pulses for one cycle with it.
//   conversions   number of completed reads (wraps).
//
// Timing at the 24 MHz default clock: WR low for WR_CYCLES (3 = 125 ns, the
// ADC0804 asks for at least 100 ns), RD low for RD_CYCLES (4 = 167 ns, longer
// than the 135 ns access time), then GAP_CYCLES of bus idle before the next WR.
// After INTR falls, sample_valid follows 2 (synchroniser) + RD_CYCLES cycles.
//
// The flops use rst_n as an asynchronous reset while the bus assertion uses
// it synchronously in `disable iff`; lint tools report that mix, and it is
// intended: the assertion is simply off while reset is held.
`timescale 1ns / 1ps
module adc0804_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned WR_CYCLES  = 3,
  parameter int unsigned RD_CYCLES  = 4,
  parameter int unsigned GAP_CYCLES = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        adc_wr_n,
  output logic        adc_rd_n,
  input  logic        adc_intr_n,
  input  sample_t     adc_db,
  output sample_t     sample,
  output logic        sample_valid,
  output logic [15:0] conversions
);

  localparam int unsigned CW = 8;

  adc_state_t    state;
  logic [CW-1:0] cnt;
  logic [1:0]    intr_sync;   // intr_sync[1] is the synchronised INTR (active low)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) intr_sync <= 2'b11;
    else        intr_sync <= {intr_sync[0], adc_intr_n};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ADC_IDLE;
      cnt          <= '0;
      adc_wr_n     <= 1'b1;
      adc_rd_n     <= 1'b1;
      sample       <= '0;
      sample_valid <= 1'b0;
      conversions  <= '0;
    end else begin
      sample_valid <= 1'b0;
      case (state)
        ADC_IDLE: begin
          if (enable) begin
            state    <= ADC_WR;
            adc_wr_n <= 1'b0;
            cnt      <= CW'(WR_CYCLES - 1);
          end
        end
        ADC_WR: begin
          if (cnt == '0) begin
            adc_wr_n <= 1'b1;
            state    <= ADC_WAIT_INTR;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ADC_WAIT_INTR: begin
          if (!intr_sync[1]) begin
            adc_rd_n <= 1'b0;
            cnt      <= CW'(RD_CYCLES - 1);
            state    <= ADC_RD;
          end
        end
        ADC_RD: begin
          if (cnt == '0) begin
            sample       <= adc_db;
            sample_valid <= 1'b1;
            conversions  <= conversions + 1'b1;
            adc_rd_n     <= 1'b1;
            cnt          <= CW'(GAP_CYCLES - 1);
            state        <= ADC_RECOVER;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        ADC_RECOVER: begin
          // Lets RD settle high and the INTR synchroniser see INTR released.
          if (cnt == '0) begin
            if (enable) begin
              adc_wr_n <= 1'b0;
              cnt      <= CW'(WR_CYCLES - 1);
              state    <= ADC_WR;
            end else begin
              state <= ADC_IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= ADC_IDLE;
      endcase
    end
  end

  // The ADC must never see WR and RD low together.
  a_wr_rd_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(!adc_wr_n && !adc_rd_n));

  // Pulse widths must fit the counter.
  initial begin
    assert (WR_CYCLES >= 1 && WR_CYCLES <= 256);
    assert (RD_CYCLES >= 1 && RD_CYCLES <= 256);
    assert (GAP_CYCLES >= 2 && GAP_CYCLES <= 256);
  end

endmodule
