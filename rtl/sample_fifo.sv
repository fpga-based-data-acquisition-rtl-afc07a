// sample_fifo: first-in first-out store for ADC samples awaiting the PC.
//
// The FPGA keeps the samples it acquires until the PC asks for them. This
// FIFO is a circular buffer in one memory array (written to map onto a block
// RAM: one write port, one registered read port) with a write pointer, a read
// pointer and an occupancy count. The original design has the FPGA store
// the acquired data and the PC read it from a queue; the FIFO
// organisation, its depth (1024 bytes, half of one of the Spartan-3E's 18-Kbit
// block RAMs) and the drop-newest overflow policy are this design's choices.
//
// Interface
//   wr_en/wr_data   push; a push into a full FIFO is dropped and pulses
//                   overflow for one cycle.
//   rd_en           pop; ignored when empty. rd_data holds the popped word
//                   from the next cycle on (registered read).
//   count, empty, full   occupancy, updated the cycle after a push or pop.
//   A push and a pop in the same cycle are both performed.
`timescale 1ns / 1ps
module sample_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Memory array: no reset, as in a block RAM.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  initial assert (DEPTH >= 2);

endmodule
