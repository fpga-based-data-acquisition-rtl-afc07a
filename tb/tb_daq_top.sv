// tb_daq_top: end-to-end test of the data acquisition system at its default
// parameters (24 MHz clock, 9600 baud, 1024-sample FIFO).
//
// The behavioural ADC0804 model sits on the parallel bus with a 100 us
// conversion time and a new random input code for every conversion; the
// testbench plays the PC's hardware layer on the serial line, sending command
// bytes and decoding the replies with its own UART routines. It records the
// code of every conversion the model completes and checks that the PC reads
// exactly those codes, in order. The run goes through:
//   stop ('H') right after reset; status query ('S'); reading every stored
//   sample ('R'); a read with nothing stored (latest sample returned); the LED
//   output; restart ('G') and free running until the FIFO overflows; a
//   saturated status; reading the oldest samples after overflow; an unknown
//   command (no reply); a frame with a bad stop bit; commands sent faster
//   than they are answered (one is dropped).
// Each of these mechanisms is counted and one that never happened is a failure.
`timescale 1ns / 1ps
module tb_daq_top;
  import daq_pkg::*;

  localparam real TCLK  = 1.0e9 / 24_000_000;
  localparam real TBIT  = 1.0e9 / 9_600;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        adc_wr_n, adc_rd_n, adc_intr_n;
  sample_t     adc_db;
  logic        txd, rxd = 1'b1;
  logic [7:0]  led;
  logic        acq_enable, fifo_full, fifo_overflow, rx_frame_err, cmd_drop, bad_cmd;
  logic [15:0] conversions;
  logic [7:0]  vin = 8'h80, last_code;
  int          conv_count, violations;

  int checks = 0, failures = 0;

  always #(TCLK / 2) clk = ~clk;

  daq_top dut (.*);

  adc0804_model #(.CONV_NS(100_000.0)) adc (
    .wr_n(adc_wr_n), .rd_n(adc_rd_n), .intr_n(adc_intr_n), .db(adc_db),
    .vin, .last_code, .conv_count, .violations
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Analog input: a new code at every start of conversion.
  // The first conversion converts 8'b11111010, the byte of the original
  // simulation waveforms; later ones are random.
  int n_wr = 0;
  always @(negedge adc_wr_n) begin
    vin <= (n_wr == 0) ? 8'b1111_1010 : 8'($urandom);
    n_wr++;
  end

  // Every code the ADC produced, in order.
  logic [7:0] codes[$];
  always @(negedge adc_intr_n) codes.push_back(last_code);

  // Mechanism counters.
  int n_conv = 0, n_status = 0, n_read = 0, n_read_empty = 0, n_start = 0, n_stop = 0;
  int n_overflow = 0, n_full = 0, n_saturated = 0, n_bad = 0, n_ferr = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (fifo_overflow) n_overflow++;
    if (bad_cmd) n_bad++;
    if (cmd_drop) n_drop++;
    if (rx_frame_err) n_ferr++;
    if (fifo_full && !$past(fifo_full)) n_full++;
  end

  // PC receiver: decodes every byte on txd.
  logic [7:0] rxq[$];
  initial begin
    forever begin
      automatic logic [7:0] b;
      @(negedge txd);
      if (!rst_n) continue;
      #(TBIT / 2);
      check(txd == 1'b0, "reply start bit");
      for (int k = 0; k < 8; k++) begin
        #(TBIT);
        b[k] = txd;
      end
      #(TBIT);
      check(txd == 1'b1, "reply stop bit");
      rxq.push_back(b);
    end
  end

  // PC transmitter.
  task automatic pc_send(input logic [7:0] b, input bit stop = 1'b1, input bit fast = 1'b0);
    rxd = 1'b0;
    if (fast) #(TBIT * 0.97); else #(TBIT);
    for (int k = 0; k < 8; k++) begin
      rxd = b[k];
      if (fast) #(TBIT * 0.97); else #(TBIT);
    end
    rxd = stop;
    if (fast) #(TBIT * 0.97); else #(TBIT);
    rxd = 1'b1;
  endtask

  // One command, one reply byte (within 3 frame times).
  task automatic pc_cmd(input logic [7:0] c, output logic [7:0] r);
    automatic int n0 = rxq.size();
    pc_send(c);
    for (int t = 0; t < 300 && rxq.size() == n0; t++) #(TBIT / 10);
    check(rxq.size() == n0 + 1, $sformatf("one reply to command %02h", c));
    r = (rxq.size() > n0) ? rxq[n0] : 8'hXX;
    while (rxq.size() > n0) void'(rxq.pop_back());
  endtask

  logic [7:0] r;
  int         idx = 0;   // next code the PC should read

  initial begin
    #(10 * TCLK);
    rst_n = 1'b1;
    #(3 * TBIT);

    // Acquisition runs from reset; stop it.
    pc_cmd(CMD_STOP, r);
    check(r == CMD_STOP && !acq_enable, "stop echoed, acquisition off");
    n_stop++;
    #(1_000_000);   // let the conversion in flight finish
    begin
      automatic int c0 = conv_count;
      #(2_000_000);
      check(conv_count == c0 && adc_wr_n && adc_rd_n, "no conversions while stopped");
    end
    check(codes.size() > 0, "conversions before stop");

    // Status: all conversions so far are stored.
    pc_cmd(CMD_STATUS, r);
    n_status++;
    check(r == 8'(codes.size()), $sformatf("status %0d expected %0d", r, codes.size()));

    // Read every stored sample, in conversion order; the first is 11111010.
    check(codes[0] == 8'b1111_1010, "first conversion is 11111010");
    while (idx < codes.size()) begin
      pc_cmd(CMD_READ, r);
      n_read++;
      check(r == codes[idx], $sformatf("sample %0d: %02h expected %02h", idx, r, codes[idx]));
      idx++;
    end
    pc_cmd(CMD_STATUS, r);
    check(r == 8'd0, "status 0 after reading all");

    // Nothing stored: the latest sample comes back, and the LEDs show it.
    pc_cmd(CMD_READ, r);
    n_read_empty++;
    check(r == codes[$] && led == codes[$], "read when empty gives latest sample; LEDs");

    // Restart and run until the FIFO overflows (1024 samples at ~100 us).
    pc_cmd(CMD_START, r);
    n_start++;
    check(r == CMD_START && acq_enable, "start echoed, acquisition on");
    for (int t = 0; t < 2000 && n_overflow == 0; t++) #(100_000);
    check(n_overflow > 0, "FIFO overflow reached");
    pc_cmd(CMD_STATUS, r);
    n_status++;
    if (r == 8'hFF) n_saturated++;
    check(r == 8'hFF, "status saturates at 255 when full");
    pc_cmd(CMD_STOP, r);
    n_stop++;
    #(1_000_000);
    // The FIFO kept the oldest 1024 samples after the restart.
    for (int i = 0; i < 40; i++) begin
      pc_cmd(CMD_READ, r);
      n_read++;
      check(r == codes[idx], $sformatf("sample %0d after overflow: %02h expected %02h", idx, r, codes[idx]));
      idx++;
    end

    // Unknown command: no reply.
    begin
      automatic int n0 = rxq.size();
      pc_send(8'h7E);
      #(20 * TBIT);
      check(rxq.size() == n0 && n_bad == 1, "unknown command ignored");
    end

    // Bad stop bit: frame error, no reply.
    begin
      automatic int n0 = rxq.size();
      pc_send(CMD_STATUS, 1'b0);
      #(20 * TBIT);
      check(rxq.size() == n0 && n_ferr == 1, "frame error, no reply");
    end
    // A PC that does not wait for replies and whose clock runs 3 % fast
    // gains on the replies until a command finds the holding register full.
    begin
      automatic int n0 = rxq.size();
      automatic int d0 = n_drop;
      for (int i = 0; i < 80; i++) pc_send(CMD_STATUS, 1'b1, 1'b1);
      #(30 * TBIT);
      check(n_drop > d0, "commands dropped when sent faster than answered");
      check(rxq.size() - n0 + n_drop - d0 == 80,
            $sformatf("replies %0d + drops %0d = 80", rxq.size() - n0, n_drop - d0));
      while (rxq.size() > n0) void'(rxq.pop_back());
    end

    // The link still works.
    pc_cmd(CMD_READ, r);
    n_read++;
    check(r == codes[idx], "read after frame error");
    idx++;

    n_conv = conv_count;
    check(int'(conversions) == (conv_count & 32'hFFFF), "conversion counter matches model");
    check(violations == 0, $sformatf("%0d ADC bus timing violations", violations));
    $display("mechanisms: conversions %0d status %0d saturated %0d reads %0d read-empty %0d start %0d stop %0d full %0d overflow-drops %0d bad-cmd %0d frame-err %0d cmd-drop %0d",
             n_conv, n_status, n_saturated, n_read, n_read_empty, n_start, n_stop, n_full, n_overflow, n_bad, n_ferr, n_drop);
    check(n_conv > 0, "mechanism: conversion");
    check(n_status > 0, "mechanism: status query");
    check(n_saturated > 0, "mechanism: saturated status");
    check(n_read > 0, "mechanism: sample read");
    check(n_read_empty > 0, "mechanism: read with FIFO empty");
    check(n_start > 0 && n_stop > 0, "mechanism: start/stop");
    check(n_full > 0 && n_overflow > 0, "mechanism: FIFO full and overflow");
    check(n_bad > 0, "mechanism: unknown command");
    check(n_ferr > 0, "mechanism: frame error");
    check(n_drop > 0, "mechanism: command dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(600_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
