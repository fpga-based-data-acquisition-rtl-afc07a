// tb_adc0804_ctrl: self-checking test of the ADC0804 bus sequencer.
//
// The sequencer drives the behavioural ADC model at the 24 MHz system clock,
// with a shortened conversion time. Each conversion is given a random input
// code; the testbench checks every byte the sequencer reports against the
// code the model converted, the WR and RD pulse widths in clock cycles, the
// delay from INTR falling to the result, back-to-back restart, and that
// dropping `enable` stops the sequencer after the conversion in flight and
// raising it starts it again. The model's timing-violation count must stay 0.
`timescale 1ns / 1ps
module tb_adc0804_ctrl;
  import daq_pkg::*;

  localparam real CLK_PERIOD = 1000.0 / 24.0;   // 24 MHz
  localparam int  WR_C = 3, RD_C = 4, GAP_C = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic        wr_n, rd_n, intr_n;
  logic [7:0]  db, vin, last_code;
  sample_t     sample;
  logic        sample_valid;
  logic [15:0] conversions;
  int          conv_count, violations;

  int checks = 0, failures = 0;

  always #(CLK_PERIOD / 2) clk = ~clk;

  adc0804_ctrl #(.WR_CYCLES(WR_C), .RD_CYCLES(RD_C), .GAP_CYCLES(GAP_C)) dut (
    .clk, .rst_n, .enable,
    .adc_wr_n(wr_n), .adc_rd_n(rd_n), .adc_intr_n(intr_n), .adc_db(db),
    .sample, .sample_valid, .conversions
  );

  adc0804_model #(.CONV_NS(2000.0)) adc (
    .wr_n, .rd_n, .intr_n, .db, .vin, .last_code, .conv_count, .violations
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // New random input code at every start of conversion.
  always @(negedge wr_n) vin <= 8'($urandom);
  initial vin = 8'h5A;

  // Expected codes, in order, as the model converts them.
  logic [7:0] expq[$];
  always @(negedge intr_n) expq.push_back(last_code);

  // Pulse widths in cycles.
  int wr_w = 0, rd_w = 0, intr_lat = 0;
  bit intr_seen = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!wr_n) wr_w++;
      else if (wr_w != 0) begin
        check(wr_w == WR_C, $sformatf("WR low for %0d cycles", wr_w));
        wr_w = 0;
      end
      if (!rd_n) rd_w++;
      else if (rd_w != 0) begin
        check(rd_w == RD_C, $sformatf("RD low for %0d cycles", rd_w));
        rd_w = 0;
      end
      if (!intr_n && rd_n && !intr_seen) begin
        intr_seen = 1;
        intr_lat  = 0;
      end else if (intr_seen) intr_lat++;
      if (sample_valid) begin
        // INTR falls between clock edges: 2 sync + RD_C, plus up to one edge.
        check(intr_seen && intr_lat >= 2 + RD_C && intr_lat <= 3 + RD_C,
              $sformatf("INTR-to-sample latency %0d cycles", intr_lat));
        intr_seen = 0;
        check(expq.size() > 0, "sample without a conversion");
        if (expq.size() > 0) begin
          automatic logic [7:0] e = expq.pop_front();
          check(sample == e, $sformatf("sample %02h expected %02h", sample, e));
        end
      end
    end
  end

  int n_valid = 0;
  always @(posedge clk) if (sample_valid) n_valid++;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(wr_n && rd_n, "bus idle while disabled");
    enable = 1'b1;
    wait (n_valid == 20);
    check(conversions == 16'd20, "conversion counter");
    // Back-to-back: next WR starts GAP_C cycles after RD rises.
    begin
      int gap;
      gap = 0;
      @(posedge clk);
      while (wr_n) begin
        @(posedge clk);
        gap++;
      end
      check(gap == GAP_C - 1 || gap == GAP_C, $sformatf("RD-to-WR gap %0d", gap));
    end
    // Stop mid-conversion: the conversion in flight completes, then idle.
    enable = 1'b0;
    begin
      int n0;
      n0 = n_valid;
      repeat (200) @(posedge clk);
      check(n_valid == n0 + 1, "in-flight conversion finished after stop");
      repeat (200) @(posedge clk);
      check(n_valid == n0 + 1 && wr_n && rd_n, "idle after stop");
    end
    enable = 1'b1;
    begin
      int n0;
      n0 = n_valid;
      wait (n_valid == n0 + 10);
    end
    repeat (5) @(posedge clk);
    check(violations == 0, $sformatf("%0d ADC timing violations", violations));
    check(conv_count == n_valid, "model/sequencer conversion counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(CLK_PERIOD * 100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
