// tb_host_cmd_ctrl: self-checking test of the PC command decoder.
//
// The testbench stands in for the receiver (command pulses), the sample FIFO
// (a queue with a registered read port) and the transmitter (a ready signal
// that stalls at random). It checks the reply to every command: the stored
// count for 'S' (saturated at 255), the oldest sample for 'R' or the latest
// ADC sample when nothing is stored, the echo and the acquisition-enable
// change for 'G' and 'H', no reply and a bad_cmd pulse for unknown bytes. It
// also checks the reply latency (2 cycles for 'S', 4 for 'R'), that a reply
// is held while the transmitter stalls, that a command arriving during a
// reply is kept and answered next and that one more is dropped.
`timescale 1ns / 1ps
module tb_host_cmd_ctrl;
  import daq_pkg::*;

  localparam int CNT_W = 11;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             cmd_valid = 1'b0;
  logic [7:0]       cmd_data = '0;
  logic [CNT_W-1:0] fifo_count;
  logic             fifo_empty, fifo_rd_en;
  sample_t          fifo_rd_data = '0;
  sample_t          latest_sample = 8'h3C;
  logic             tx_valid, tx_ready = 1'b1;
  logic [7:0]       tx_data;
  logic             acq_enable, cmd_drop, bad_cmd;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_cmd_ctrl #(.CNT_W(CNT_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // FIFO stand-in.
  sample_t fq[$];
  assign fifo_count = CNT_W'(fq.size());
  assign fifo_empty = (fq.size() == 0);
  always @(posedge clk) if (fifo_rd_en && fq.size() != 0) fifo_rd_data <= fq.pop_front();

  // Transmitter stand-in: collects accepted replies.
  logic [7:0] replies[$];
  int n_bad = 0, n_drop = 0, n_stall = 0;
  logic [7:0] held;
  bit         held_v = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) replies.push_back(tx_data);
    if (held_v) begin
      check(tx_valid && tx_data == held, "reply held during stall");
      n_stall++;
    end
    held_v = tx_valid && !tx_ready;
    held   = tx_data;
    if (bad_cmd) n_bad++;
    if (cmd_drop) n_drop++;
  end

  task automatic send_cmd(input logic [7:0] c);
    @(negedge clk);
    cmd_data  = c;
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  // Send a command and wait for its one-byte reply; returns it and the
  // number of cycles from the command pulse to tx_valid.
  task automatic transact(input logic [7:0] c, output logic [7:0] r, output int lat);
    int n0 = replies.size();
    lat = 0;
    @(negedge clk);
    cmd_data  = c;
    cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    lat = 1;
    while (!tx_valid) begin
      @(negedge clk);
      lat++;
    end
    while (replies.size() == n0) @(negedge clk);
    r = replies[n0];
  endtask

  logic [7:0] r;
  int lat;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(acq_enable == 1'b1, "acquisition enabled after reset");
    check(!tx_valid, "no reply after reset");

    transact(CMD_STATUS, r, lat);
    check(r == 8'd0, $sformatf("status empty: %0d", r));
    check(lat == 2, $sformatf("status latency %0d", lat));

    transact(CMD_READ, r, lat);
    check(r == latest_sample, "read while empty returns latest sample");

    for (int i = 0; i < 5; i++) fq.push_back(8'(32'hA0 + i));
    transact(CMD_STATUS, r, lat);
    check(r == 8'd5, $sformatf("status 5: %0d", r));
    for (int i = 0; i < 5; i++) begin
      transact(CMD_READ, r, lat);
      check(r == 8'(32'hA0 + i), $sformatf("read %02h expected %02h", r, 32'hA0 + i));
      check(lat == 4, $sformatf("read latency %0d", lat));
    end
    check(fq.size() == 0, "FIFO drained by reads");

    for (int i = 0; i < 300; i++) fq.push_back(8'($urandom));
    transact(CMD_STATUS, r, lat);
    check(r == 8'hFF, "status saturates at 255");
    fq.delete();

    transact(CMD_STOP, r, lat);
    check(r == CMD_STOP && acq_enable == 1'b0, "stop: echo and acquisition off");
    transact(CMD_START, r, lat);
    check(r == CMD_START && acq_enable == 1'b1, "start: echo and acquisition on");

    // Unknown command: no reply.
    begin
      automatic int n0 = replies.size();
      send_cmd(8'h00);
      repeat (20) @(negedge clk);
      check(replies.size() == n0 && n_bad == 1, "unknown command ignored");
    end

    // Transmitter stalls; three commands in quick succession while the
    // first reply waits: the second is held, the third dropped.
    fq.push_back(8'h11);
    fq.push_back(8'h22);
    tx_ready = 1'b0;
    begin
      automatic int n0 = replies.size();
      send_cmd(CMD_READ);
      repeat (6) @(negedge clk);
      send_cmd(CMD_READ);
      send_cmd(CMD_STATUS);
      repeat (30) @(negedge clk);
      check(n_drop == 1, "third command dropped");
      tx_ready = 1'b1;
      repeat (30) @(negedge clk);
      check(replies.size() == n0 + 2, $sformatf("%0d replies", replies.size() - n0));
      if (replies.size() == n0 + 2)
        check(replies[n0] == 8'h11 && replies[n0+1] == 8'h22, "held command answered in order");
    end
    // Random stalls with random traffic.
    for (int i = 0; i < 200; i++) begin
      automatic logic [7:0] v = 8'($urandom);
      fq.push_back(v);
      fork
        begin
          repeat ($urandom_range(0, 6)) begin
            @(negedge clk);
            tx_ready = 1'($urandom_range(0, 1));
          end
          @(negedge clk);
          tx_ready = 1'b1;
        end
      join_none
      transact(CMD_READ, r, lat);
      check(r == v, $sformatf("random read %02h expected %02h", r, v));
      @(negedge clk);
      tx_ready = 1'b1;
    end
    check(n_stall > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
